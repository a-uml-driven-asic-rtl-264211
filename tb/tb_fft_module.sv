// tb_fft_module: four frames of 16 random complex samples (|x| <= 1000) with
// random gaps on data_valid and data_ack. Each output value is compared with
// a floating-point DFT (tolerance 4 LSB), the input handshake must take
// exactly 16 samples per frame, and the compute phase must last 32 cycles
// (one butterfly per cycle) between the last sample and the first result.
`timescale 1ns/1ps
module tb_fft_module;
  localparam int N = 16;
  localparam int NF = 4;
  logic clk = 0, reset = 1, data_valid = 0, data_ack = 0;
  logic signed [15:0] in_real = 0, in_imag = 0, out_real, out_imag;
  logic data_req, data_ready;
  int checks = 0, failures = 0;
  int xr [NF][N], xi [NF][N];
  int in_f = 0, in_n = 0, out_f = 0, out_n = 0;
  int cyc = 0, t_last_in = 0;
  bit wait_first = 0;
  always #5 clk = ~clk;
  fft_module dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // source
  always @(posedge clk) if (!reset) begin
    if (data_req && data_valid) begin
      in_n = in_n + 1;
      if (in_n == N) begin in_n = 0; in_f = in_f + 1; t_last_in <= cyc; wait_first = 1; end
    end
    data_valid <= (in_f < NF) && ($urandom_range(3) != 0);
    if (in_f < NF) begin
      in_real <= 16'(xr[in_f][in_n]);
      in_imag <= 16'(xi[in_f][in_n]);
    end
  end

  // sink
  always @(posedge clk) if (!reset) begin
    if (data_ready && wait_first) begin
      check(cyc == t_last_in + 33, $sformatf("compute latency %0d", cyc - t_last_in));
      wait_first = 0;
    end
    if (data_ready && data_ack) begin
      real sr, si, er, ei;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        real a;
        a = 6.283185307179586 * n * out_n / N;
        sr += xr[out_f][n] * $cos(a) + xi[out_f][n] * $sin(a);
        si += xi[out_f][n] * $cos(a) - xr[out_f][n] * $sin(a);
      end
      er = real'(out_real) - sr;
      ei = real'(out_imag) - si;
      check(er < 4.0 && er > -4.0 && ei < 4.0 && ei > -4.0,
            $sformatf("frame %0d bin %0d: (%0d,%0d) exp (%f,%f)", out_f, out_n, out_real, out_imag, sr, si));
      out_n = out_n + 1;
      if (out_n == N) begin out_n = 0; out_f = out_f + 1; end
    end
    data_ack <= ($urandom_range(2) != 0);
  end

  initial begin
    foreach (xr[f, n]) begin
      xr[f][n] = int'($urandom_range(2000)) - 1000;
      xi[f][n] = int'($urandom_range(2000)) - 1000;
    end
    for (int n = 0; n < N; n++) begin xr[0][n] = (n == 3) ? 1000 : 0; xi[0][n] = 0; end
    repeat (3) @(posedge clk);
    reset <= 0;
    wait (out_f == NF);
    repeat (3) @(posedge clk);
    check(in_f == NF, "all frames read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
