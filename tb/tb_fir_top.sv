// tb_fir_top: filters 40 random samples through the FIR filter. in_valid is
// dropped at random moments, also in the middle of a computation, and the
// results must still equal a direct convolution with the 16 coefficients.
// With in_valid held high a result must follow every five cycles. The number
// of interrupted computations (resumed through the history state) is counted
// and must be non-zero.
`timescale 1ns/1ps
module tb_fir_top;
  import fir_pkg::*;
  localparam int TAPS = 16;
  localparam int NS = 40;
  localparam int C [TAPS] = '{-1, -2, 0, 5, 12, 22, 31, 37, 37, 31, 22, 12, 5, 0, -2, -1};
  logic clk = 0, reset = 1, in_valid = 0;
  logic signed [31:0] sample = 0, result;
  logic output_data_ready;
  fir_state_t state;
  int checks = 0, failures = 0, n_resume = 0, n_steady = 0;
  int x [NS];
  always #5 clk = ~clk;
  fir_top dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // count resumptions: wait -> second_s/third_s/output_s
  fir_state_t prev;
  always @(posedge clk) begin
    prev <= state;
    if (prev == WAIT_S && state inside {SECOND_S, THIRD_S, OUTPUT_S}) n_resume++;
  end

  initial begin
    int last_t, t;
    foreach (x[i]) x[i] = int'($urandom_range(20000)) - 10000;
    repeat (3) @(posedge clk);
    reset <= 0;
    last_t = -1;
    for (int n = 0; n < NS; n++) begin
      int y;
      bit steady;
      y = 0;
      for (int i = 0; i < TAPS; i++) if (n - i >= 0) y += C[i] * x[n-i];
      sample <= x[n];
      steady = (n >= NS - 6);
      t = 0;
      do begin
        in_valid <= steady ? 1'b1 : ($urandom_range(3) != 0);
        @(posedge clk);
        t++;
      end while (!output_data_ready);
      check(result == y, $sformatf("sample %0d: got %0d exp %0d", n, result, y));
      if (steady && n > NS - 6) begin
        check(t == 5, $sformatf("steady-state interval %0d cycles", t));
        n_steady++;
      end
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    check(n_resume > 0, "computation resumed from history");
    $display("resumed %0d times", n_resume);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
