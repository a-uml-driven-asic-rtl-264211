// tb_fir_data: drives the FIR datapath's state input directly, with wait
// cycles inserted between steps, and checks each result against a direct
// convolution, the one-cycle output_data_ready pulse and the clearing done in
// reset_s.
`timescale 1ns/1ps
module tb_fir_data;
  import fir_pkg::*;
  localparam int TAPS = 16;
  localparam int C [TAPS] = '{-1, -2, 0, 5, 12, 22, 31, 37, 37, 31, 22, 12, 5, 0, -2, -1};
  logic clk = 0, reset = 1;
  fir_state_t state_out = RESET_S;
  logic signed [31:0] sample = 0, result;
  logic output_data_ready;
  int checks = 0, failures = 0;
  int x [30];
  always #5 clk = ~clk;
  fir_data dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic go(input fir_state_t s);
    state_out <= s;
    @(posedge clk);
    if ($urandom_range(2) == 0) begin state_out <= WAIT_S; @(posedge clk); end
  endtask

  initial begin
    foreach (x[i]) x[i] = int'($urandom_range(200000)) - 100000;
    @(posedge clk);
    reset <= 0;
    for (int pass = 0; pass < 2; pass++) begin
      state_out <= RESET_S;
      @(posedge clk);
      for (int n = 0; n < 30; n++) begin
        int y;
        y = 0;
        for (int i = 0; i < TAPS; i++) if (n - i >= 0) y += C[i] * x[n-i];
        sample <= x[n];
        go(FIRST_S);
        sample <= 32'hdead;           // sample is only read in first_s
        go(SECOND_S);
        go(THIRD_S);
        state_out <= OUTPUT_S;
        @(posedge clk);
        state_out <= WAIT_S;
        #1 check(output_data_ready && result == y, $sformatf("pass %0d n %0d got %0d exp %0d", pass, n, result, y));
        @(posedge clk);
        #1 check(!output_data_ready, "ready is a pulse");
      end
    end
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
