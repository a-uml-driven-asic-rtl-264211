// tb_fir_fsm: steps the FIR controller through its statechart: reset_s and
// wait after reset, a full pass wait-first-second-third-output-wait, an
// interruption in second_s that must resume in third_s through the history
// state, and a new pass starting again in first_s after output_s.
`timescale 1ns/1ps
module tb_fir_fsm;
  import fir_pkg::*;
  logic clk = 0, reset = 1, in_valid = 0;
  fir_state_t state_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  fir_fsm dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic step(input bit v, input fir_state_t exp);
    in_valid <= v;
    @(posedge clk);
    #1 check(state_out == exp, $sformatf("got %s exp %s", state_out.name(), exp.name()));
  endtask

  initial begin
    @(posedge clk);
    #1 check(state_out == RESET_S, "reset_s");
    reset <= 0;
    step(0, WAIT_S);
    step(0, WAIT_S);
    step(1, FIRST_S);
    step(1, SECOND_S);
    step(1, THIRD_S);
    step(1, OUTPUT_S);
    step(1, WAIT_S);
    step(1, FIRST_S);
    step(1, SECOND_S);
    step(0, WAIT_S);      // interrupted during second_s
    step(0, WAIT_S);
    step(1, THIRD_S);     // resumes after second_s
    step(0, WAIT_S);      // interrupted during third_s
    step(1, OUTPUT_S);
    step(0, WAIT_S);      // output_s always completes
    step(1, FIRST_S);     // history reset after a complete pass
    reset <= 1;
    @(posedge clk);
    #1 check(state_out == RESET_S, "reset from active");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
