// tb_vp3_sub8: streams random pixels (with extremes 0 and 255 mixed in) and
// idle gaps through vp3_sub8 and checks that every input gives exactly one
// output, one clock later, equal to src - ref.
`timescale 1ns/1ps
module tb_vp3_sub8;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [7:0] src = 0, ref1 = 0, ref2 = 0;
  logic out_valid;
  logic signed [8:0] diff;
  int checks = 0, failures = 0, n_out = 0, n_in = 0;
  int expq[$];
  always #5 clk = ~clk;
  vp3_sub8 dut (.clk, .rst, .in_valid, .src, .ref_pix(ref1), .out_valid, .diff);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [7:0] pix();
    case ($urandom_range(5))
      0: return 8'd0;
      1: return 8'd255;
      default: return 8'($urandom);
    endcase
  endfunction

  always @(posedge clk) if (!rst && out_valid) begin
    n_out++;
    if (expq.size() == 0) check(0, "output without input");
    else check(int'(diff) == expq.pop_front(), $sformatf("diff %0d", diff));
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      src = pix(); ref1 = pix(); ref2 = pix();
      if (in_valid) begin expq.push_back(int'(src) - int'(ref1)); n_in++; end
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    check(expq.size() == 0 && n_out == n_in, "one output per input");
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
