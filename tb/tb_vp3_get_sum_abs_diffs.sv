// tb_vp3_get_sum_abs_diffs: random blocks, an all-black against all-white
// block (largest sum) and identical blocks (zero), fed with random idle
// gaps, sometimes with start in its own clock and sometimes together with
// the first pixel. Checks the sum and that done comes once per block, one
// clock after the last pixel.
`timescale 1ns/1ps
module tb_vp3_get_sum_abs_diffs;
  import vp3_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0, in_valid = 0;
  logic [7:0] src = 0, ref_pix = 0;
  logic done;
  logic [13:0] sad;
  int checks = 0, failures = 0, n_done = 0;
  always #5 clk = ~clk;
  vp3_get_sum_abs_diffs dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && done) n_done++;

  task automatic run(input blk_t s, input blk_t r, input bit sep_start);
    int d0;
    d0 = n_done;
    @(negedge clk);
    if (sep_start) begin start = 1; @(negedge clk); start = 0; end
    for (int i = 0; i < 64; i++) begin
      while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
      start = (i == 0) && !sep_start;
      in_valid = 1; src = 8'(s[i]); ref_pix = 8'(r[i]);
      @(negedge clk);
      start = 0;
      in_valid = 0;
      if (i < 63) check(!done, "no early done");
    end
    check(done, "done one clock after the last pixel");
    check(int'(sad) == vp3_ref_pkg::sad(s, r), $sformatf("sad %0d exp %0d", sad, vp3_ref_pkg::sad(s, r)));
    @(negedge clk);
    check(n_done == d0 + 1, "one done per block");
  endtask

  initial begin
    blk_t z, w;
    foreach (z[i]) begin z[i] = 0; w[i] = 255; end
    repeat (2) @(negedge clk);
    rst = 0;
    run(z, w, 1);
    run(w, w, 0);
    for (int b = 0; b < 20; b++) run(rand_blk(0, 255), rand_blk(0, 255), b % 2 != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
