// tb_vp3_fdct_short: transforms a flat block (DC only), a block at the
// extremes (-255/+255 alternating), single-cosine patterns and random
// residual blocks. Every coefficient must be within 1 of the rounded
// floating point DCT; ready must be low while a block is transformed and
// exactly 64 coefficients must appear per block.
`timescale 1ns/1ps
module tb_vp3_fdct_short;
  import vp3_ref_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [15:0] din = 0;
  logic ready, out_valid;
  logic signed [15:0] dout;
  int checks = 0, failures = 0;
  int got[$];
  always #5 clk = ~clk;
  vp3_fdct_short dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && out_valid) got.push_back(int'(dout));

  task automatic run(input blk_t f);
    @(negedge clk);
    check(ready, "ready before block");
    got.delete();
    for (int i = 0; i < 64; i++) begin
      in_valid = 1; din = 16'(f[i]);
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(4) == 0) @(negedge clk);
    end
    check(!ready, "busy after 64 inputs");
    while (!ready) @(negedge clk);
    @(negedge clk);
    check(got.size() == 64, $sformatf("%0d coefficients", got.size()));
    for (int k = 0; k < 64 && k < got.size(); k++) begin
      real e;
      int d;
      e = dct_coef(f, k % 8, k / 8);
      d = got[k] - int'(e);
      check(d >= -1 && d <= 1, $sformatf("coef %0d: %0d exp %f", k, got[k], e));
    end
  endtask

  initial begin
    blk_t f;
    repeat (2) @(negedge clk);
    rst = 0;
    foreach (f[i]) f[i] = 100;
    run(f);
    foreach (f[i]) f[i] = ((i / 8 + i) % 2 != 0) ? 255 : -255;
    run(f);
    for (int u = 1; u < 8; u += 3) begin
      foreach (f[i]) f[i] = int'(200.0 * $cos((2 * (i % 8) + 1) * u * 3.14159265358979 / 16.0));
      run(f);
    end
    for (int b = 0; b < 4; b++) run(rand_blk(-255, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
