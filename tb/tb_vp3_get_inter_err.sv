// tb_vp3_get_inter_err: source and reference blocks in both prediction
// modes: equal blocks (0), source = reference + constant (0, the mean is
// removed), 0 against 255 checkerboards (largest) and random blocks. Checks
// the scaled variance of the difference and the done timing.
`timescale 1ns/1ps
module tb_vp3_get_inter_err;
  import vp3_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0, in_valid = 0, ref_offset_zero = 1;
  logic [7:0] src = 0, ref1 = 0, ref2 = 0;
  logic done;
  logic [29:0] err;
  int checks = 0, failures = 0, n_done = 0;
  always #5 clk = ~clk;
  vp3_get_inter_err dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && done) n_done++;

  task automatic run(input blk_t s, input blk_t r1, input blk_t r2, input bit one_ref);
    int d0;
    longint e;
    blk_t p, d;
    p = predict(r1, r2, one_ref);
    foreach (d[i]) d[i] = s[i] - p[i];
    e = variance64(d);
    d0 = n_done;
    @(negedge clk);
    ref_offset_zero = one_ref;
    for (int i = 0; i < 64; i++) begin
      while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
      start = (i == 0);
      in_valid = 1; src = 8'(s[i]); ref1 = 8'(r1[i]); ref2 = 8'(r2[i]);
      @(negedge clk);
      start = 0; in_valid = 0;
      if (i < 63) check(!done, "no early done");
    end
    check(done, "done after the last pixel");
    check(longint'(err) == e, $sformatf("err %0d exp %0d", err, e));
    @(negedge clk);
    check(n_done == d0 + 1, "one done per block");
  endtask

  initial begin
    blk_t a, b, c, z;
    a = rand_blk(20, 200);
    foreach (b[i]) begin b[i] = a[i] + 40; c[i] = ((i / 8 + i) % 2 != 0) ? 255 : 0; z[i] = 255 - c[i]; end
    repeat (2) @(negedge clk);
    rst = 0;
    run(a, a, a, 1);
    run(b, a, a, 1);
    run(b, a, a, 0);
    run(c, z, z, 1);
    run(c, z, z, 0);
    for (int k = 0; k < 16; k++) run(rand_blk(0, 255), rand_blk(0, 255), rand_blk(0, 255), k % 2 != 0);
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
