// tb_vp3_get_mb_intra_error: macroblocks of four random 8x8 blocks with a random
// visibility mask (all four, none and mixed), streamed with idle gaps.
// Checks the sum of the visible block scores and that done pulses once per
// macroblock, after the last pixel.
`timescale 1ns/1ps
module tb_vp3_get_mb_intra_error;
  import vp3_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0, in_valid = 0, ref_offset_zero = 1;
  logic [3:0] coded_mask = 0;
  logic [7:0] pix = 0, src = 0, ref1 = 0, ref2 = 0;
  logic done;
  logic [29:0] err;
  int checks = 0, failures = 0, n_done = 0;
  always #5 clk = ~clk;
  vp3_get_mb_intra_error dut (.clk, .rst, .start, .in_valid, .coded_mask, .pix, .done, .err);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && done) n_done++;

  task automatic run(input logic [3:0] mask, input bit one_ref);
    int d0, waited;
    longint e;
    blk_t s, r1, r2, p, d;
    e = 0;
    d0 = n_done;
    @(negedge clk);
    coded_mask = mask; ref_offset_zero = one_ref;
    for (int b = 0; b < 4; b++) begin
      s = rand_blk(0, 255); r1 = rand_blk(0, 255); r2 = rand_blk(0, 255);
      p = predict(r1, r2, one_ref);
      foreach (d[i]) d[i] = s[i];
      if (mask[b]) e += variance64(d);
      for (int i = 0; i < 64; i++) begin
        while ($urandom_range(4) == 0) begin in_valid = 0; @(negedge clk); end
        start = (b == 0 && i == 0);
        in_valid = 1; pix = 8'(s[i]); src = 8'(s[i]); ref1 = 8'(r1[i]); ref2 = 8'(r2[i]);
        @(negedge clk);
        start = 0; in_valid = 0;
        check(!done, "no done inside the macroblock");
      end
    end
    waited = 0;
    while (!done && waited < 5) begin @(negedge clk); waited++; end
    check(done, "done after the macroblock");
    check(longint'(err) == e, $sformatf("err %0d exp %0d mask %b", err, e, mask));
    @(negedge clk);
    check(n_done == d0 + 1, "one done per macroblock");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    run(4'hF, 1);
    run(4'h0, 0);
    for (int k = 0; k < 8; k++) run(4'($urandom), k % 2 != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
