// tb_vp3_get_intra_error: flat blocks (score 0), a checkerboard of 0 and
// 255 (largest score), and random blocks of narrow and full range, fed with
// idle gaps. Checks the scaled variance and that done pulses once, one clock
// after the last pixel.
`timescale 1ns/1ps
module tb_vp3_get_intra_error;
  import vp3_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0, in_valid = 0;
  logic [7:0] pix = 0;
  logic done;
  logic [27:0] err;
  int checks = 0, failures = 0, n_done = 0;
  always #5 clk = ~clk;
  vp3_get_intra_error dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && done) n_done++;

  task automatic run(input blk_t s);
    int d0;
    longint e;
    e = variance64(s);
    d0 = n_done;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
      start = (i == 0);
      in_valid = 1; pix = 8'(s[i]);
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
    blk_t f, c;
    foreach (f[i]) begin f[i] = 77; c[i] = ((i / 8 + i) % 2 != 0) ? 255 : 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    run(f);
    run(c);
    for (int b = 0; b < 10; b++) run(rand_blk(100, 140));
    for (int b = 0; b < 10; b++) run(rand_blk(0, 255));
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
