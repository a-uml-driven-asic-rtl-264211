// tb_vp3_get_half_pixel_sad: blocks with and without the early exit. best_so_far is
// drawn around the block's true cost so both outcomes occur; err_so_far
// is random. The feeder keeps sending all 64 pixels even after an exit,
// which the unit must ignore. Checks done timing, the early flag, the
// (partial) sum, that active drops with done, and counts both outcomes.
`timescale 1ns/1ps
module tb_vp3_get_half_pixel_sad;
  import vp3_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0, in_valid = 0, ref_offset_zero = 1;
  logic [7:0] src = 0, ref1 = 0, ref2 = 0;
  logic [15:0] err_so_far = 0, best_so_far = 0;
  logic active, done, early;
  logic [15:0] sad;
  int checks = 0, failures = 0, n_done = 0, n_early = 0, n_full = 0;
  int last_done_idx;
  always #5 clk = ~clk;
  vp3_get_half_pixel_sad dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && done) n_done++;

  task automatic run(input blk_t s, input blk_t r1, input blk_t r2, input bit one_ref);
    int d0, exp_sad, so_far, best, fin;
    bit exp_early;
    blk_t p;
    p = predict(r1, r2, one_ref);
    so_far = int'($urandom_range(2000));
    best = so_far + int'($urandom_range(2 * vp3_ref_pkg::sad(s, p) + 10));
    exp_sad = sad_breakout(s, p, so_far, best, exp_early);
    fin = -1;
    d0 = n_done;
    @(negedge clk);
    err_so_far = 16'(so_far); best_so_far = 16'(best); ref_offset_zero = one_ref;
    start = 1; @(negedge clk); start = 0;
    check(active, "active after start");
    for (int i = 0; i < 64; i++) begin
      in_valid = 1; src = 8'(s[i]); ref1 = 8'(r1[i]); ref2 = 8'(r2[i]);
      @(negedge clk);
      in_valid = 0;
      if (done && fin < 0) begin
        fin = i;
        check(!active, "active drops with done");
        check(early == exp_early, $sformatf("early %0d exp %0d", early, exp_early));
        check(int'(sad) == exp_sad, $sformatf("sad %0d exp %0d", sad, exp_sad));
      end
      if ($urandom_range(3) == 0) @(negedge clk);
    end
    @(negedge clk);
    check(n_done == d0 + 1, "exactly one done");
    check(exp_early ? (fin % 8 == 7 && fin < 63) : fin == 63, "done after the deciding row");
    if (exp_early) n_early++; else n_full++;
  endtask

  initial begin
    blk_t z, w;
    foreach (z[i]) begin z[i] = 0; w[i] = 255; end
    repeat (2) @(negedge clk);
    rst = 0;
    run(z, w, w, 1);
    for (int b = 0; b < 40; b++) run(rand_blk(0, 255), rand_blk(0, 255), rand_blk(0, 255), b % 2 != 0);
    check(n_early > 0 && n_full > 0, "both outcomes seen");
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
