// tb_vp3_four_mv_exhaustive_search: full-pixel search of one 8x8 block over
// +-15 pixels (the default extent of 31 half pixels). The reference frame
// is a hash of the address, read one clock after rd_en. In some runs the
// source block is planted as an exact copy of a reference block at a known
// offset, so the search must find that vector with a sum of zero; in
// others the source is a different hash and the best candidate is worked
// out here by visiting every candidate in the same order, first minimum
// winning. Checks sad, vector, the cycle count of 64 clocks per candidate
// and that done pulses once.
`timescale 1ns/1ps
module tb_vp3_four_mv_exhaustive_search;
  localparam int ADDR_W = 20, STRIDE = 416, R = 15;
  localparam int REF_BASE = 300000;
  logic clk = 0, rst = 1, start = 0;
  logic [ADDR_W-1:0] src_pos = 0, ref_pos = 0, src_addr, ref_addr;
  logic busy, rd_en, done;
  logic [7:0] src_data, ref_data;
  logic [13:0] best_sad;
  logic signed [7:0] mv_x, mv_y;
  int checks = 0, failures = 0, n_planted = 0, n_random = 0, n_done = 0;
  int plant_dx, plant_dy, plant_on = 0, salt = 0;
  always #5 clk = ~clk;

  vp3_four_mv_exhaustive_search dut (.*);

  function automatic logic [7:0] rpix(input int a);
    logic [31:0] h = 32'(a) * 32'd2654435761 + 32'(salt);
    return h[31:24];
  endfunction
  // Current frame: either a copy of the reference at the planted offset or
  // an unrelated hash.
  function automatic logic [7:0] spix(input int a);
    int rel = a - int'(src_pos), y = rel / STRIDE, x = rel % STRIDE;
    if (plant_on != 0) return rpix(int'(ref_pos) + (y + plant_dy) * STRIDE + x + plant_dx);
    return rpix(a + 777777);
  endfunction

  always_ff @(posedge clk) if (rd_en) begin
    src_data <= spix(int'(src_addr));
    ref_data <= rpix(int'(ref_addr));
  end
  always @(posedge clk) if (!rst && done) n_done++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(input bit plant);
    int best, bx, by, cyc, d0;
    src_pos = ADDR_W'(40 * STRIDE + 40 + 8 * $urandom_range(30));
    ref_pos = ADDR_W'(REF_BASE + 50 * STRIDE + 50 + 8 * $urandom_range(30));
    salt = int'($urandom);
    plant_on = int'(plant);
    plant_dx = int'($urandom_range(2 * R)) - R;
    plant_dy = int'($urandom_range(2 * R)) - R;
    best = -1; bx = 0; by = 0;
    for (int dy = -R; dy <= R; dy++)
      for (int dx = -R; dx <= R; dx++) begin
        int s = 0;
        for (int i = 0; i < 64; i++) begin
          int a = int'(spix(int'(src_pos) + (i / 8) * STRIDE + i % 8));
          int b = int'(rpix(int'(ref_pos) + (dy + i / 8) * STRIDE + dx + i % 8));
          s += (a > b) ? a - b : b - a;
        end
        if (best < 0 || s < best) begin best = s; bx = dx; by = dy; end
      end
    d0 = n_done;
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 70000) begin @(negedge clk); cyc++; end
    check(done, "done seen");
    check(int'(best_sad) == best, $sformatf("sad %0d exp %0d", best_sad, best));
    check(int'(mv_x) == 2 * bx && int'(mv_y) == 2 * by, $sformatf("mv (%0d,%0d) exp (%0d,%0d)", mv_x, mv_y, 2 * bx, 2 * by));
    if (plant) check(best == 0 && bx == plant_dx && by == plant_dy, "planted block found by the model");
    check(cyc >= 64 * (2 * R + 1) * (2 * R + 1) && cyc <= 64 * (2 * R + 1) * (2 * R + 1) + 6,
          $sformatf("%0d clocks", cyc));
    @(negedge clk);
    check(!busy && n_done == d0 + 1, "one done, idle after");
    if (plant) n_planted++; else n_random++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    run(1); run(0); run(1); run(0);
    check(n_planted > 0 && n_random > 0, "both kinds of run seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
