// tb_vp3_motion_block_difference: random motion vectors (whole, half and
// quarter pixel divisors, both signs, last and golden frame) against a
// frame memory whose pixel at address a is a fixed hash of a, so no memory
// array is needed. The memory answers one clock after rd_en. The expected
// reference positions are worked out here with C-style integer division,
// and every one of the 64 differences is compared in order. Also checks
// that the 64 outputs come on consecutive clocks, that `half` matches the
// expected choice of difference unit, and counts whole-pixel, half-pixel,
// golden-frame and negative-vector cases.
`timescale 1ns/1ps
module tb_vp3_motion_block_difference;
  localparam int ADDR_W = 20, STRIDE = 416;
  logic clk = 0, rst = 1, start = 0, golden = 0;
  logic signed [7:0] mv_x = 0, mv_y = 0;
  logic [2:0] mv_divisor = 0;
  logic [ADDR_W-1:0] frag_pos = 0, src_base = 0, last_base = 0, golden_base = 0;
  logic busy, rd_en, half, out_valid;
  logic [ADDR_W-1:0] src_addr, ref1_addr, ref2_addr;
  logic [7:0] src_data, ref1_data, ref2_data;
  logic signed [8:0] diff;
  int checks = 0, failures = 0, n_full = 0, n_half = 0, n_golden = 0, n_neg = 0;
  always #5 clk = ~clk;

  vp3_motion_block_difference dut (.*);

  function automatic logic [7:0] pix(input logic [ADDR_W-1:0] a);
    logic [31:0] h = 32'(a) * 32'd2654435761;
    return h[23:16] ^ h[31:24];
  endfunction

  always_ff @(posedge clk) if (rd_en) begin
    src_data  <= pix(src_addr);
    ref1_data <= pix(ref1_addr);
    ref2_data <= pix(ref2_addr);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int got[$];
  bit in_block = 0;
  int gap_errs;
  bit prev_valid;
  always @(posedge clk) if (!rst) begin
    if (out_valid) got.push_back(int'(diff));
    if (in_block && prev_valid && !out_valid && got.size() < 64 && got.size() > 0) gap_errs++;
    prev_valid = out_valid;
  end

  task automatic run(input int vx, input int vy, input int dv, input bit gold);
    int div, ox, oy, r2, base, exp_d[64];
    bit exp_half;
    logic [ADDR_W-1:0] s0, r1, r2a;
    div = (dv == 2 || dv == 4) ? dv : 1;
    ox = vx / div; oy = vy / div;                       // truncates towards zero
    r2 = 0;
    if (vx % div != 0) r2 += (vx > 0) ? 1 : -1;
    if (vy % div != 0) r2 += (vy > 0) ? STRIDE : -STRIDE;
    exp_half = (r2 != 0);
    frag_pos    = ADDR_W'(STRIDE * (40 + 8 * $urandom_range(20)) + 40 + 8 * $urandom_range(40));
    src_base    = ADDR_W'($urandom_range(1000));
    last_base   = ADDR_W'(300000 + $urandom_range(1000));
    golden_base = ADDR_W'(600000 + $urandom_range(1000));
    base = (gold ? int'(golden_base) : int'(last_base)) + int'(frag_pos) + oy * STRIDE + ox;
    for (int i = 0; i < 64; i++) begin
      s0  = ADDR_W'(int'(src_base) + int'(frag_pos) + (i / 8) * STRIDE + i % 8);
      r1  = ADDR_W'(base + (i / 8) * STRIDE + i % 8);
      r2a = ADDR_W'(base + r2 + (i / 8) * STRIDE + i % 8);
      exp_d[i] = exp_half ? int'(pix(s0)) - ((int'(pix(r1)) + int'(pix(r2a))) >> 1)
                          : int'(pix(s0)) - int'(pix(r1));
    end
    got.delete(); gap_errs = 0;
    @(negedge clk);
    mv_x = 8'(vx); mv_y = 8'(vy); mv_divisor = 3'(dv); golden = gold;
    start = 1; in_block = 1; @(negedge clk); start = 0;
    check(busy, "busy after start");
    check(half == exp_half, $sformatf("half %0d exp %0d (mv %0d,%0d /%0d)", half, exp_half, vx, vy, dv));
    repeat (70) @(negedge clk);
    in_block = 0;
    check(!busy, "busy drops after the block");
    check(got.size() == 64, $sformatf("%0d outputs", got.size()));
    check(gap_errs == 0, "outputs on consecutive clocks");
    for (int i = 0; i < 64 && i < got.size(); i++)
      check(got[i] == exp_d[i], $sformatf("diff[%0d] %0d exp %0d (mv %0d,%0d /%0d)", i, got[i], exp_d[i], vx, vy, dv));
    if (exp_half) n_half++; else n_full++;
    if (gold) n_golden++;
    if (vx < 0 || vy < 0) n_neg++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    run(0, 0, 2, 0);
    run(3, -5, 2, 0);
    run(-6, 4, 4, 1);
    run(-7, -1, 4, 0);
    run(5, 2, 1, 1);
    for (int b = 0; b < 30; b++) begin
      automatic int dv = ($urandom_range(2) == 0) ? 1 : (($urandom_range(1) != 0) ? 2 : 4);
      run(int'($urandom_range(60)) - 30, int'($urandom_range(60)) - 30, dv, $urandom_range(1) != 0);
    end
    check(n_full > 0 && n_half > 0 && n_golden > 0 && n_neg > 0, "all cases seen");
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
