// tb_vp3_transform_quantize: blocks in all three coding modes. For each mode
// one block is built so that its residual is exactly zero only if the right
// difference path is used (source 128 for intra, source = ref1 for inter,
// source = average of ref1/ref2 for half-pixel), followed by random blocks.
// The reference is the floating point DCT of the residual quantised with the
// same reciprocals, in zig-zag order; a difference of 1 is accepted because
// the hardware DCT may round a coefficient differently. Checks in_ready
// handshaking, out_first and 64 outputs per block.
`timescale 1ns/1ps
module tb_vp3_transform_quantize;
  import vp3_ref_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, in_ready, out_valid, out_first;
  logic [1:0] mode = 0;
  logic [7:0] src = 0, ref1 = 0, ref2 = 0;
  logic [63:0][15:0] qrecip;
  logic signed [9:0] qcoef;
  int checks = 0, failures = 0, n_exact = 0;
  int got[$];
  bit firsts[$];
  always #5 clk = ~clk;
  vp3_transform_quantize dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && out_valid) begin
    got.push_back(int'(qcoef));
    firsts.push_back(out_first);
  end

  task automatic run(input logic [1:0] m, input blk_t s, input blk_t r1, input blk_t r2);
    blk_t p, d, q;
    int waited;
    p = (m == 2'd0) ? '{default: 128} : predict(r1, r2, m == 2'd1);
    foreach (d[i]) d[i] = s[i] - p[i];
    foreach (q[i]) q[i] = quant(int'($floor(dct_coef(d, i % 8, i / 8) + 0.5)), int'(qrecip[i]), 511);
    got.delete(); firsts.delete();
    @(negedge clk);
    mode = m;
    for (int i = 0; i < 64; i++) begin
      waited = 0;
      while (!in_ready && waited < 6000) begin @(negedge clk); waited++; end
      in_valid = 1; src = 8'(s[i]); ref1 = 8'(r1[i]); ref2 = 8'(r2[i]);
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(3) == 0) @(negedge clk);
    end
    check(!in_ready, "input closed after 64 pixels");
    waited = 0;
    while (got.size() < 64 && waited < 6000) begin @(negedge clk); waited++; end
    repeat (3) @(negedge clk);
    check(got.size() == 64, $sformatf("%0d outputs", got.size()));
    for (int n = 0; n < 64 && n < got.size(); n++) begin
      int e;
      e = q[zz(n)];
      check(got[n] - e <= 1 && e - got[n] <= 1, $sformatf("mode %0d zz %0d: %0d exp %0d", m, n, got[n], e));
      check(firsts[n] == (n == 0), "out_first");
      if (got[n] == e) n_exact++;
    end
  endtask

  initial begin
    blk_t a, b, h, c;
    a = rand_blk(0, 255); b = rand_blk(0, 255);
    foreach (h[i]) begin h[i] = avg2(a[i], b[i]); c[i] = 128; end
    foreach (qrecip[i]) qrecip[i] = 16'(65536 / 16);
    repeat (2) @(negedge clk);
    rst = 0;
    run(2'd0, c, a, b);
    run(2'd1, a, a, b);
    run(2'd2, h, a, b);
    foreach (qrecip[i]) qrecip[i] = 16'(65536 / (4 + i));
    for (int k = 0; k < 3; k++) run(2'(k), rand_blk(0, 255), rand_blk(0, 255), rand_blk(0, 255));
    check(n_exact > 6 * 64 * 9 / 10, $sformatf("%0d of %0d values exact", n_exact, 6 * 64));
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
