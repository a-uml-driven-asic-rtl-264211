// tb_jpeg_encoder: end-to-end test of the JPEG encoder core.
// Four 8x8 blocks (two noisy, one flat, one gradient) stream in at one pixel
// per cycle with random enable gaps. The DCT coefficients seen on dct_dout are
// checked against a floating-point DCT (tolerance 2). The quantisation table
// keeps only zig-zag positions 0, 1, 2, 30 and 63 (divisor 1) and divides the
// rest by 255, so the blocks produce kept and dropped (15,0) symbols, blocks
// ending in end of block and blocks ending in a coefficient. Every symbol is
// compared with the reference sequence computed from the observed
// coefficients. Counts of each mechanism are checked to be non-zero.
`timescale 1ns/1ps
module tb_jpeg_encoder;
  import jpeg_ref_pkg::*;
  localparam int NBLK = 4;

  logic clk = 0, ena = 0, rst = 1, dstrb = 0;
  logic [7:0] din = 0, qnt_val;
  logic [5:0] qnt_cnt;
  logic [3:0] size, rlen;
  logic [11:0] amp;
  logic douten, dc, dct_den;
  logic signed [10:0] dct_dout;

  int checks = 0, failures = 0;
  int pix [NBLK][64];
  int qtab [64];
  int zz [64];
  sym_t expq[$];
  int coef_n = 0, blk_n = 0;
  int cblk [64];
  int n_zrl_kept = 0, n_zrl_dropped = 0, n_eob = 0, n_last_nz = 0, n_syms = 0;

  always #5 clk = ~clk;

  jpeg_encoder dut (.*);

  assign qnt_val = 8'(qtab[qnt_cnt]);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // coefficient monitor: DCT accuracy and expected symbols
  always @(posedge clk) if (!rst && dct_den && blk_n < NBLK) begin
    cblk[coef_n] = int'(dct_dout);
    coef_n++;
    if (coef_n == 64) begin
      real f[64];
      int qc[64];
      real_dct(pix[blk_n], f);
      for (int n = 0; n < 64; n++) begin
        real e;
        e = real'(cblk[n]) - f[zz[n]];
        check(e < 2.0 && e > -2.0, $sformatf("blk %0d coef %0d: %0d vs %f", blk_n, n, cblk[n], f[zz[n]]));
        qc[n] = qdiv(cblk[n], qtab[n]);
      end
      if (qc[63] == 0) begin n_eob++; n_zrl_dropped += count_zrl(qc); end
      else begin n_last_nz++; n_zrl_kept += count_zrl(qc); end
      rle_block(qc, 1'b1, expq);
      coef_n = 0;
      blk_n++;
    end
  end

  // symbol monitor: collected and compared once all blocks are known
  sym_t gotq[$];
  always @(posedge clk) if (!rst && douten) begin
    sym_t g;
    g.rlen = int'(rlen); g.size = int'(size); g.amp = int'(amp); g.dc = dc;
    gotq.push_back(g);
  end

  initial begin
    zigzag(zz);
    for (int n = 0; n < 64; n++) qtab[n] = 255;
    qtab[0] = 1; qtab[1] = 1; qtab[2] = 1; qtab[30] = 1; qtab[63] = 1;
    for (int i = 0; i < 64; i++) begin
      pix[0][i] = 128 + int'($urandom_range(40)) - 20;
      pix[1][i] = 100;
      pix[2][i] = 60 + int'($urandom_range(40));
      pix[3][i] = 8 * (i % 8) + 4 * (i / 8) + 90;
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) begin
        // occasional enable gap
        while ($urandom_range(9) == 0) begin ena <= 0; @(posedge clk); end
        ena <= 1;
        dstrb <= (b == 0 && i == 0);
        din <= 8'(pix[b][i]);
        @(posedge clk);
      end
    dstrb <= 0;
    din <= 8'd128;
    repeat (200) @(posedge clk);
    check(blk_n == NBLK, "all blocks transformed");
    check(gotq.size() >= expq.size(), $sformatf("%0d symbols for %0d expected", gotq.size(), expq.size()));
    n_syms = expq.size();
    foreach (expq[i]) if (i < gotq.size()) begin
      sym_t e, g;
      e = expq[i]; g = gotq[i];
      check(g.rlen == e.rlen && g.size == e.size && g.amp == e.amp && g.dc == e.dc,
            $sformatf("sym %0d: got (%0d,%0d,%h,%0d) exp (%0d,%0d,%h,%0d)", i, g.rlen, g.size, g.amp, g.dc,
                      e.rlen, e.size, e.amp, e.dc));
    end
    check(n_zrl_kept > 0, "kept (15,0) symbol exercised");
    check(n_zrl_dropped > 0, "dropped (15,0) symbol exercised");
    check(n_eob > 0, "end of block exercised");
    check(n_last_nz > 0, "block ending in a coefficient exercised");
    $display("zrl kept %0d dropped %0d eob %0d last-nonzero %0d symbols %0d", n_zrl_kept, n_zrl_dropped,
             n_eob, n_last_nz, n_syms);
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
