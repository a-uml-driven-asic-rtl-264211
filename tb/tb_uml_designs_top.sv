// tb_uml_designs_top: end-to-end test of the whole collection at its default
// sizes. All designs run at the same time in parallel threads, each with
// reference checks, and every mechanism is counted; a mechanism that never
// happened fails the test.
//   JPEG : four 8x8 blocks through DCT, quantiser and run-length coder; every
//          symbol is compared with a software model (DC symbols, zero runs,
//          run-of-16 symbols kept and suppressed, end of block).
//   MAC  : transmit output looped back to the receiver; two good frames and
//          one with a bit flipped on the line (frame_ok, frame_err, bytes).
//   FIR  : impulse response equals the coefficient list; a pause in the
//          input resumes the statechart from its history state.
//   FFT  : an impulse and a constant frame, checked bin by bin.
//   FIFO : filled to full and emptied, order and flags checked; a word
//          appears on data_out after the clock of its read request.
//   VP3  : transform/quantisation in intra mode (flat block gives zeros
//          except DC), plain SAD, half-pixel SAD with and without early
//          exit, macroblock intra and inter scores, clearing of 2 fragments,
//          motion block difference for a whole- and a half-pixel vector
//          against a frame memory model, intra mode picking for a CIF frame,
//          a full-pixel exhaustive motion search that must find a planted
//          block.
`timescale 1ns/1ps
module tb_uml_designs_top;
  import jpeg_ref_pkg::*;
  import mac_ref_pkg::*;
  import vp3_ref_pkg::*;
  import fir_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  // ---------------- signals ----------------
  logic jpeg_ena = 0, jpeg_dstrb = 0;
  logic [7:0] jpeg_din = 128, jpeg_qnt_val;
  logic [5:0] jpeg_qnt_cnt;
  logic [3:0] jpeg_size, jpeg_rlen;
  logic [11:0] jpeg_amp;
  logic jpeg_douten, jpeg_dc, jpeg_dct_den;
  logic signed [10:0] jpeg_dct_dout;

  logic mac_tx_enable = 1, mac_rx_enable = 1, mac_tx_wr = 0, mac_tx_start = 0, mac_rx_rd = 0;
  logic [7:0] mac_tx_data = 0, mac_rx_data;
  logic mac_tx_full, mac_txd, mac_tx_en, mac_tx_busy, mac_tx_done;
  logic mac_rxd, mac_rx_dv, mac_rx_empty, mac_rx_frame_ok, mac_rx_frame_err;
  logic corrupt = 0;

  logic fir_in_valid = 0, fir_output_data_ready;
  logic signed [31:0] fir_sample = 0, fir_result;
  fir_state_t fir_state;

  logic signed [15:0] fft_in_real = 0, fft_in_imag = 0, fft_out_real, fft_out_imag;
  logic fft_data_valid = 0, fft_data_ack = 0, fft_data_req, fft_data_ready;

  logic fifo_read = 0, fifo_write = 0, fifo_full, fifo_empty;
  logic signed [31:0] fifo_data_in = 0, fifo_data_out;

  logic [1:0] vp3_tq_mode = 0;
  logic vp3_tq_in_valid = 0, vp3_tq_in_ready, vp3_tq_out_valid, vp3_tq_out_first;
  logic [7:0] vp3_tq_src = 0, vp3_tq_ref1 = 0, vp3_tq_ref2 = 0;
  logic [63:0][15:0] vp3_tq_qrecip;
  logic signed [9:0] vp3_tq_qcoef;

  logic vp3_sad_start = 0, vp3_sad_in_valid = 0, vp3_sad_done;
  logic [7:0] vp3_sad_src = 0, vp3_sad_ref = 0;
  logic [13:0] vp3_sad_sad;

  logic vp3_hp_start = 0, vp3_hp_in_valid = 0, vp3_hp_ref_offset_zero = 0;
  logic [7:0] vp3_hp_src = 0, vp3_hp_ref1 = 0, vp3_hp_ref2 = 0;
  logic [15:0] vp3_hp_err_so_far = 0, vp3_hp_best_so_far = 0, vp3_hp_sad;
  logic vp3_hp_active, vp3_hp_done, vp3_hp_early;

  logic vp3_mbi_start = 0, vp3_mbi_in_valid = 0, vp3_mbi_done;
  logic [3:0] vp3_mbi_coded_mask = 4'hF;
  logic [7:0] vp3_mbi_pix = 0;
  logic [29:0] vp3_mbi_err;

  logic vp3_mbp_start = 0, vp3_mbp_in_valid = 0, vp3_mbp_ref_offset_zero = 1, vp3_mbp_done;
  logic [3:0] vp3_mbp_coded_mask = 4'hF;
  logic [7:0] vp3_mbp_src = 0, vp3_mbp_ref1 = 0, vp3_mbp_ref2 = 0;
  logic [31:0] vp3_mbp_err;

  logic vp3_clr_enable = 0, vp3_clr_output_data_ready, vp3_clr_busy;
  logic [31:0] vp3_clr_datain = 0, vp3_clr_dataout, vp3_clr_addr;

  logic vp3_mbd_start = 0, vp3_mbd_golden = 0, vp3_mbd_busy, vp3_mbd_rd_en, vp3_mbd_half, vp3_mbd_out_valid;
  logic signed [7:0] vp3_mbd_mv_x = 0, vp3_mbd_mv_y = 0;
  logic [2:0] vp3_mbd_mv_divisor = 3'd2;
  logic [19:0] vp3_mbd_frag_pos = 20'd20000, vp3_mbd_src_base = 0, vp3_mbd_last_base = 20'd300000, vp3_mbd_golden_base = 20'd600000;
  logic [19:0] vp3_mbd_src_addr, vp3_mbd_ref1_addr, vp3_mbd_ref2_addr;
  logic [7:0] vp3_mbd_src_data, vp3_mbd_ref1_data, vp3_mbd_ref2_data;
  logic signed [8:0] vp3_mbd_diff;

  logic vp3_pi_start = 0, vp3_pi_busy, vp3_pi_wr, vp3_pi_done;
  logic [15:0] vp3_pi_mb_index;
  logic [3:0] vp3_pi_mode;

  logic vp3_fmv_start = 0, vp3_fmv_busy, vp3_fmv_rd_en, vp3_fmv_done;
  logic [19:0] vp3_fmv_src_pos = 20'd20000, vp3_fmv_ref_pos = 20'd320000, vp3_fmv_src_addr, vp3_fmv_ref_addr;
  logic [7:0] vp3_fmv_src_data, vp3_fmv_ref_data;
  logic [13:0] vp3_fmv_best_sad;
  logic signed [7:0] vp3_fmv_mv_x, vp3_fmv_mv_y;

  assign mac_rxd   = mac_txd ^ corrupt;
  assign mac_rx_dv = mac_tx_en;

  uml_designs_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // mechanism counters
  int n_jpeg_blk = 0, n_jpeg_sym = 0, n_jpeg_dc = 0, n_jpeg_eob = 0, n_jpeg_zrl_kept = 0, n_jpeg_zrl_drop = 0;
  int n_mac_done = 0, n_mac_ok = 0, n_mac_err = 0, n_mac_bytes = 0;
  int n_fir_out = 0, n_fir_resume = 0;
  int n_fft_frames = 0;
  int n_fifo_full = 0, n_fifo_empty = 0;
  int n_mbd_full = 0, n_mbd_half = 0, n_pi_writes = 0, n_pi_bad = 0, n_pi_done = 0;
  bit pi_seen [22 * 18];
  int n_tq_blocks = 0, n_sad = 0, n_hp_early = 0, n_hp_full = 0, n_mbi = 0, n_mbp = 0, n_clr_words = 0;

  // ---------------- JPEG ----------------
  localparam int NBLK = 4;
  int pix [NBLK][64];
  int qtab [64];
  int zzj [64];
  sym_t jexp[$], jgot[$];
  int coef_n = 0;
  int cblk [64];
  assign jpeg_qnt_val = 8'(qtab[jpeg_qnt_cnt]);

  always @(posedge clk) if (!rst && jpeg_dct_den && n_jpeg_blk < NBLK) begin
    cblk[coef_n] = int'(jpeg_dct_dout);
    coef_n++;
    if (coef_n == 64) begin
      int qc[64];
      for (int n = 0; n < 64; n++) qc[n] = qdiv(cblk[n], qtab[n]);
      if (qc[63] == 0) begin n_jpeg_eob++; n_jpeg_zrl_drop += count_zrl(qc); end
      else n_jpeg_zrl_kept += count_zrl(qc);
      rle_block(qc, 1'b1, jexp);
      coef_n = 0;
      n_jpeg_blk++;
    end
  end
  always @(posedge clk) if (!rst && jpeg_douten) begin
    sym_t g;
    g.rlen = int'(jpeg_rlen); g.size = int'(jpeg_size); g.amp = int'(jpeg_amp); g.dc = jpeg_dc;
    jgot.push_back(g);
  end

  task automatic run_jpeg();
    zigzag(zzj);
    for (int n = 0; n < 64; n++) qtab[n] = 255;
    qtab[0] = 1; qtab[1] = 1; qtab[2] = 1; qtab[30] = 1; qtab[63] = 1;
    for (int i = 0; i < 64; i++) begin
      pix[0][i] = 128 + int'($urandom_range(40)) - 20;
      pix[1][i] = 100;
      pix[2][i] = 60 + int'($urandom_range(40));
      pix[3][i] = 8 * (i % 8) + 4 * (i / 8) + 90;
    end
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        jpeg_ena = 1; jpeg_dstrb = (b == 0 && i == 0); jpeg_din = 8'(pix[b][i]);
      end
    @(negedge clk);
    jpeg_dstrb = 0; jpeg_din = 8'd128;
    repeat (200) @(negedge clk);
    check(n_jpeg_blk == NBLK, "JPEG: all blocks transformed");
    check(jgot.size() >= jexp.size(), "JPEG: symbol count");
    foreach (jexp[i]) if (i < jgot.size()) begin
      check(jgot[i].rlen == jexp[i].rlen && jgot[i].size == jexp[i].size && jgot[i].amp == jexp[i].amp
            && jgot[i].dc == jexp[i].dc, $sformatf("JPEG: symbol %0d", i));
      n_jpeg_sym++;
      if (jexp[i].dc) n_jpeg_dc++;
    end
  endtask

  // ---------------- MAC ----------------
  always @(posedge clk) if (!rst) begin
    if (mac_tx_done) n_mac_done++;
    if (mac_rx_frame_ok) n_mac_ok++;
    if (mac_rx_frame_err) n_mac_err++;
  end

  task automatic mac_frame(input int len, input bit flip);
    byte unsigned body[$];
    int ok0, err0;
    make_body(len, body);
    ok0 = n_mac_ok; err0 = n_mac_err;
    foreach (body[i]) begin
      @(negedge clk); mac_tx_wr = 1; mac_tx_data = body[i];
    end
    @(negedge clk); mac_tx_wr = 0; mac_tx_start = 1;
    @(negedge clk); mac_tx_start = 0;
    if (flip) begin
      repeat (8 * 20) @(negedge clk);
      corrupt = 1; @(negedge clk); corrupt = 0;
    end
    while (!mac_tx_done) @(negedge clk);
    while (mac_tx_en) @(negedge clk);
    repeat (5) @(negedge clk);
    check(n_mac_ok - ok0 == int'(!flip) && n_mac_err - err0 == int'(flip), "MAC: frame status");
    foreach (body[i]) begin
      check(!mac_rx_empty, "MAC: byte present");
      if (!flip) check(mac_rx_data == body[i], $sformatf("MAC: byte %0d", i));
      if (!flip) n_mac_bytes++;
      mac_rx_rd = 1; @(negedge clk); mac_rx_rd = 0;
    end
    check(mac_rx_empty, "MAC: receive FIFO drained");
  endtask

  task automatic run_mac();
    mac_frame(46, 0);
    mac_frame(20, 1);
    mac_frame(100, 0);
  endtask

  // ---------------- FIR ----------------
  localparam int FIR_C [16] = '{-1, -2, 0, 5, 12, 22, 31, 37, 37, 31, 22, 12, 5, 0, -2, -1};
  fir_state_t fir_prev;
  always @(posedge clk) begin
    fir_prev <= fir_state;
    if (!rst && fir_prev == WAIT_S && fir_state inside {SECOND_S, THIRD_S, OUTPUT_S}) n_fir_resume++;
  end

  task automatic run_fir();
    for (int n = 0; n < 20; n++) begin
      int t;
      @(negedge clk);
      fir_sample = (n == 0) ? 32'sd1000 : 32'sd0;
      t = 0;
      do begin
        fir_in_valid = !(n == 3 && t == 1);
        @(negedge clk);
        t++;
      end while (!fir_output_data_ready && t < 50);
      check(fir_result == ((n < 16) ? 1000 * FIR_C[n] : 0), $sformatf("FIR: output %0d = %0d", n, fir_result));
      n_fir_out++;
    end
    fir_in_valid = 0;
  endtask

  // ---------------- FFT ----------------
  task automatic fft_frame(input int kind);
    int k, waited;
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      waited = 0;
      while (!fft_data_req && waited < 200) begin @(negedge clk); waited++; end
      fft_data_valid = 1;
      fft_in_real = 16'((kind == 0) ? ((n == 0) ? 1000 : 0) : 100);
      fft_in_imag = 0;
      @(negedge clk);
      fft_data_valid = 0;
    end
    k = 0;
    waited = 0;
    while (k < 16 && waited < 500) begin
      @(negedge clk);
      waited++;
      if (fft_data_ready) begin
        int er;
        er = (kind == 0) ? 1000 : ((k == 0) ? 1600 : 0);
        check(int'(fft_out_real) - er <= 1 && er - int'(fft_out_real) <= 1 && int'(fft_out_imag) <= 1
              && int'(fft_out_imag) >= -1, $sformatf("FFT: bin %0d (%0d,%0d)", k, fft_out_real, fft_out_imag));
        fft_data_ack = 1; @(negedge clk); fft_data_ack = 0;
        k++;
      end
    end
    check(k == 16, "FFT: 16 bins");
    n_fft_frames++;
  endtask

  // ---------------- FIFO ----------------
  task automatic run_fifo();
    int n;
    n = 0;
    @(negedge clk);
    check(fifo_empty, "FIFO: empty after reset");
    if (fifo_empty) n_fifo_empty++;
    while (!fifo_full && n < 40) begin
      fifo_write = 1; fifo_data_in = 32'(n * 7 - 50);
      @(negedge clk);
      n++;
    end
    fifo_write = 0;
    check(fifo_full && n == 16, $sformatf("FIFO: full after %0d writes", n));
    if (fifo_full) n_fifo_full++;
    for (int i = 0; i < n; i++) begin
      fifo_read = 1; @(negedge clk); fifo_read = 0;
      check(fifo_data_out == 32'(i * 7 - 50), $sformatf("FIFO: word %0d", i));
      @(negedge clk);
    end
    check(fifo_empty, "FIFO: empty after reads");
    if (fifo_empty) n_fifo_empty++;
  endtask

  // ---------------- VP3 ----------------
  always @(posedge clk) if (!rst) begin
    if (vp3_tq_out_valid && vp3_tq_out_first) n_tq_blocks++;
    if (vp3_clr_output_data_ready) n_clr_words++;
  end

  task automatic run_tq();
    int got[$];
    int waited;
    foreach (vp3_tq_qrecip[i]) vp3_tq_qrecip[i] = 16'(65536 / 8);
    vp3_tq_mode = 2'd0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      while (!vp3_tq_in_ready) @(negedge clk);
      vp3_tq_in_valid = 1; vp3_tq_src = 8'd168;
      @(negedge clk);
      vp3_tq_in_valid = 0;
    end
    waited = 0;
    while (got.size() < 64 && waited < 6000) begin
      @(negedge clk);
      waited++;
      if (vp3_tq_out_valid) got.push_back(int'(vp3_tq_qcoef));
    end
    // DC of a flat residual of 40 is 8 * 40 = 320, quantised by 8 -> 40
    check(got.size() == 64, "VP3 TQ: 64 values");
    foreach (got[i]) check(got[i] == ((i == 0) ? 40 : 0), $sformatf("VP3 TQ: value %0d = %0d", i, got[i]));
  endtask

  task automatic run_sad();
    blk_t s, r;
    s = rand_blk(0, 255); r = rand_blk(0, 255);
    @(negedge clk);
    vp3_sad_start = 1; @(negedge clk); vp3_sad_start = 0;
    for (int i = 0; i < 64; i++) begin
      vp3_sad_in_valid = 1; vp3_sad_src = 8'(s[i]); vp3_sad_ref = 8'(r[i]);
      @(negedge clk);
    end
    vp3_sad_in_valid = 0;
    check(vp3_sad_done && int'(vp3_sad_sad) == vp3_ref_pkg::sad(s, r), "VP3 SAD: value");
    if (vp3_sad_done) n_sad++;
  endtask

  task automatic hp_block(input int best);
    blk_t s, r1, r2, p;
    int exp_sad;
    bit exp_early, seen;
    s = rand_blk(0, 255); r1 = rand_blk(0, 255); r2 = rand_blk(0, 255);
    p = predict(r1, r2, 0);
    exp_sad = sad_breakout(s, p, 0, best, exp_early);
    @(negedge clk);
    vp3_hp_best_so_far = 16'(best); vp3_hp_err_so_far = 0; vp3_hp_ref_offset_zero = 0;
    vp3_hp_start = 1; @(negedge clk); vp3_hp_start = 0;
    seen = 0;
    for (int i = 0; i < 64; i++) begin
      vp3_hp_in_valid = 1; vp3_hp_src = 8'(s[i]); vp3_hp_ref1 = 8'(r1[i]); vp3_hp_ref2 = 8'(r2[i]);
      @(negedge clk);
      if (vp3_hp_done && !seen) begin
        seen = 1;
        check(vp3_hp_early == exp_early && int'(vp3_hp_sad) == exp_sad, "VP3 half-pixel SAD: result");
        if (vp3_hp_early) n_hp_early++; else n_hp_full++;
      end
    end
    vp3_hp_in_valid = 0;
    check(seen, "VP3 half-pixel SAD: done");
  endtask

  task automatic run_mb();
    blk_t s[4], r1[4], r2[4];
    longint ei, ep;
    ei = 0; ep = 0;
    for (int b = 0; b < 4; b++) begin
      blk_t d;
      s[b] = rand_blk(0, 255); r1[b] = rand_blk(0, 255); r2[b] = rand_blk(0, 255);
      ei += variance64(s[b]);
      foreach (d[i]) d[i] = s[b][i] - r1[b][i];
      ep += variance64(d);
    end
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        vp3_mbi_start = (b == 0 && i == 0); vp3_mbp_start = vp3_mbi_start;
        vp3_mbi_in_valid = 1; vp3_mbp_in_valid = 1;
        vp3_mbi_pix = 8'(s[b][i]); vp3_mbp_src = 8'(s[b][i]);
        vp3_mbp_ref1 = 8'(r1[b][i]); vp3_mbp_ref2 = 8'(r2[b][i]);
      end
    @(negedge clk);
    vp3_mbi_in_valid = 0; vp3_mbp_in_valid = 0; vp3_mbi_start = 0; vp3_mbp_start = 0;
    @(negedge clk);
    check(vp3_mbi_done && longint'(vp3_mbi_err) == ei, "VP3 MB intra score");
    check(vp3_mbp_done && longint'(vp3_mbp_err) == ep, "VP3 MB inter score");
    if (vp3_mbi_done) n_mbi++;
    if (vp3_mbp_done) n_mbp++;
  endtask

  // Frame memory of the motion block difference: pixel at address a is a
  // fixed hash of a, read one clock after rd_en.
  function automatic logic [7:0] mpix(input logic [19:0] a);
    logic [31:0] h = 32'(a) * 32'd2654435761;
    return h[31:24];
  endfunction
  always_ff @(posedge clk) if (vp3_mbd_rd_en) begin
    vp3_mbd_src_data  <= mpix(vp3_mbd_src_addr);
    vp3_mbd_ref1_data <= mpix(vp3_mbd_ref1_addr);
    vp3_mbd_ref2_data <= mpix(vp3_mbd_ref2_addr);
  end

  // One whole-pixel and one half-pixel vector (divisor 2): (-4,2) and (3,-5).
  task automatic mbd_block(input int vx, input int vy);
    int got[$];
    int ox = vx / 2, oy = vy / 2, r2 = 0, base, e, n_bad = 0;
    if (vx % 2 != 0) r2 += (vx > 0) ? 1 : -1;
    if (vy % 2 != 0) r2 += (vy > 0) ? 416 : -416;
    base = 300000 + 20000 + oy * 416 + ox;
    @(negedge clk);
    vp3_mbd_mv_x = 8'(vx); vp3_mbd_mv_y = 8'(vy); vp3_mbd_start = 1;
    @(negedge clk);
    vp3_mbd_start = 0;
    check(vp3_mbd_busy, "VP3 MBD: busy after start");
    check(vp3_mbd_half == (r2 != 0), "VP3 MBD: choice of difference unit");
    for (int c = 0; c < 80 && got.size() < 64; c++) begin
      @(negedge clk);
      if (vp3_mbd_out_valid) got.push_back(int'(vp3_mbd_diff));
    end
    check(got.size() == 64, "VP3 MBD: 64 differences");
    foreach (got[i]) begin
      int s0 = 20000 + (i / 8) * 416 + i % 8, a1 = base + (i / 8) * 416 + i % 8;
      e = (r2 != 0) ? int'(mpix(20'(s0))) - ((int'(mpix(20'(a1))) + int'(mpix(20'(a1 + r2)))) >> 1)
                    : int'(mpix(20'(s0))) - int'(mpix(20'(a1)));
      if (got[i] != e) n_bad++;
    end
    check(n_bad == 0, $sformatf("VP3 MBD: %0d wrong differences", n_bad));
    if (r2 != 0) n_mbd_half++; else n_mbd_full++;
  endtask

  // Intra mode picking over a CIF frame (22 x 18 macroblocks): every
  // macroblock gets exactly one intra write.
  always @(posedge clk) if (!rst) begin
    if (vp3_pi_wr) begin
      n_pi_writes++;
      if (vp3_pi_mode != 4'd1 || int'(vp3_pi_mb_index) >= 22 * 18 || pi_seen[int'(vp3_pi_mb_index)]) n_pi_bad++;
      else pi_seen[int'(vp3_pi_mb_index)] = 1'b1;
    end
    if (vp3_pi_done) n_pi_done++;
  end
  task automatic run_pi();
    @(negedge clk);
    vp3_pi_start = 1; @(negedge clk); vp3_pi_start = 0;
    check(vp3_pi_busy, "VP3 pick intra: busy after start");
    while (vp3_pi_busy) @(negedge clk);
    @(negedge clk);
    check(n_pi_writes == 22 * 18 && n_pi_bad == 0 && n_pi_done == 1,
          $sformatf("VP3 pick intra: %0d writes, %0d bad", n_pi_writes, n_pi_bad));
  endtask

  // Motion search: the source block is a copy of the reference block 5
  // pixels right and 3 up, so the search must return (10,-6) half pixels
  // with a sum of zero.
  int n_fmv = 0;
  always_ff @(posedge clk) if (vp3_fmv_rd_en) begin
    vp3_fmv_ref_data <= mpix(vp3_fmv_ref_addr);
    vp3_fmv_src_data <= mpix(vp3_fmv_src_addr - 20'd20000 + 20'd320000 + 20'(5 - 3 * 416));
  end
  task automatic run_fmv();
    @(negedge clk);
    vp3_fmv_start = 1; @(negedge clk); vp3_fmv_start = 0;
    check(vp3_fmv_busy, "VP3 motion search: busy after start");
    while (!vp3_fmv_done) @(negedge clk);
    check(vp3_fmv_best_sad == 0 && vp3_fmv_mv_x == 8'sd10 && vp3_fmv_mv_y == -8'sd6,
          $sformatf("VP3 motion search: sad %0d mv (%0d,%0d)", vp3_fmv_best_sad, vp3_fmv_mv_x, vp3_fmv_mv_y));
    n_fmv++;
  endtask

  task automatic run_clr();
    @(negedge clk);
    vp3_clr_enable = 1; vp3_clr_datain = 32'd2;
    @(negedge clk);
    vp3_clr_enable = 0;
    while (vp3_clr_busy) @(negedge clk);
    @(negedge clk);
    check(n_clr_words == 128, $sformatf("VP3 clear: %0d words", n_clr_words));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    fork
      run_jpeg();
      run_mac();
      run_fir();
      begin fft_frame(0); fft_frame(1); end
      run_fifo();
      run_fmv();
      begin run_tq(); mbd_block(-4, 2); mbd_block(3, -5); run_pi(); end
      begin run_sad(); hp_block(0); hp_block(100000); run_mb(); run_clr(); end
    join
    check(n_jpeg_blk > 0 && n_jpeg_sym > 0 && n_jpeg_dc > 0, "seen: JPEG blocks and symbols");
    check(n_jpeg_eob > 0, "seen: JPEG end of block");
    check(n_jpeg_zrl_kept > 0 && n_jpeg_zrl_drop > 0, "seen: JPEG run-of-16 kept and suppressed");
    check(n_mac_done == 3 && n_mac_ok == 2 && n_mac_err == 1 && n_mac_bytes > 0, "seen: MAC transmit, receive ok, receive error");
    check(n_fir_out == 20 && n_fir_resume > 0, "seen: FIR outputs and history resume");
    check(n_fft_frames == 2, "seen: FFT frames");
    check(n_fifo_full > 0 && n_fifo_empty > 1, "seen: FIFO full and empty");
    check(n_tq_blocks == 1, "seen: VP3 transform/quantise block");
    check(n_sad == 1 && n_hp_early > 0 && n_hp_full > 0, "seen: VP3 SAD, early exit, full half-pixel SAD");
    check(n_mbi == 1 && n_mbp == 1 && n_clr_words > 0, "seen: VP3 macroblock scores and clearing");
    check(n_mbd_full == 1 && n_mbd_half == 1, "seen: VP3 motion block difference, whole and half pixel");
    check(n_pi_done == 1, "seen: VP3 intra mode picking");
    check(n_fmv == 1, "seen: VP3 exhaustive motion search");
    $display("jpeg blk %0d sym %0d eob %0d zrl %0d/%0d, mac %0d/%0d/%0d, fir %0d resume %0d, fft %0d, tq %0d, hp %0d/%0d",
             n_jpeg_blk, n_jpeg_sym, n_jpeg_eob, n_jpeg_zrl_kept, n_jpeg_zrl_drop, n_mac_done, n_mac_ok, n_mac_err,
             n_fir_out, n_fir_resume, n_fft_frames, n_tq_blocks, n_hp_early, n_hp_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
