// uml_designs_top: the designs of this collection placed side by side on one
// clock and one synchronous active-high reset. They share nothing else;
// every design keeps its own ports, prefixed with its name:
//   jpeg_  JPEG encoder front end: DCT, quantiser, run-length coder
//   mac_   Ethernet-style MAC controller, transmit and receive paths
//   fir_   16-tap FIR filter with its statechart controller
//   fft_   16-point FFT
//   fifo_  circular buffer FIFO
//   vp3_tq_   VP3 transform and quantisation of one block
//   vp3_sad_  VP3 plain block sum of absolute differences
//   vp3_hp_   VP3 half-pixel SAD with early exit
//   vp3_mbi_  VP3 macroblock intra score
//   vp3_mbp_  VP3 macroblock inter (predicted) score
//   vp3_clr_  VP3 clearing of the quantised-coefficient store
//   vp3_mbd_  VP3 motion block difference, reading an external frame memory
//   vp3_pi_   VP3 intra mode picking for every macroblock of a frame
//   vp3_fmv_  VP3 full-pixel exhaustive motion search of one block
// vp3_clr_dataout is constant zero (the value the clearing unit writes) and
// vp3_pi_mode only carries the intra code, so those bits are constant.
// Timing and protocols are those of the individual designs, described in
// their own files. Placing unrelated designs next to each other is this
// design's choice: the document describes them as separate case studies.
module uml_designs_top (
  input  logic               clk,
  input  logic               rst,
  // JPEG encoder
  input  logic               jpeg_ena,
  input  logic               jpeg_dstrb,
  input  logic [7:0]         jpeg_din,
  input  logic [7:0]         jpeg_qnt_val,
  output logic [5:0]         jpeg_qnt_cnt,
  output logic [3:0]         jpeg_size,
  output logic [3:0]         jpeg_rlen,
  output logic [11:0]        jpeg_amp,
  output logic               jpeg_douten,
  output logic               jpeg_dc,
  output logic signed [10:0] jpeg_dct_dout,
  output logic               jpeg_dct_den,
  // MAC controller
  input  logic               mac_tx_enable,
  input  logic               mac_rx_enable,
  input  logic               mac_tx_wr,
  input  logic [7:0]         mac_tx_data,
  input  logic               mac_tx_start,
  output logic               mac_tx_full,
  output logic               mac_txd,
  output logic               mac_tx_en,
  output logic               mac_tx_busy,
  output logic               mac_tx_done,
  input  logic               mac_rxd,
  input  logic               mac_rx_dv,
  input  logic               mac_rx_rd,
  output logic [7:0]         mac_rx_data,
  output logic               mac_rx_empty,
  output logic               mac_rx_frame_ok,
  output logic               mac_rx_frame_err,
  // FIR filter
  input  logic               fir_in_valid,
  input  logic signed [31:0] fir_sample,
  output logic               fir_output_data_ready,
  output logic signed [31:0] fir_result,
  output fir_pkg::fir_state_t fir_state,
  // FFT
  input  logic signed [15:0] fft_in_real,
  input  logic signed [15:0] fft_in_imag,
  input  logic               fft_data_valid,
  input  logic               fft_data_ack,
  output logic signed [15:0] fft_out_real,
  output logic signed [15:0] fft_out_imag,
  output logic               fft_data_req,
  output logic               fft_data_ready,
  // circular buffer FIFO
  input  logic               fifo_read,
  input  logic               fifo_write,
  input  logic signed [31:0] fifo_data_in,
  output logic signed [31:0] fifo_data_out,
  output logic               fifo_full,
  output logic               fifo_empty,
  // VP3 transform and quantisation
  input  logic [1:0]         vp3_tq_mode,
  input  logic               vp3_tq_in_valid,
  output logic               vp3_tq_in_ready,
  input  logic [7:0]         vp3_tq_src,
  input  logic [7:0]         vp3_tq_ref1,
  input  logic [7:0]         vp3_tq_ref2,
  input  logic [63:0][15:0]  vp3_tq_qrecip,
  output logic               vp3_tq_out_valid,
  output logic               vp3_tq_out_first,
  output logic signed [9:0]  vp3_tq_qcoef,
  // VP3 plain SAD
  input  logic               vp3_sad_start,
  input  logic               vp3_sad_in_valid,
  input  logic [7:0]         vp3_sad_src,
  input  logic [7:0]         vp3_sad_ref,
  output logic               vp3_sad_done,
  output logic [13:0]        vp3_sad_sad,
  // VP3 half-pixel SAD with early exit
  input  logic               vp3_hp_start,
  input  logic               vp3_hp_in_valid,
  input  logic               vp3_hp_ref_offset_zero,
  input  logic [7:0]         vp3_hp_src,
  input  logic [7:0]         vp3_hp_ref1,
  input  logic [7:0]         vp3_hp_ref2,
  input  logic [15:0]        vp3_hp_err_so_far,
  input  logic [15:0]        vp3_hp_best_so_far,
  output logic               vp3_hp_active,
  output logic               vp3_hp_done,
  output logic               vp3_hp_early,
  output logic [15:0]        vp3_hp_sad,
  // VP3 macroblock intra score
  input  logic               vp3_mbi_start,
  input  logic               vp3_mbi_in_valid,
  input  logic [3:0]         vp3_mbi_coded_mask,
  input  logic [7:0]         vp3_mbi_pix,
  output logic               vp3_mbi_done,
  output logic [29:0]        vp3_mbi_err,
  // VP3 macroblock inter score
  input  logic               vp3_mbp_start,
  input  logic               vp3_mbp_in_valid,
  input  logic [3:0]         vp3_mbp_coded_mask,
  input  logic               vp3_mbp_ref_offset_zero,
  input  logic [7:0]         vp3_mbp_src,
  input  logic [7:0]         vp3_mbp_ref1,
  input  logic [7:0]         vp3_mbp_ref2,
  output logic               vp3_mbp_done,
  output logic [31:0]        vp3_mbp_err,
  // VP3 coefficient store clearing
  input  logic               vp3_clr_enable,
  input  logic [31:0]        vp3_clr_datain,
  output logic [31:0]        vp3_clr_dataout,
  output logic [31:0]        vp3_clr_addr,
  output logic               vp3_clr_output_data_ready,
  output logic               vp3_clr_busy,
  input  logic               vp3_mbd_start,
  input  logic signed [7:0]  vp3_mbd_mv_x,
  input  logic signed [7:0]  vp3_mbd_mv_y,
  input  logic [2:0]         vp3_mbd_mv_divisor,
  input  logic               vp3_mbd_golden,
  input  logic [19:0]        vp3_mbd_frag_pos,
  input  logic [19:0]        vp3_mbd_src_base,
  input  logic [19:0]        vp3_mbd_last_base,
  input  logic [19:0]        vp3_mbd_golden_base,
  output logic               vp3_mbd_busy,
  output logic               vp3_mbd_rd_en,
  output logic [19:0]        vp3_mbd_src_addr,
  output logic [19:0]        vp3_mbd_ref1_addr,
  output logic [19:0]        vp3_mbd_ref2_addr,
  input  logic [7:0]         vp3_mbd_src_data,
  input  logic [7:0]         vp3_mbd_ref1_data,
  input  logic [7:0]         vp3_mbd_ref2_data,
  output logic               vp3_mbd_half,
  output logic               vp3_mbd_out_valid,
  output logic signed [8:0]  vp3_mbd_diff,
  input  logic               vp3_pi_start,
  output logic               vp3_pi_busy,
  output logic               vp3_pi_wr,
  output logic [15:0]        vp3_pi_mb_index,
  output logic [3:0]         vp3_pi_mode,
  output logic               vp3_pi_done,
  input  logic               vp3_fmv_start,
  input  logic [19:0]        vp3_fmv_src_pos,
  input  logic [19:0]        vp3_fmv_ref_pos,
  output logic               vp3_fmv_busy,
  output logic               vp3_fmv_rd_en,
  output logic [19:0]        vp3_fmv_src_addr,
  output logic [19:0]        vp3_fmv_ref_addr,
  input  logic [7:0]         vp3_fmv_src_data,
  input  logic [7:0]         vp3_fmv_ref_data,
  output logic               vp3_fmv_done,
  output logic [13:0]        vp3_fmv_best_sad,
  output logic signed [7:0]  vp3_fmv_mv_x,
  output logic signed [7:0]  vp3_fmv_mv_y
);
  jpeg_encoder u_jpeg (
    .clk, .ena(jpeg_ena), .rst, .dstrb(jpeg_dstrb), .din(jpeg_din),
    .qnt_val(jpeg_qnt_val), .qnt_cnt(jpeg_qnt_cnt), .size(jpeg_size),
    .rlen(jpeg_rlen), .amp(jpeg_amp), .douten(jpeg_douten), .dc(jpeg_dc),
    .dct_dout(jpeg_dct_dout), .dct_den(jpeg_dct_den)
  );

  mac_controller u_mac (
    .clk, .rst, .tx_enable(mac_tx_enable), .rx_enable(mac_rx_enable),
    .tx_wr(mac_tx_wr), .tx_data(mac_tx_data), .tx_start(mac_tx_start),
    .tx_full(mac_tx_full), .txd(mac_txd), .tx_en(mac_tx_en),
    .tx_busy(mac_tx_busy), .tx_done(mac_tx_done), .rxd(mac_rxd),
    .rx_dv(mac_rx_dv), .rx_rd(mac_rx_rd), .rx_data(mac_rx_data),
    .rx_empty(mac_rx_empty), .rx_frame_ok(mac_rx_frame_ok),
    .rx_frame_err(mac_rx_frame_err)
  );

  fir_top u_fir (
    .clk, .reset(rst), .in_valid(fir_in_valid), .sample(fir_sample),
    .output_data_ready(fir_output_data_ready), .result(fir_result),
    .state(fir_state)
  );

  fft_module u_fft (
    .clk, .reset(rst), .in_real(fft_in_real), .in_imag(fft_in_imag),
    .data_valid(fft_data_valid), .data_ack(fft_data_ack),
    .out_real(fft_out_real), .out_imag(fft_out_imag),
    .data_req(fft_data_req), .data_ready(fft_data_ready)
  );

  circ_buf u_fifo (
    .clk, .reset(rst), .read_fifo(fifo_read), .write_fifo(fifo_write),
    .data_in(fifo_data_in), .data_out(fifo_data_out), .full(fifo_full),
    .empty(fifo_empty)
  );

  vp3_transform_quantize u_vp3_tq (
    .clk, .rst, .mode(vp3_tq_mode), .in_valid(vp3_tq_in_valid),
    .in_ready(vp3_tq_in_ready), .src(vp3_tq_src), .ref1(vp3_tq_ref1),
    .ref2(vp3_tq_ref2), .qrecip(vp3_tq_qrecip), .out_valid(vp3_tq_out_valid),
    .out_first(vp3_tq_out_first), .qcoef(vp3_tq_qcoef)
  );

  vp3_get_sum_abs_diffs u_vp3_sad (
    .clk, .rst, .start(vp3_sad_start), .in_valid(vp3_sad_in_valid),
    .src(vp3_sad_src), .ref_pix(vp3_sad_ref), .done(vp3_sad_done),
    .sad(vp3_sad_sad)
  );

  vp3_get_half_pixel_sad u_vp3_hp (
    .clk, .rst, .start(vp3_hp_start), .in_valid(vp3_hp_in_valid),
    .ref_offset_zero(vp3_hp_ref_offset_zero), .src(vp3_hp_src),
    .ref1(vp3_hp_ref1), .ref2(vp3_hp_ref2), .err_so_far(vp3_hp_err_so_far),
    .best_so_far(vp3_hp_best_so_far), .active(vp3_hp_active),
    .done(vp3_hp_done), .early(vp3_hp_early), .sad(vp3_hp_sad)
  );

  vp3_get_mb_intra_error u_vp3_mbi (
    .clk, .rst, .start(vp3_mbi_start), .in_valid(vp3_mbi_in_valid),
    .coded_mask(vp3_mbi_coded_mask), .pix(vp3_mbi_pix),
    .done(vp3_mbi_done), .err(vp3_mbi_err)
  );

  vp3_get_mb_inter_error u_vp3_mbp (
    .clk, .rst, .start(vp3_mbp_start), .in_valid(vp3_mbp_in_valid),
    .coded_mask(vp3_mbp_coded_mask), .ref_offset_zero(vp3_mbp_ref_offset_zero),
    .src(vp3_mbp_src), .ref1(vp3_mbp_ref1), .ref2(vp3_mbp_ref2),
    .done(vp3_mbp_done), .err(vp3_mbp_err)
  );

  vp3_clear_down_qfrag_data u_vp3_clr (
    .clk, .reset(rst), .enable(vp3_clr_enable), .datain(vp3_clr_datain),
    .dataout(vp3_clr_dataout), .addr(vp3_clr_addr),
    .output_data_ready(vp3_clr_output_data_ready), .busy(vp3_clr_busy)
  );

  vp3_motion_block_difference u_vp3_mbd (
    .clk, .rst, .start(vp3_mbd_start), .mv_x(vp3_mbd_mv_x), .mv_y(vp3_mbd_mv_y),
    .mv_divisor(vp3_mbd_mv_divisor), .golden(vp3_mbd_golden), .frag_pos(vp3_mbd_frag_pos),
    .src_base(vp3_mbd_src_base), .last_base(vp3_mbd_last_base), .golden_base(vp3_mbd_golden_base),
    .busy(vp3_mbd_busy), .rd_en(vp3_mbd_rd_en), .src_addr(vp3_mbd_src_addr),
    .ref1_addr(vp3_mbd_ref1_addr), .ref2_addr(vp3_mbd_ref2_addr), .src_data(vp3_mbd_src_data),
    .ref1_data(vp3_mbd_ref1_data), .ref2_data(vp3_mbd_ref2_data), .half(vp3_mbd_half),
    .out_valid(vp3_mbd_out_valid), .diff(vp3_mbd_diff)
  );

  vp3_pick_intra u_vp3_pi (
    .clk, .reset(rst), .start(vp3_pi_start), .busy(vp3_pi_busy), .wr(vp3_pi_wr),
    .mb_index(vp3_pi_mb_index), .mode(vp3_pi_mode), .done(vp3_pi_done)
  );

  vp3_four_mv_exhaustive_search u_vp3_fmv (
    .clk, .rst, .start(vp3_fmv_start), .src_pos(vp3_fmv_src_pos), .ref_pos(vp3_fmv_ref_pos),
    .busy(vp3_fmv_busy), .rd_en(vp3_fmv_rd_en), .src_addr(vp3_fmv_src_addr),
    .ref_addr(vp3_fmv_ref_addr), .src_data(vp3_fmv_src_data), .ref_data(vp3_fmv_ref_data),
    .done(vp3_fmv_done), .best_sad(vp3_fmv_best_sad), .mv_x(vp3_fmv_mv_x), .mv_y(vp3_fmv_mv_y)
  );
endmodule
