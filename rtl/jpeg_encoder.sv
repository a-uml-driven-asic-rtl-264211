// jpeg_encoder: JPEG encoder core, DCT -> quantisation and rounding (QNR) ->
// run-length encoder (RLE), the three main blocks named in the document.
//
// Interface: a pulse on dstrb with the first pixel starts a stream of 8-bit
// pixels on din, one per cycle with ena high, in 8x8 blocks in raster order.
// The encoder reads the quantisation table through qnt_cnt (coefficient
// position, zig-zag order) and qnt_val (the table entry, same cycle). It
// emits (rlen, size, amp) symbols with douten; dc marks the DC symbol of each
// block. dct_dout/dct_den expose the zig-zag DCT coefficients. Throughput is
// one pixel per cycle. A block's first symbol leaves about 68 cycles after its
// first pixel (64 to collect the block, then the QNR and RLE stages).
module jpeg_encoder (
  input  logic               clk,
  input  logic               ena,
  input  logic               rst,
  input  logic               dstrb,
  input  logic [7:0]         din,
  input  logic [7:0]         qnt_val,
  output logic [5:0]         qnt_cnt,
  output logic [3:0]         size,
  output logic [3:0]         rlen,
  output logic [11:0]        amp,
  output logic               douten,
  output logic               dc,
  output logic signed [10:0] dct_dout,
  output logic               dct_den
);
  logic               dct_first;
  logic signed [10:0] q_dout;
  logic               q_den, q_first;

  jpeg_dct #(.DOUT_W(11)) u_dct (
    .clk, .ena, .rst, .dstrb, .din,
    .dout(dct_dout), .douten(dct_den), .dfirst(dct_first)
  );

  jpeg_qnr #(.D_W(11)) u_qnr (
    .clk, .ena, .rst,
    .din(dct_dout), .den(dct_den), .dfirst(dct_first),
    .qnt_val, .qnt_cnt,
    .dout(q_dout), .douten(q_den), .dfirst_o(q_first)
  );

  jpeg_rle #(.D_W(11), .STAGES(4)) u_rle (
    .clk, .ena, .rst,
    .din(q_dout), .den(q_den), .dfirst(q_first),
    .rlen, .size, .amp, .douten, .dc_o(dc)
  );
endmodule
