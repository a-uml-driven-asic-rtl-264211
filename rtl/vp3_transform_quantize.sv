// vp3_transform_quantize: transform and quantisation path of one 8x8 block
// of the video encoder: block difference, forward DCT, quantiser.
//
// How it works: the coding mode picks the difference unit: intra blocks
// have 128 removed (vp3_sub8_128), full-pixel predicted blocks subtract the
// reference (vp3_sub8), half-pixel predicted blocks subtract the average of
// two references (vp3_sub8av2). The residual goes through vp3_fdct_short;
// each coefficient is quantised with the reciprocal of its quantiser entry
// and the block leaves in zig-zag order from vp3_quantize.
//
// Interface: `mode` (MODE_INTRA, MODE_INTER, MODE_HALF) is held for a block.
// Pixels (src, ref1, ref2) enter with in_valid while in_ready is high, 64
// per block in raster order; in_ready falls after the 64th and rises again
// when the DCT has finished the block (about 4100 clocks). qrecip[i] holds
// round(65536 / Q[i]) for raster position i and is read while the block is
// transformed. Output: out_valid for 64 clocks with qcoef in zig-zag order,
// out_first on the DC value. Synchronous active-high reset.
//
// The three difference paths, DCT and quantiser follow the document's
// description of TransformQuantizeBlock. Choosing the half-pixel path from a
// mode input rather than from motion vector arithmetic on frame pointers is
// this design's simplification; the pointer arithmetic needs the frame
// store, which is outside this block.
module vp3_transform_quantize #(
  parameter int QMAX = 511
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [1:0]        mode,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [7:0]        src,
  input  logic [7:0]        ref1,
  input  logic [7:0]        ref2,
  input  logic [63:0][15:0] qrecip,
  output logic              out_valid,
  output logic              out_first,
  output logic signed [9:0] qcoef
);
  localparam logic [1:0] MODE_INTRA = 2'd0;
  localparam logic [1:0] MODE_INTER = 2'd1;

  logic              take, filled;
  logic [5:0]        pix_cnt, coef_cnt;
  logic              v_intra, v_inter, v_half, res_valid;
  logic signed [8:0] d_intra, d_inter, d_half, res;
  logic              dct_ready, dct_valid;
  logic signed [15:0] dct_out;

  assign take     = in_valid && in_ready;
  assign in_ready = dct_ready && !filled;

  // one difference unit per coding mode; only the selected one is fed
  vp3_sub8_128 u_intra (
    .clk, .rst, .in_valid(take && mode == MODE_INTRA), .src,
    .out_valid(v_intra), .diff(d_intra)
  );
  vp3_sub8 u_inter (
    .clk, .rst, .in_valid(take && mode == MODE_INTER), .src, .ref_pix(ref1),
    .out_valid(v_inter), .diff(d_inter)
  );
  vp3_sub8av2 u_half (
    .clk, .rst, .in_valid(take && !(mode inside {MODE_INTRA, MODE_INTER})),
    .src, .ref1, .ref2, .out_valid(v_half), .diff(d_half)
  );

  always_comb begin
    res_valid = v_intra || v_inter || v_half;
    if (v_intra)      res = d_intra;
    else if (v_inter) res = d_inter;
    else              res = d_half;
  end

  vp3_fdct_short u_fdct (
    .clk, .rst, .in_valid(res_valid), .din(16'(res)),
    .ready(dct_ready), .out_valid(dct_valid), .dout(dct_out)
  );

  vp3_quantize #(.QMAX(QMAX)) u_quant (
    .clk, .rst, .in_valid(dct_valid), .coef(dct_out), .recip(qrecip[coef_cnt]),
    .out_valid, .out_first, .qcoef
  );

  // `filled` closes the input between the 64th pixel and the DCT going busy
  always_ff @(posedge clk) begin
    if (rst) begin
      pix_cnt  <= '0;
      coef_cnt <= '0;
      filled   <= 1'b0;
    end else begin
      if (take) begin
        pix_cnt <= pix_cnt + 6'd1;
        if (pix_cnt == 6'd63) filled <= 1'b1;
      end
      if (filled && !dct_ready) filled <= 1'b0;
      if (dct_valid) coef_cnt <= coef_cnt + 6'd1;
    end
  end
endmodule
