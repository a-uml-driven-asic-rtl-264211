// vp3_fdct_short: 8x8 forward DCT of a block of 16-bit residuals, as used
// before quantisation in the encoder.
//
// How it works: the 64 inputs are stored; then every output coefficient
// F(u,v) = 1/4 C(u) C(v) sum_xy f(x,y) cos((2x+1)u pi/16) cos((2y+1)v pi/16)
// is computed with one multiply-accumulate per clock (64 clocks per
// coefficient, 4096 per block). The weights come from two 8x8 cosine
// tables in Q12 (shared with the JPEG DCT) multiplied and rounded to Q12.
//
// Interface: in_valid with din (signed, raster order x fastest) while
// `ready` is high; after the 64th input `ready` drops. Coefficients leave in
// raster order (u fastest) with out_valid, one every 64 clocks; the last one
// raises `ready` again on the following clock. Result: round(F) clipped to
// DOUT_W bits. Synchronous active-high reset.
//
// The document only names the transform. The orthonormal DCT scaling, the
// rounding and the serial single-multiplier structure are this design's
// choices; the software's butterfly factorisation is not reproduced.
module vp3_fdct_short
  import dct_pkg::*;
#(
  parameter int DIN_W  = 16,
  parameter int DOUT_W = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [DIN_W-1:0]  din,
  output logic                     ready,
  output logic                     out_valid,
  output logic signed [DOUT_W-1:0] dout
);
  localparam int ACC_W = DIN_W + 15 + 6;
  typedef logic signed [13:0] cos_t;
  typedef cos_t cos_tab_t [64];

  function automatic cos_tab_t make_tab();
    cos_tab_t t;
    for (int u = 0; u < 8; u++)
      for (int x = 0; x < 8; x++) t[u*8+x] = 14'(basis(u, x));
    return t;
  endfunction

  localparam cos_tab_t COS_TAB = make_tab();

  logic signed [DIN_W-1:0] buffer [64];
  logic        [5:0]       in_cnt, coef, pos;
  logic                    busy;
  logic signed [ACC_W-1:0] acc, acc_next, rnd;
  logic signed [27:0]      w_full;
  logic signed [14:0]      w;
  logic signed [ACC_W-1:0] prod;

  // pos = y*8 + x, coef = v*8 + u
  assign w_full   = COS_TAB[{coef[2:0], pos[2:0]}] * COS_TAB[{coef[5:3], pos[5:3]}];
  assign w        = 15'((w_full + 28'sd2048) >>> 12);
  assign prod     = ACC_W'(buffer[pos]) * ACC_W'(w);
  assign acc_next = acc + prod;
  assign rnd      = (acc_next + (ACC_W'(1) <<< 13)) >>> 14;
  assign ready    = !busy;

  always_ff @(posedge clk) begin
    if (in_valid && !busy) buffer[in_cnt] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_cnt    <= '0;
      coef      <= '0;
      pos       <= '0;
      busy      <= 1'b0;
      acc       <= '0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          in_cnt <= in_cnt + 6'd1;
          if (in_cnt == 6'd63) begin
            busy <= 1'b1;
            coef <= '0;
            pos  <= '0;
            acc  <= '0;
          end
        end
      end else begin
        pos <= pos + 6'd1;
        if (pos == 6'd63) begin
          acc       <= '0;
          out_valid <= 1'b1;
          if (rnd > ACC_W'(2**(DOUT_W-1) - 1))   dout <= DOUT_W'(2**(DOUT_W-1) - 1);
          else if (rnd < -ACC_W'(2**(DOUT_W-1))) dout <= DOUT_W'(-(2**(DOUT_W-1)));
          else                                   dout <= DOUT_W'(rnd);
          coef <= coef + 6'd1;
          if (coef == 6'd63) busy <= 1'b0;
        end else begin
          acc <= acc_next;
        end
      end
    end
  end
endmodule
