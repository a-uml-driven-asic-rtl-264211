// vp3_quantize: quantises the 64 DCT coefficients of a block and reorders
// them into zig-zag order for the token coder.
//
// How it works: each coefficient c arrives with its quantiser reciprocal
// r = round(65536 / Q). The magnitude is scaled, q = (|c| * r + 32768) >> 16,
// limited to QMAX and given the sign of c, then written into one half of a
// 2 x 64 entry buffer at its raster position. After the 64th coefficient the
// halves swap and the finished block is read out in zig-zag order, one
// value per clock, while the next block can already be written.
//
// Interface: in_valid, coef (signed 16-bit, raster order), recip (16-bit).
// Output: out_valid with qcoef (signed 10-bit) for 64 consecutive clocks,
// starting two clocks after the block's last input; out_first marks the DC
// value. A new block must not finish before the previous one has been read
// out (64 clocks), which holds for any source of one value per clock.
// Synchronous active-high reset.
//
// From the document: multiplication by a reciprocal instead of division,
// limit of +-511 and zig-zag output. The rounding constant and the buffer
// scheme are this design's choices.
module vp3_quantize
  import dct_pkg::*;
#(
  parameter int QMAX = 511
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic signed [15:0] coef,
  input  logic        [15:0] recip,
  output logic              out_valid,
  output logic              out_first,
  output logic signed [9:0] qcoef
);
  typedef logic [5:0] zz_tab_t [64];

  function automatic zz_tab_t make_zz();
    zz_tab_t t;
    for (int n = 0; n < 64; n++) t[n] = 6'(zigzag_raster(n));
    return t;
  endfunction

  localparam zz_tab_t ZZ = make_zz();

  logic signed [9:0] buffer [128];
  logic        [5:0] in_cnt, out_cnt;
  logic              wbank, rbank, reading;
  logic       [15:0] mag;
  logic       [16:0] q_full;
  logic        [9:0] q_mag;
  logic signed [9:0] q_val;

  assign mag    = coef[15] ? 16'(-coef) : 16'(coef);
  assign q_full = 17'((33'(mag) * 33'(recip) + 33'd32768) >> 16);
  assign q_mag  = (q_full > 17'(QMAX)) ? 10'(QMAX) : q_full[9:0];
  assign q_val  = coef[15] ? -$signed(q_mag) : $signed(q_mag);

  always_ff @(posedge clk) begin
    if (in_valid) buffer[{wbank, in_cnt}] <= q_val;
    qcoef <= buffer[{rbank, ZZ[out_cnt]}];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_cnt    <= '0;
      out_cnt   <= '0;
      wbank     <= 1'b0;
      rbank     <= 1'b0;
      reading   <= 1'b0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
    end else begin
      out_valid <= reading;
      out_first <= reading && out_cnt == 6'd0;
      if (reading) begin
        out_cnt <= out_cnt + 6'd1;
        if (out_cnt == 6'd63) reading <= 1'b0;
      end
      if (in_valid) begin
        in_cnt <= in_cnt + 6'd1;
        if (in_cnt == 6'd63) begin
          wbank   <= ~wbank;
          rbank   <= wbank;
          reading <= 1'b1;
          out_cnt <= '0;
        end
      end
    end
  end
endmodule
