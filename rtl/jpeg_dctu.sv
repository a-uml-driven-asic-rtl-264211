// jpeg_dctu: one DCT unit (DCTU) computing the coefficient F(V,U) of an 8x8
// block, U being the horizontal and V the vertical frequency.
//
// The block's 64 samples arrive in raster order; sample index k (row y = k/8,
// column x = k%8) selects the basis weight C(U)C(V)cos((2x+1)U pi/16)
// cos((2y+1)V pi/16)/4 from a 64-entry table built at elaboration (the unit's
// cosine table, scaled by 2^16) and the DCT_MAC accumulates sample times
// weight. The result appears on dout one cycle after the 64th sample. The
// split into cosine table plus MAC follows the document; the fixed-point
// scaling is this design's choice.
module jpeg_dctu
  import dct_pkg::*;
#(
  parameter int U      = 0,
  parameter int V      = 0,
  parameter int DOUT_W = 11
) (
  input  logic                     clk,
  input  logic                     ena,
  input  logic                     rst,
  input  logic                     den,
  input  logic [5:0]               k,
  input  logic signed [8:0]        din,
  output logic signed [DOUT_W-1:0] dout
);
  localparam int COEF_W = 15;
  typedef logic signed [COEF_W-1:0] coef_t;

  function automatic coef_t weight(input int idx);
    int p;
    p = basis(U, idx % 8) * basis(V, idx / 8);        // scale 2^24
    return coef_t'((p + (p >= 0 ? 512 : -512)) / 1024); // scale 2^14 (2^16 with /4)
  endfunction

  coef_t cos_table [64];
  initial for (int i = 0; i < 64; i++) cos_table[i] = weight(i);

  jpeg_dct_mac #(.DIN_W(9), .COEF_W(COEF_W), .ACC_W(32), .SHIFT(16), .DOUT_W(DOUT_W)) u_mac (
    .clk, .ena, .rst, .den,
    .first(k == 6'd0),
    .last (k == 6'd63),
    .din,
    .coef (cos_table[k]),
    .dout
  );
endmodule
