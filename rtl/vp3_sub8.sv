// vp3_sub8: block difference between a source 8x8 block and a reference
// block, one pixel pair per clock.
//
// Interface: in_valid with src/ref pixels (unsigned 8-bit); one clock later
// out_valid with diff = src - ref (signed 9-bit), the value handed to the
// forward DCT. Pixels arrive in raster order; the module keeps no block
// state, so blocks may follow each other without gaps. Synchronous
// active-high reset clears out_valid only.
//
// Follows the description of the SUB8 leaf (difference of every pixel of two
// blocks). The pixel-serial streaming interface and the output register are
// choices of this design; the software version walks two frame pointers.
module vp3_sub8 (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic        [7:0] src,
  input  logic        [7:0] ref_pix,
  output logic              out_valid,
  output logic signed [8:0] diff
);
  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    if (in_valid) diff <= $signed({1'b0, src}) - $signed({1'b0, ref_pix});
  end
endmodule
