// vp3_sub8_128: removes the 128 offset from every pixel of an intra coded
// 8x8 block before the forward DCT, one pixel per clock.
//
// Interface: in_valid with an unsigned 8-bit pixel; one clock later
// out_valid with diff = src - 128 (signed 9-bit). No block state is kept.
// Synchronous active-high reset clears out_valid.
//
// The subtraction of 128 is the document's; the streaming interface and the
// output register are this design's choices.
module vp3_sub8_128 (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic        [7:0] src,
  output logic              out_valid,
  output logic signed [8:0] diff
);
  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    // inverting the MSB gives pixel - 128; the sign bit is copied once more
    if (in_valid) diff <= $signed({~src[7], ~src[7], src[6:0]});
  end
endmodule
