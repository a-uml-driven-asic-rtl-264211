// vp3_sub8av2: block difference against a half-pixel reference, i.e. the
// source pixel minus the average of two reference pixels, one pixel per
// clock.
//
// Interface: in_valid with src, ref1 and ref2 (unsigned 8-bit); one clock
// later out_valid with diff = src - ((ref1 + ref2) >> 1) (signed 9-bit).
// The average truncates, as an integer shift does in the software model.
// Synchronous active-high reset clears out_valid.
//
// From the document: the difference uses two pixel values for fractional
// motion vectors. Truncating average and streaming interface are this
// design's choices.
module vp3_sub8av2 (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic        [7:0] src,
  input  logic        [7:0] ref1,
  input  logic        [7:0] ref2,
  output logic              out_valid,
  output logic signed [8:0] diff
);

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    if (in_valid) diff <= $signed({1'b0, src}) - $signed({1'b0, 8'(({1'b0, ref1} + {1'b0, ref2}) >> 1)});
  end
endmodule
