// vp3_get_half_pixel_sad: matching cost of a source block against a
// half-pixel reference position, with the same early exit as the full-pixel
// search.
//
// Interface: as vp3_get_next_sum_abs_diffs, but each source pixel comes with
// two reference pixels. `ref_offset_zero` (held for the block) says the
// second reference coincides with the first; then the first reference is
// used alone, otherwise the truncated average (ref1 + ref2) >> 1 is the
// reference. The averaging stage is combinational, so timing equals the
// contained SAD unit: done one clock after the deciding pair.
//
// From the document: a zero reference offset falls back to the plain
// breakout SAD, otherwise two references are interpolated. The shared SAD
// instance for both cases is this design's choice.
module vp3_get_half_pixel_sad (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        in_valid,
  input  logic        ref_offset_zero,
  input  logic  [7:0] src,
  input  logic  [7:0] ref1,
  input  logic  [7:0] ref2,
  input  logic [15:0] err_so_far,
  input  logic [15:0] best_so_far,
  output logic        active,
  output logic        done,
  output logic        early,
  output logic [15:0] sad
);
  logic [7:0] ref_pix;

  assign ref_pix  = ref_offset_zero ? ref1 : 8'(({1'b0, ref1} + {1'b0, ref2}) >> 1);

  vp3_get_next_sum_abs_diffs u_sad (
    .clk, .rst, .start, .in_valid, .src, .ref_pix,
    .err_so_far, .best_so_far, .active, .done, .early, .sad
  );
endmodule
