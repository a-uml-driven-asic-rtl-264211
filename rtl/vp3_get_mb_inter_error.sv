// vp3_get_mb_inter_error: prediction mismatch score of a macroblock, the
// sum of the inter block scores of its four 8x8 luma blocks.
//
// Interface: `start` begins a macroblock; the four blocks follow back to
// back, 64 source pixels each with their one or two reference pixels, with
// in_valid. `ref_offset_zero` selects one-reference or averaged
// two-reference prediction for the whole macroblock (held). `coded_mask[b]` (held for the
// macroblock) says whether block b is inside the displayed frame; blocks
// with a clear bit are streamed but not counted. Two clocks after the last
// pixel `done` pulses with `err`, the sum of the counted block scores.
// Synchronous active-high reset.
//
// The per-block inter variance unit and the summing over the four luma blocks
// follow the document's description; the mask input standing for the
// software's fragment-visibility test is this design's interface.
module vp3_get_mb_inter_error (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        in_valid,
  input  logic  [3:0] coded_mask,
  input  logic        ref_offset_zero,
  input  logic  [7:0] src,
  input  logic  [7:0] ref1,
  input  logic  [7:0] ref2,
  output logic        done,
  output logic [31:0] err
);
  logic        blk_start, blk_done;
  logic [29:0] blk_err;
  logic [1:0]  blk_out;
  logic [5:0]  pix_cnt;
  logic [31:0] acc;

  // the block unit is restarted at every block boundary
  assign blk_start = start || (in_valid && pix_cnt == 6'd0);

  vp3_get_inter_err u_blk (
    .clk, .rst, .start(blk_start), .in_valid, .ref_offset_zero,
    .src, .ref1, .ref2, .done(blk_done), .err(blk_err)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      pix_cnt <= '0;
      blk_out <= '0;
      acc     <= '0;
      done    <= 1'b0;
      err     <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        pix_cnt <= '0;
          blk_out <= '0;
        acc     <= '0;
      end
      if (in_valid) begin
        pix_cnt <= (start ? 6'd0 : pix_cnt) + 6'd1;
      end
      if (blk_done) begin
        blk_out <= blk_out + 2'd1;
        if (blk_out == 2'd3) begin
          err  <= acc + (coded_mask[blk_out] ? 32'(blk_err) : 32'd0);
          done <= 1'b1;
          acc  <= '0;
        end else begin
          acc <= acc + (coded_mask[blk_out] ? 32'(blk_err) : 32'd0);
        end
      end
    end
  end
endmodule
