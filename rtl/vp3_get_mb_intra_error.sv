// vp3_get_mb_intra_error: intra activity score of a macroblock, the sum of
// the block scores of its four 8x8 luma blocks.
//
// Interface: `start` begins a macroblock; the four blocks follow back to
// back, 64 pixels each, with in_valid. `coded_mask[b]` (held for the
// macroblock) says whether block b is inside the displayed frame; blocks
// with a clear bit are streamed but not counted. Two clocks after the last
// pixel `done` pulses with `err`, the sum of the counted block scores.
// Synchronous active-high reset.
//
// The per-block variance unit and the summing over the four luma blocks
// follow the document's description; the mask input standing for the
// software's fragment-visibility test is this design's interface.
module vp3_get_mb_intra_error (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        in_valid,
  input  logic  [3:0] coded_mask,
  input  logic  [7:0] pix,
  output logic        done,
  output logic [29:0] err
);
  logic        blk_start, blk_done;
  logic [27:0] blk_err;
  logic [1:0]  blk_out;
  logic [5:0]  pix_cnt;
  logic [29:0] acc;

  // the block unit is restarted at every block boundary
  assign blk_start = start || (in_valid && pix_cnt == 6'd0);

  vp3_get_intra_error u_blk (
    .clk, .rst, .start(blk_start), .in_valid, .pix, .done(blk_done), .err(blk_err)
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
          err  <= acc + (coded_mask[blk_out] ? 30'(blk_err) : 30'd0);
          done <= 1'b1;
          acc  <= '0;
        end else begin
          acc <= acc + (coded_mask[blk_out] ? 30'(blk_err) : 30'd0);
        end
      end
    end
  end
endmodule
