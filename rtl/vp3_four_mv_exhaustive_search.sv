// vp3_four_mv_exhaustive_search: full-pixel exhaustive motion search for one
// 8x8 luma block, the per-block search of the four-vector mode.
//
// How it works: the search window reaches MAX_MV_EXTENT half pixels, that
// is R = MAX_MV_EXTENT / 2 whole pixels, in each direction around the
// block's own position in the reference frame. Every one of the (2R+1)^2
// candidate positions is visited, rows of candidates from top to bottom and
// left to right in each row. For each one the 64 pixel pairs are read and
// summed by vp3_get_sum_abs_diffs; a candidate replaces the best one only
// if its sum is strictly smaller, so on ties the first one visited wins.
// Reads run back to back: one pixel pair per clock, 64 clocks per candidate.
//
// Interface and timing: `start` takes src_pos (pixel address of the block's
// top-left corner in the current frame) and ref_pos (the same position in
// the reference frame). The unit reads memory with rd_en, src_addr and
// ref_addr; the memory answers on src_data and ref_data one clock after
// rd_en. After the last candidate `done` pulses with best_sad and the
// vector (mv_x, mv_y) in half-pixel units (always even here). busy is high
// from start until done. Synchronous active-high reset.
//
// From the document: the reference pointer set back by the maximum vector
// extent, the traversal of the whole range with a sum of absolute
// differences at each point, and keeping the best error and its vector. The
// half-pixel refinement and the final variance score that follow it in the
// document are not part of this unit. The extent of 31 half pixels, the line
// stride and the memory interface are this design's choices.
module vp3_four_mv_exhaustive_search #(
  parameter int ADDR_W        = 20,
  parameter int STRIDE        = 416,
  parameter int MAX_MV_EXTENT = 31
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [ADDR_W-1:0]  src_pos,
  input  logic [ADDR_W-1:0]  ref_pos,
  output logic               busy,
  output logic               rd_en,
  output logic [ADDR_W-1:0]  src_addr,
  output logic [ADDR_W-1:0]  ref_addr,
  input  logic [7:0]         src_data,
  input  logic [7:0]         ref_data,
  output logic               done,
  output logic [13:0]        best_sad,
  output logic signed [7:0]  mv_x,
  output logic signed [7:0]  mv_y
);
  localparam int R = MAX_MV_EXTENT / 2;

  logic                    issuing;
  logic [ADDR_W-1:0]       src0, ref0;
  logic signed [7:0]       cx, cy;          // candidate being read
  logic signed [7:0]       fx, fy;          // candidate being summed
  logic [5:0]              k;               // pixel within the block
  logic                    rd_d, first_q, first_d, last_q;
  logic                    sad_done;
  logic [13:0]             sad;
  logic                    have_best;
  logic signed [7:0]       cx_q, cy_q, cx_at_first, cy_at_first;

  vp3_get_sum_abs_diffs u_sad (
    .clk, .rst, .start(rd_d && first_d), .in_valid(rd_d), .src(src_data), .ref_pix(ref_data),
    .done(sad_done), .sad
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      issuing   <= 1'b0;
      rd_en     <= 1'b0;
      rd_d      <= 1'b0;
      first_q   <= 1'b0;
      first_d   <= 1'b0;
      last_q    <= 1'b0;
      done      <= 1'b0;
      have_best <= 1'b0;
      src0      <= '0;
      ref0      <= '0;
      src_addr  <= '0;
      ref_addr  <= '0;
      cx        <= '0;
      cy        <= '0;
      fx        <= '0;
      fy        <= '0;
      k         <= '0;
      best_sad  <= '0;
      mv_x      <= '0;
      mv_y      <= '0;
    end else begin
      done    <= 1'b0;
      rd_d    <= rd_en;
      first_d <= first_q;
      rd_en   <= 1'b0;
      first_q <= 1'b0;
      if (start && !busy) begin
        busy      <= 1'b1;
        issuing   <= 1'b1;
        have_best <= 1'b0;
        src0      <= src_pos;
        ref0      <= ref_pos - ADDR_W'(R * STRIDE + R);
        cx        <= 8'(-R);
        cy        <= 8'(-R);
        k         <= '0;
      end else if (issuing) begin
        // One read per clock: pixel k of candidate (cx, cy).
        rd_en    <= 1'b1;
        first_q  <= (k == 6'd0);
        src_addr <= src0 + ADDR_W'(32'(k[5:3]) * STRIDE) + ADDR_W'(k[2:0]);
        ref_addr <= ref0 + ADDR_W'(32'(k[5:3]) * STRIDE) + ADDR_W'(k[2:0]);
        k        <= k + 1'b1;
        if (k == 6'd63) begin
          if (cx == 8'(R)) begin
            cx   <= 8'(-R);
            cy   <= cy + 8'sd1;
            ref0 <= ref0 + ADDR_W'(STRIDE - 2 * R);
            if (cy == 8'(R)) issuing <= 1'b0;
          end else begin
            cx   <= cx + 8'sd1;
            ref0 <= ref0 + 1'b1;
          end
        end
      end
      // The candidate whose first pair enters the SAD unit now is the one
      // whose sum will be reported next.
      if (rd_d && first_d) begin
        fx <= cx_at_first;
        fy <= cy_at_first;
      end
      if (sad_done) begin
        if (!have_best || sad < best_sad) begin
          best_sad <= sad;
          mv_x     <= 8'(2 * int'(fx));
          mv_y     <= 8'(2 * int'(fy));
        end
        have_best <= 1'b1;
        last_q    <= (fx == 8'(R)) && (fy == 8'(R));
      end
      if (last_q) begin
        last_q <= 1'b0;
        busy   <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

  // Candidate of the pair now entering the SAD unit, delayed along with the
  // read: captured when its first read is issued, held two clocks.
  always_ff @(posedge clk) begin
    if (rst) begin
      cx_q <= '0; cy_q <= '0; cx_at_first <= '0; cy_at_first <= '0;
    end else begin
      if (issuing && k == 6'd0) begin
        cx_q <= cx;
        cy_q <= cy;
      end
      if (first_q) begin
        cx_at_first <= cx_q;
        cy_at_first <= cy_q;
      end
    end
  end
endmodule
