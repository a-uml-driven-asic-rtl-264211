// vp3_pick_intra: sets the coding mode of every macroblock of a frame to
// intra, as done for key frames.
//
// How it works: after `start` a walker visits the frame superblock by
// superblock, superblocks in raster order, and inside each superblock its
// 2x2 macroblocks in raster order (top-left, top-right, bottom-left,
// bottom-right). A superblock on the right or bottom edge of a frame whose
// size is not a multiple of two macroblocks is only partly inside; its
// outside macroblocks are skipped. For each macroblock inside the frame one
// write is issued to the macroblock mode table: `wr` high for one clock
// with `mb_index` (row * MB_COLS + column) and `mode` = CODE_INTRA.
//
// Interface and timing: one superblock position per clock, so a frame takes
// 4 * ceil(MB_COLS/2) * ceil(MB_ROWS/2) clocks. busy is high from the clock
// after start until the walk ends; `done` pulses as the walk ends. A
// start while busy is ignored. Synchronous active-high reset. `mode` only
// ever carries CODE_INTRA, so its bits that are zero in that code stay
// constant; that is the block's function, not an omission.
//
// From the document: the walk through every block of every superblock and
// the setting of each macroblock's mode to intra. The mode table interface,
// the order inside a superblock, the code value 1 for intra and the frame
// size (CIF, 22 x 18 macroblocks) are this design's choices.
module vp3_pick_intra #(
  parameter int MB_COLS = 22,
  parameter int MB_ROWS = 18,
  parameter logic [3:0] CODE_INTRA = 4'd1
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        start,
  output logic        busy,
  output logic        wr,
  output logic [15:0] mb_index,
  output logic [3:0]  mode,
  output logic        done
);
  localparam int SB_COLS = (MB_COLS + 1) / 2;
  localparam int SB_ROWS = (MB_ROWS + 1) / 2;

  logic [15:0] sb_col, sb_row;
  logic [1:0]  sub;
  logic [15:0] mb_x, mb_y;
  logic        last;

  assign mb_x = 16'(sb_col * 2) + 16'(sub[0]);
  assign mb_y = 16'(sb_row * 2) + 16'(sub[1]);
  assign last = (sub == 2'd3) && (sb_col == 16'(SB_COLS - 1)) && (sb_row == 16'(SB_ROWS - 1));

  always_ff @(posedge clk) begin
    if (reset) begin
      busy     <= 1'b0;
      wr       <= 1'b0;
      done     <= 1'b0;
      mb_index <= '0;
      mode     <= '0;
      sb_col   <= '0;
      sb_row   <= '0;
      sub      <= '0;
    end else begin
      wr   <= 1'b0;
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        sb_col <= '0;
        sb_row <= '0;
        sub    <= '0;
      end else if (busy) begin
        if (mb_x < 16'(MB_COLS) && mb_y < 16'(MB_ROWS)) begin
          wr       <= 1'b1;
          mb_index <= 16'(mb_y * 16'(MB_COLS) + mb_x);
          mode     <= CODE_INTRA;
        end
        sub <= sub + 1'b1;
        if (sub == 2'd3) begin
          if (sb_col == 16'(SB_COLS - 1)) begin
            sb_col <= '0;
            sb_row <= sb_row + 1'b1;
          end else begin
            sb_col <= sb_col + 1'b1;
          end
        end
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
