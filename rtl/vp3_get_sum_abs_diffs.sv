// vp3_get_sum_abs_diffs: sum of absolute differences between a source 8x8
// block and a reference block (the motion search matching cost).
//
// Interface: `start` clears the accumulator; then 64 pixel pairs arrive with
// in_valid in raster order. On the clock that accepts the 64th pair the
// total is registered: `done` pulses one clock later with `sad`
// (0 .. 64*255). start and in_valid in the same clock begin a new block
// with that pair. Synchronous active-high reset.
//
// Follows the description of GetSumAbsDiffs (every pixel visited, absolute
// difference summed). The serial one-pair-per-clock datapath is this
// design's choice.
module vp3_get_sum_abs_diffs #(
  parameter int BLOCK_PIX = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        in_valid,
  input  logic  [7:0] src,
  input  logic  [7:0] ref_pix,
  output logic        done,
  output logic [13:0] sad
);
  logic [13:0] acc;
  logic [6:0]  cnt;
  logic [7:0]  ad;
  logic [13:0] acc_base;
  logic [6:0]  cnt_base;

  assign ad       = (src > ref_pix) ? src - ref_pix : ref_pix - src;
  assign acc_base = start ? '0 : acc;
  assign cnt_base = start ? '0 : cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc  <= '0;
      cnt  <= '0;
      done <= 1'b0;
      sad  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        acc <= '0;
        cnt <= '0;
      end
      if (in_valid) begin
        if (cnt_base == 7'(BLOCK_PIX - 1)) begin
          sad  <= acc_base + 14'(ad);
          done <= 1'b1;
          acc  <= '0;
          cnt  <= '0;
        end else begin
          acc <= acc_base + 14'(ad);
          cnt <= cnt_base + 7'd1;
        end
      end
    end
  end
endmodule
