// vp3_get_next_sum_abs_diffs: sum of absolute differences with an early
// exit, used by the motion search to abandon candidates that are already
// worse than the best one found.
//
// Interface: `start` clears the block; 64 pixel pairs follow with in_valid
// in raster order. After each row of 8 pairs the running total plus
// err_so_far is compared with best_so_far; if it is larger the block is
// abandoned: `done` pulses with `early` = 1 and `sad` holding the partial
// total (err_so_far + rows so far). Otherwise `done` pulses after the 64th
// pair with the full total. `active` is high from start until done, so a
// feeder can stop supplying pixels of an abandoned block; pairs arriving
// while inactive are ignored. `done` comes one clock after the deciding
// pair. Synchronous active-high reset.
//
// The document gives the breakout clause; checking it once per row and
// adding err_so_far (the cost of blocks already summed in a macroblock)
// are this design's reading of it.
module vp3_get_next_sum_abs_diffs #(
  parameter int BLOCK_PIX = 64,
  parameter int ROW_PIX   = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        in_valid,
  input  logic  [7:0] src,
  input  logic  [7:0] ref_pix,
  input  logic [15:0] err_so_far,
  input  logic [15:0] best_so_far,
  output logic        active,
  output logic        done,
  output logic        early,
  output logic [15:0] sad
);
  logic [15:0] acc, acc_base, acc_next;
  logic [6:0]  cnt, cnt_base;
  logic [7:0]  ad;
  logic        take;

  assign ad       = (src > ref_pix) ? src - ref_pix : ref_pix - src;
  assign acc_base = start ? err_so_far : acc;
  assign cnt_base = start ? '0 : cnt;
  assign acc_next = acc_base + 16'(ad);
  assign take     = in_valid && (active || start);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc    <= '0;
      cnt    <= '0;
      active <= 1'b0;
      done   <= 1'b0;
      early  <= 1'b0;
      sad    <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        acc    <= err_so_far;
        cnt    <= '0;
        active <= 1'b1;
      end
      if (take) begin
        acc <= acc_next;
        cnt <= cnt_base + 7'd1;
        if (cnt_base == 7'(BLOCK_PIX - 1)) begin
          sad    <= acc_next;
          early  <= 1'b0;
          done   <= 1'b1;
          active <= 1'b0;
        end else if (cnt_base[2:0] == 3'(ROW_PIX - 1) && acc_next > best_so_far) begin
          sad    <= acc_next;
          early  <= 1'b1;
          done   <= 1'b1;
          active <= 1'b0;
        end
      end
    end
  end
endmodule
