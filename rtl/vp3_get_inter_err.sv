// vp3_get_inter_err: mismatch score of a predicted 8x8 block, the
// population variance of the difference between source and reference
// scaled by 64*64.
//
// Interface: `start` clears the sums; 64 pixel triples follow with
// in_valid. `ref_offset_zero` (held for the block) selects one-reference
// prediction (ref1) or two-reference prediction with the truncated average
// (ref1 + ref2) >> 1. One clock after the 64th triple `done` pulses with
//   err = 64 * sum(d^2) - (sum d)^2,  d = src - prediction.
// Synchronous active-high reset.
//
// The two interpolation modes and the variance follow the document; the
// 255 offset it mentions cancels in a variance and is left out. Widths and
// the streaming interface are this design's choices.
module vp3_get_inter_err #(
  parameter int BLOCK_PIX = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        in_valid,
  input  logic        ref_offset_zero,
  input  logic  [7:0] src,
  input  logic  [7:0] ref1,
  input  logic  [7:0] ref2,
  output logic        done,
  output logic [29:0] err
);
  logic        [7:0]  pred;
  logic signed [8:0]  d;
  logic signed [15:0] dsum, dsum_base, dsum_next;
  logic        [23:0] ddsum, ddsum_base, ddsum_next;
  logic        [6:0]  cnt, cnt_base;
  logic signed [29:0] sq;
  logic signed [17:0] dd;

  assign pred       = ref_offset_zero ? ref1 : 8'(({1'b0, ref1} + {1'b0, ref2}) >> 1);
  assign d          = $signed({1'b0, src}) - $signed({1'b0, pred});
  assign dsum_base  = start ? '0 : dsum;
  assign ddsum_base = start ? '0 : ddsum;
  assign cnt_base   = start ? '0 : cnt;
  assign dsum_next  = dsum_base + 16'(d);
  assign dd         = d * d;
  assign ddsum_next = ddsum_base + 24'(unsigned'(dd));
  assign sq         = dsum_next * dsum_next;

  always_ff @(posedge clk) begin
    if (rst) begin
      dsum  <= '0;
      ddsum <= '0;
      cnt   <= '0;
      done  <= 1'b0;
      err   <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        dsum  <= '0;
        ddsum <= '0;
        cnt   <= '0;
      end
      if (in_valid) begin
        if (cnt_base == 7'(BLOCK_PIX - 1)) begin
          err   <= {ddsum_next, 6'd0} - unsigned'(sq);
          done  <= 1'b1;
          dsum  <= '0;
          ddsum <= '0;
          cnt   <= '0;
        end else begin
          dsum  <= dsum_next;
          ddsum <= ddsum_next;
          cnt   <= cnt_base + 7'd1;
        end
      end
    end
  end
endmodule
