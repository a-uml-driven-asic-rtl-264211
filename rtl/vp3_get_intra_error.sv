// vp3_get_intra_error: activity score of an 8x8 block coded without
// prediction, the population variance of its pixels scaled by 64*64.
//
// Interface: `start` clears the sums; 64 pixels follow with in_valid. One
// clock after the 64th pixel `done` pulses with
//   err = 64 * sum(x^2) - (sum x)^2          (0 .. 64*64*127.5^2)
// which is 4096 times the variance. start together with in_valid begins a
// new block with that pixel. Synchronous active-high reset.
//
// The document describes sums of the pixels and of their squares and a
// population variance; the pixels are offset by 255 in the document's
// wording, which does not change a variance, so the offset is left out.
// Width choices and the single multiply at the end are this design's.
module vp3_get_intra_error #(
  parameter int BLOCK_PIX = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        in_valid,
  input  logic  [7:0] pix,
  output logic        done,
  output logic [27:0] err
);
  logic [13:0] xsum, xsum_base, xsum_next;
  logic [21:0] xxsum, xxsum_base, xxsum_next;
  logic [6:0]  cnt, cnt_base;
  logic [15:0] sq_pix;
  logic [27:0] sq_sum;

  assign xsum_base  = start ? '0 : xsum;
  assign xxsum_base = start ? '0 : xxsum;
  assign cnt_base   = start ? '0 : cnt;
  assign xsum_next  = xsum_base + 14'(pix);
  assign sq_pix     = pix * pix;
  assign xxsum_next = xxsum_base + 22'(sq_pix);
  assign sq_sum     = xsum_next * xsum_next;

  always_ff @(posedge clk) begin
    if (rst) begin
      xsum  <= '0;
      xxsum <= '0;
      cnt   <= '0;
      done  <= 1'b0;
      err   <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        xsum  <= '0;
        xxsum <= '0;
        cnt   <= '0;
      end
      if (in_valid) begin
        if (cnt_base == 7'(BLOCK_PIX - 1)) begin
          err   <= {xxsum_next, 6'd0} - sq_sum;
          done  <= 1'b1;
          xsum  <= '0;
          xxsum <= '0;
          cnt   <= '0;
        end else begin
          xsum  <= xsum_next;
          xxsum <= xxsum_next;
          cnt   <= cnt_base + 7'd1;
        end
      end
    end
  end
endmodule
