// jpeg_qnr: quantisation and rounding (QNR) of the JPEG encoder.
//
// Coefficients arrive on din with den, dfirst marking the first (DC)
// coefficient of each block. qnt_cnt is the position of the current
// coefficient within its block (0..63) and addresses an external quantisation
// table, which answers in the same cycle on qnt_val. The coefficient is
// divided by qnt_val and rounded to nearest, halves away from zero; a table
// entry of 0 is treated as 1. The result appears one enabled cycle later on
// dout with douten and dfirst_o. The table interface follows the encoder's
// qnt_cnt/qnt_val ports; the rounding rule and one-cycle latency are this
// design's choice.
module jpeg_qnr #(
  parameter int D_W = 11
) (
  input  logic                  clk,
  input  logic                  ena,
  input  logic                  rst,
  input  logic signed [D_W-1:0] din,
  input  logic                  den,
  input  logic                  dfirst,
  input  logic [7:0]            qnt_val,
  output logic [5:0]            qnt_cnt,
  output logic signed [D_W-1:0] dout,
  output logic                  douten,
  output logic                  dfirst_o
);
  logic [5:0]     cnt;
  logic [D_W-1:0] mag, q;
  logic [8:0]     div;

  assign qnt_cnt = dfirst ? 6'd0 : cnt;

  always_comb begin
    div = (qnt_val == 8'd0) ? 9'd1 : {1'b0, qnt_val};
    mag = din[D_W-1] ? D_W'(-din) : D_W'(din);
    q   = D_W'((32'(mag) + 32'(div >> 1)) / 32'(div));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      dout     <= '0;
      douten   <= 1'b0;
      dfirst_o <= 1'b0;
    end else if (ena) begin
      douten   <= den;
      dfirst_o <= den && dfirst;
      if (den) begin
        cnt  <= qnt_cnt + 6'd1;
        dout <= din[D_W-1] ? -$signed(q) : $signed(q);
      end
    end
  end
endmodule
