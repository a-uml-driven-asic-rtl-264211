// jpeg_dct_mac: multiply-accumulate unit of one DCT coefficient (DCT_MAC).
//
// Every enabled cycle with den high the signed sample din is multiplied by the
// coefficient coef and added to the accumulator; the accumulator restarts from
// the product when first is high. When last is high the finished sum, rounded
// and scaled down by 2^SHIFT and clipped to DOUT_W bits, is stored in dout on
// the same clock edge, so dout is valid from the cycle after the last sample
// of a block until the end of the next block. Widths and rounding are this
// design's choice; the document names the unit and its role only.
module jpeg_dct_mac #(
  parameter int DIN_W  = 9,
  parameter int COEF_W = 15,
  parameter int ACC_W  = 32,
  parameter int SHIFT  = 16,
  parameter int DOUT_W = 11
) (
  input  logic                     clk,
  input  logic                     ena,
  input  logic                     rst,
  input  logic                     den,
  input  logic                     first,
  input  logic                     last,
  input  logic signed [DIN_W-1:0]  din,
  input  logic signed [COEF_W-1:0] coef,
  output logic signed [DOUT_W-1:0] dout
);
  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((1 << (DOUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(1 << (DOUT_W - 1));

  logic signed [ACC_W-1:0] acc, sum, rnd;

  always_comb begin
    sum = (first ? '0 : acc) + ACC_W'(din * coef);
    rnd = (sum + ACC_W'(1 << (SHIFT - 1))) >>> SHIFT;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc  <= '0;
      dout <= '0;
    end else if (ena && den) begin
      acc <= sum;
      if (last) begin
        if (rnd > MAXV)      dout <= MAXV[DOUT_W-1:0];
        else if (rnd < MINV) dout <= MINV[DOUT_W-1:0];
        else                 dout <= rnd[DOUT_W-1:0];
      end
    end
  end
endmodule
