// jpeg_dctub: one row of eight DCT units (DCTUB). All eight units share the
// sample stream; unit i computes vertical frequency V and horizontal
// frequency i. dout[i] holds F(V,i) after the block's last sample. The row
// organisation (8 DCTUB of 8 DCTU) follows the document.
module jpeg_dctub #(
  parameter int V      = 0,
  parameter int DOUT_W = 11
) (
  input  logic                     clk,
  input  logic                     ena,
  input  logic                     rst,
  input  logic                     den,
  input  logic [5:0]               k,
  input  logic signed [8:0]        din,
  output logic signed [DOUT_W-1:0] dout [8]
);
  for (genvar u = 0; u < 8; u++) begin : g_u
    jpeg_dctu #(.U(u), .V(V), .DOUT_W(DOUT_W)) u_dctu (
      .clk, .ena, .rst, .den, .k, .din, .dout(dout[u])
    );
  end
endmodule
