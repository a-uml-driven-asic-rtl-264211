// jpeg_rle: run-length encoder of the JPEG encoder, the rle1 stage followed
// by four rzs zero-run suppression stages as in the document. Input is the
// quantised coefficient stream in zig-zag order (dfirst marks each DC
// coefficient); output is the stream of (rlen, size, amp) symbols with
// douten, and dc_o marking DC symbols. Latency is two cycles for rle1 and the
// first stage plus one per further stage; a (15,0) symbol is held until the
// next symbol of its block shows whether it is needed.
module jpeg_rle
  import jpeg_pkg::*;
#(
  parameter int D_W    = 11,
  parameter int STAGES = 4
) (
  input  logic                  clk,
  input  logic                  ena,
  input  logic                  rst,
  input  logic signed [D_W-1:0] din,
  input  logic                  den,
  input  logic                  dfirst,
  output logic [3:0]            rlen,
  output logic [3:0]            size,
  output logic [11:0]           amp,
  output logic                  douten,
  output logic                  dc_o
);
  rle_sym_t sym [STAGES+1];
  logic     en  [STAGES+1];
  logic     dc  [STAGES+1];

  jpeg_rle1 #(.D_W(D_W)) u_rle1 (
    .clk, .ena, .rst, .din, .den, .dfirst,
    .sym(sym[0]), .douten(en[0]), .dc_o(dc[0])
  );

  for (genvar i = 0; i < STAGES; i++) begin : g_rzs
    jpeg_rzs u_rzs (
      .clk, .ena, .rst,
      .din(sym[i]), .den(en[i]), .dc_i(dc[i]),
      .dout(sym[i+1]), .douten(en[i+1]), .dc_o(dc[i+1])
    );
  end

  assign rlen   = sym[STAGES].rlen;
  assign size   = sym[STAGES].size;
  assign amp    = sym[STAGES].amp;
  assign douten = en[STAGES] && ena;
  assign dc_o   = dc[STAGES];
endmodule
