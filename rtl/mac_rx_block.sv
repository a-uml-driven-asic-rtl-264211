// mac_rx_block: receive block of the MAC (RxBlock), a passive top composed
// of the active units StoP, RxCore and RxFIFO as in the document. Serial
// input rxd/rx_dv; the host reads received header and payload bytes from
// the FIFO (rx_rd, rx_data, rx_empty; first-word-fall-through) and sees one
// frame_ok or frame_err pulse per frame. Bytes of a frame that fails are
// left in the FIFO; the host discards them on frame_err. A byte that
// arrives while the FIFO is full is dropped and also raises frame_err
// (this design's choice; the document does not cover overflow).
module mac_rx_block #(
  parameter int FIFO_DEPTH = 2048
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  input  logic       rx_dv,
  input  logic       rx_rd,
  output logic [7:0] rx_data,
  output logic       rx_empty,
  output logic       frame_ok,
  output logic       frame_err
);
  logic [7:0] s_data, c_data;
  logic       s_valid, s_end, c_wr, full, core_err;

  mac_stop u_stop (.clk, .rst, .rx_dv, .rxd, .data(s_data), .valid(s_valid), .frame_end(s_end));
  mac_rx_core u_core (
    .clk, .rst, .in_data(s_data), .in_valid(s_valid), .frame_end(s_end),
    .out_data(c_data), .out_wr(c_wr), .frame_ok, .frame_err(core_err)
  );

  // a byte that finds the FIFO full is lost; this is reported as a frame error
  assign frame_err = core_err || (c_wr && full);
  mac_fifo #(.DEPTH(FIFO_DEPTH), .W(8)) u_rxfifo (
    .clk, .rst, .wr_en(c_wr), .wr_data(c_data), .rd_en(rx_rd), .rd_data(rx_data),
    .full, .empty(rx_empty)
  );
endmodule
