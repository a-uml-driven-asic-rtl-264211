// mac_controller: minimal Ethernet MAC controller, a transmit block and a
// receive block side by side (the document's use cases: enable transmitter,
// enable receiver, input data, monitor tx data, monitor rx data). tx_enable
// and rx_enable gate the start of transmission and the serial input. The
// serial line runs at one bit per clock; frame format in mac_pkg.
module mac_controller #(
  parameter int FIFO_DEPTH = 2048
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tx_enable,
  input  logic       rx_enable,
  input  logic       tx_wr,
  input  logic [7:0] tx_data,
  input  logic       tx_start,
  output logic       tx_full,
  output logic       txd,
  output logic       tx_en,
  output logic       tx_busy,
  output logic       tx_done,
  input  logic       rxd,
  input  logic       rx_dv,
  input  logic       rx_rd,
  output logic [7:0] rx_data,
  output logic       rx_empty,
  output logic       rx_frame_ok,
  output logic       rx_frame_err
);
  mac_tx_block #(.FIFO_DEPTH(FIFO_DEPTH)) u_tx (
    .clk, .rst, .tx_wr, .tx_data, .tx_start(tx_start && tx_enable), .tx_full,
    .txd, .tx_en, .busy(tx_busy), .tx_done
  );
  mac_rx_block #(.FIFO_DEPTH(FIFO_DEPTH)) u_rx (
    .clk, .rst, .rxd, .rx_dv(rx_dv && rx_enable), .rx_rd, .rx_data, .rx_empty,
    .frame_ok(rx_frame_ok), .frame_err(rx_frame_err)
  );
endmodule
