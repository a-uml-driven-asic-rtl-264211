// mac_tx_core: transmit datapath (TxCore) of the MAC. It is passive: the
// transmit controller selects what the next byte is and strobes next. The
// selection is a preamble byte, the start delimiter, a frame byte taken from
// the TxFIFO (header or payload; these are also fed into the CRC-32), or FCS
// byte 0..3 (the complemented CRC, low byte first). start presets the CRC.
// byte_out is combinational so that the controller can hand it to PtoS in
// the same cycle. The split of work between controller and core follows the
// document's description of a central state machine over a passive datapath;
// the details are this design's.
module mac_tx_core
  import mac_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       next,
  input  logic [1:0] sel,        // 0 preamble, 1 SFD, 2 frame byte, 3 FCS byte
  input  logic [1:0] fcs_idx,
  input  logic [7:0] fifo_data,
  output logic [7:0] byte_out
);
  logic [31:0] crc;
  logic [31:0] fcs;

  assign fcs = ~crc;

  always_comb begin
    case (sel)
      2'd0:    byte_out = preamble_byte();
      2'd1:    byte_out = sfd_byte();
      2'd2:    byte_out = fifo_data;
      default: byte_out = fcs[8*fcs_idx +: 8];
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst || start) crc <= crc_init();
    else if (next && sel == 2'd2) crc <= crc32_byte(crc, fifo_data);
  end
endmodule
