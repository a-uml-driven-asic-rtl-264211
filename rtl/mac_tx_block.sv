// mac_tx_block: transmit block of the MAC (TxBlock). A central state machine
// drives three passive units: TxFIFO, TxCore and PtoS.
//
// The host writes a frame, header and payload, into the FIFO (tx_wr,
// tx_data) and pulses tx_start. The machine then sends seven preamble bytes,
// the start delimiter, the 14 header bytes (catching the payload length from
// bytes 12 and 13), the payload and the four FCS bytes, one byte per eight
// clocks with no gaps, and returns to idle with a tx_done pulse. If the FIFO
// runs empty before the frame is complete the machine waits for more data
// (the line then pauses, which a receiver treats as an error). busy is high
// from tx_start to tx_done. The states and their order are this design's:
// the document's statechart for this block is not reproduced in it.
module mac_tx_block
  import mac_pkg::*;
#(
  parameter int FIFO_DEPTH = 2048
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tx_wr,
  input  logic [7:0] tx_data,
  input  logic       tx_start,
  output logic       tx_full,
  output logic       txd,
  output logic       tx_en,
  output logic       busy,
  output logic       tx_done
);
  typedef enum logic [2:0] {IDLE, PRE, SFD_S, HDR, DATA, FCS} state_t;
  state_t      state;
  logic [10:0] cnt;
  logic [15:0] len;
  logic        ptos_ready, fifo_empty, next, start;
  logic [1:0]  sel;
  logic [7:0]  fifo_data, byte_out;
  logic        pop;

  mac_fifo #(.DEPTH(FIFO_DEPTH), .W(8)) u_txfifo (
    .clk, .rst, .wr_en(tx_wr), .wr_data(tx_data), .rd_en(pop), .rd_data(fifo_data),
    .full(tx_full), .empty(fifo_empty)
  );

  mac_tx_core u_core (
    .clk, .rst, .start, .next, .sel, .fcs_idx(cnt[1:0]), .fifo_data, .byte_out
  );

  mac_ptos u_ptos (
    .clk, .rst, .load(next), .data(byte_out), .ready(ptos_ready), .txd, .tx_en
  );

  always_comb begin
    case (state)
      PRE:       sel = 2'd0;
      SFD_S:     sel = 2'd1;
      HDR, DATA: sel = 2'd2;
      default:   sel = 2'd3;
    endcase
    start = (state == IDLE) && tx_start;
    next  = ptos_ready && (state inside {PRE, SFD_S, FCS} ||
                           (state inside {HDR, DATA} && !fifo_empty));
    pop   = next && state inside {HDR, DATA};
    busy  = (state != IDLE);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= IDLE;
      cnt     <= '0;
      len     <= '0;
      tx_done <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      case (state)
        IDLE: if (tx_start) begin
          state <= PRE;
          cnt   <= '0;
        end
        PRE: if (next) begin
          cnt <= cnt + 1'b1;
          if (cnt == 11'(pre_bytes() - 1)) state <= SFD_S;
        end
        SFD_S: if (next) begin
          state <= HDR;
          cnt   <= '0;
        end
        HDR: if (next) begin
          cnt <= cnt + 1'b1;
          if (cnt == 11'd12) len[15:8] <= fifo_data;
          if (cnt == 11'd13) begin
            len[7:0] <= fifo_data;
            cnt      <= '0;
            state    <= ({len[15:8], fifo_data} == 16'd0) ? FCS : DATA;
          end
        end
        DATA: if (next) begin
          cnt <= cnt + 1'b1;
          if (16'(cnt) == len - 16'd1) begin
            state <= FCS;
            cnt   <= '0;
          end
        end
        FCS: if (next) begin
          cnt <= cnt + 1'b1;
          if (cnt == 11'd3) begin
            state   <= IDLE;
            tx_done <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
