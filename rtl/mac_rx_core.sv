// mac_rx_core: receive core (RxCore) of the MAC, with the document's states
// Pre, Header, Data, CRC, End and Error.
//
// Pre expects seven preamble bytes 0x55 and the delimiter 0xD5; Header takes
// 14 bytes and catches the payload length from bytes 12 and 13; Data takes
// that many bytes; CRC compares the next four bytes with the CRC-32 computed
// over header and payload. Header and payload bytes go to the RxFIFO
// (out_data with out_wr). End pulses frame_ok and Error pulses frame_err, and
// both wait for the end of the frame (frame_end from StoP) before looking for
// the next preamble. A wrong preamble or delimiter, a length above 1500, a
// wrong FCS or a frame ending early leads to Error. Bytes that arrive after
// the FCS are ignored. The length-field framing is this design's choice.
// out_data is in_data itself, unregistered, qualified by out_wr: the bytes
// need no copy here, so these eight output bits pass straight through.
module mac_rx_core
  import mac_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] in_data,
  input  logic       in_valid,
  input  logic       frame_end,
  output logic [7:0] out_data,
  output logic       out_wr,
  output logic       frame_ok,
  output logic       frame_err
);
  typedef enum logic [2:0] {PRE, HEADER, DATA, CRC, END, ERROR} state_t;
  state_t      state;
  logic [10:0] cnt;
  logic [15:0] len;
  logic [31:0] crc, fcs;

  assign fcs      = ~crc;
  assign out_data = in_data;
  assign out_wr   = in_valid && (state == HEADER || state == DATA);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= PRE;
      cnt       <= '0;
      len       <= '0;
      crc       <= crc_init();
      frame_ok  <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      frame_ok  <= 1'b0;
      frame_err <= 1'b0;
      case (state)
        PRE: begin
          if (frame_end) cnt <= '0;
          else if (in_valid) begin
            crc <= crc_init();
            if (cnt < 11'(pre_bytes())) begin
              if (in_data == preamble_byte()) cnt <= cnt + 1'b1;
              else begin state <= ERROR; frame_err <= 1'b1; end
            end else if (in_data == sfd_byte()) begin
              state <= HEADER;
              cnt   <= '0;
            end else begin
              state <= ERROR; frame_err <= 1'b1;
            end
          end
        end
        HEADER, DATA: begin
          if (frame_end) begin
            state <= PRE; cnt <= '0; frame_err <= 1'b1;
          end else if (in_valid) begin
            crc <= crc32_byte(crc, in_data);
            cnt <= cnt + 1'b1;
            if (state == HEADER) begin
              if (cnt == 11'd12) len[15:8] <= in_data;
              if (cnt == 11'd13) begin
                len[7:0] <= in_data;
                cnt      <= '0;
                if ({len[15:8], in_data} > 16'(max_len())) begin
                  state <= ERROR; frame_err <= 1'b1;
                end else state <= ({len[15:8], in_data} == 16'd0) ? CRC : DATA;
              end
            end else if (16'(cnt) == len - 16'd1) begin
              state <= CRC;
              cnt   <= '0;
            end
          end
        end
        CRC: begin
          if (frame_end) begin
            state <= PRE; cnt <= '0; frame_err <= 1'b1;
          end else if (in_valid) begin
            cnt <= cnt + 1'b1;
            if (in_data != fcs[8*cnt[1:0] +: 8]) begin
              state <= ERROR; frame_err <= 1'b1;
            end else if (cnt == 11'd3) begin
              state <= END; frame_ok <= 1'b1;
            end
          end
        end
        END, ERROR: if (frame_end) begin
          state <= PRE;
          cnt   <= '0;
        end
        default: state <= PRE;
      endcase
    end
  end
endmodule
