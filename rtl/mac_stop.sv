// mac_stop: serial-to-parallel converter (StoP) at the MAC receiver
// interface. While rx_dv is high, bits on rxd (least significant first) are
// gathered into bytes counted from the first bit of rx_dv; every eighth bit
// delivers a byte on data with valid for one cycle, in the cycle after its
// last bit. When rx_dv falls, frame_end pulses for one cycle and any partial
// byte is discarded. Byte alignment to the start of rx_dv and one bit per
// clock are this design's choices.
module mac_stop (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx_dv,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_end
);
  logic [6:0] shreg;
  logic [2:0] bitcnt;
  logic       dv_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '0;
      bitcnt    <= '0;
      dv_d      <= 1'b0;
      data      <= '0;
      valid     <= 1'b0;
      frame_end <= 1'b0;
    end else begin
      dv_d      <= rx_dv;
      valid     <= 1'b0;
      frame_end <= dv_d && !rx_dv;
      if (rx_dv) begin
        shreg  <= {rxd, shreg[6:1]};
        bitcnt <= bitcnt + 3'd1;
        if (bitcnt == 3'd7) begin
          data  <= {rxd, shreg};
          valid <= 1'b1;
        end
      end else begin
        bitcnt <= '0;
      end
    end
  end
endmodule
