// mac_ptos: parallel-to-serial converter (PtoS) of the MAC transmit path.
// load takes a byte while ready is high; its eight bits leave on txd, least
// significant first, one per clock from the next cycle, with tx_en high.
// ready is high when the converter is idle or sending its last bit, so a
// byte loaded then follows without a gap. One bit per clock is this design's
// choice of line interface.
module mac_ptos (
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd,
  output logic       tx_en
);
  logic [7:0] shreg;
  logic [3:0] cnt;   // bits still to send, including the one on txd

  assign ready = (cnt <= 4'd1);
  assign txd   = shreg[0];
  assign tx_en = (cnt != 4'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg <= '0;
      cnt   <= '0;
    end else if (load && ready) begin
      shreg <= data;
      cnt   <= 4'd8;
    end else if (cnt != 4'd0) begin
      shreg <= shreg >> 1;
      cnt   <= cnt - 4'd1;
    end
  end

  a_load: assert property (@(posedge clk) disable iff (rst) load |-> ready);
endmodule
