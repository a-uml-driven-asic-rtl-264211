// jpeg_rzs: zero-run suppression stage of the JPEG run-length encoder.
//
// A (15,0) symbol (sixteen zeros, "zerobl") must not be sent if only zeros
// follow it up to the end of the block, because the end-of-block symbol
// already covers them. The stage holds at most one symbol. Its two states
// follow the document's statechart: S0 (holding nothing or an ordinary
// symbol) and S1 (holding a (15,0) symbol). In S1 an incoming end of block
// discards the held (15,0); any other incoming symbol releases it, and a
// further (15,0) keeps the stage in S1. In S0 a held ordinary symbol leaves
// on the next clock. Symbols therefore pass with one cycle of latency unless
// they are (15,0). A chain of four stages removes up to four trailing (15,0)
// symbols, more than the three a 63-coefficient block can produce.
module jpeg_rzs
  import jpeg_pkg::*;
(
  input  logic     clk,
  input  logic     ena,
  input  logic     rst,
  input  rle_sym_t din,
  input  logic     den,
  input  logic     dc_i,
  output rle_sym_t dout,
  output logic     douten,
  output logic     dc_o
);
  typedef enum logic {S0, S1} state_t;
  state_t   state;
  rle_sym_t held;
  logic     held_v, held_dc;
  logic     zerobl, eob;

  assign zerobl = den && !dc_i && din == sym_zrl();
  assign eob    = den && !dc_i && din == sym_eob();

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S0;
      held    <= sym_eob();
      held_v  <= 1'b0;
      held_dc <= 1'b0;
      dout    <= sym_eob();
      douten  <= 1'b0;
      dc_o    <= 1'b0;
    end else if (ena) begin
      douten <= 1'b0;
      dc_o   <= 1'b0;
      if (den) begin
        // release the held symbol unless it is a (15,0) ended by end of block
        if (held_v && !(state == S1 && eob)) begin
          dout   <= held;
          douten <= 1'b1;
          dc_o   <= held_dc;
        end
        held    <= din;
        held_v  <= 1'b1;
        held_dc <= dc_i;
        state   <= zerobl ? S1 : S0;
      end else if (held_v && state == S0) begin
        dout    <= held;
        douten  <= 1'b1;
        dc_o    <= held_dc;
        held_v  <= 1'b0;
      end
    end
  end
endmodule
