// vp3_clear_down_qfrag_data: clears the store of quantised coefficients of
// the coded fragments (8x8 blocks) before a new frame is coded.
//
// How it works: on `enable` the number of fragments is taken from `datain`
// and a counter walks every word of them, 64 words per fragment, writing
// zero: each clock `addr` holds the word address, `dataout` is 0 and
// `output_data_ready` is high as the write strobe. `busy` is high from the
// clock after enable until the last word has been written. An enable while
// busy is ignored. A count of zero ends at once. Synchronous active-high
// reset.
//
// Port names and 32-bit widths follow the document's class diagram; reading
// `datain` as the fragment count and `output_data_ready` as a write strobe,
// and the extra `busy` output, are this design's choices.
module vp3_clear_down_qfrag_data #(
  parameter int FRAG_WORDS = 64
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        enable,
  input  logic [31:0] datain,
  output logic [31:0] dataout,
  output logic [31:0] addr,
  output logic        output_data_ready,
  output logic        busy
);
  logic [31:0] last_addr;

  assign dataout = '0;

  always_ff @(posedge clk) begin
    if (reset) begin
      addr              <= '0;
      last_addr         <= '0;
      busy              <= 1'b0;
      output_data_ready <= 1'b0;
    end else if (!busy) begin
      output_data_ready <= 1'b0;
      if (enable && datain != 32'd0) begin
        busy              <= 1'b1;
        addr              <= '0;
        last_addr         <= datain * 32'(FRAG_WORDS) - 32'd1;
        output_data_ready <= 1'b1;
      end
    end else begin
      if (addr == last_addr) begin
        busy              <= 1'b0;
        output_data_ready <= 1'b0;
      end else begin
        addr <= addr + 32'd1;
      end
    end
  end
endmodule
