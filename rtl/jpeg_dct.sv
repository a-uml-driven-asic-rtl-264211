// jpeg_dct: 8x8 forward DCT of the JPEG encoder.
//
// Samples are 8-bit unsigned pixels, level-shifted by -128 on entry. A pulse
// on dstrb marks the first sample of a stream; from then on every cycle with
// ena high carries one sample, blocks of 64 following each other back to back
// in raster order. Sixty-four DCT units (eight DCTUB rows of eight DCTU, as in
// the document) accumulate all coefficients in parallel while the block
// streams in, so a block costs 64 cycles and no block memory is needed. One
// cycle after a block's last sample the 64 coefficients are read out, one per
// enabled cycle, in zig-zag order on dout (11-bit signed) with douten high;
// dfirst marks the DC coefficient. Readout of one block overlaps the input of
// the next. The zig-zag readout and the -128 level shift are this design's
// choices: the document leaves the ordering stage of the JPEG path unnamed.
module jpeg_dct
  import dct_pkg::*;
#(
  parameter int DOUT_W = 11
) (
  input  logic                     clk,
  input  logic                     ena,
  input  logic                     rst,
  input  logic                     dstrb,
  input  logic [7:0]               din,
  output logic signed [DOUT_W-1:0] dout,
  output logic                     douten,
  output logic                     dfirst
);
  logic                     running;
  logic [5:0]               k;
  logic                     den;
  logic signed [8:0]        sample;
  logic signed [DOUT_W-1:0] coef [8][8];
  logic                     out_act;
  logic [5:0]               out_n;
  logic [5:0]               zz_rom [64];

  initial for (int i = 0; i < 64; i++) zz_rom[i] = 6'(zigzag_raster(i));

  assign den    = ena && (running || dstrb);
  assign sample = $signed({1'b0, din}) - 9'sd128;

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      k       <= '0;
      out_act <= 1'b0;
      out_n   <= '0;
    end else if (ena) begin
      if (dstrb && !running) begin
        running <= 1'b1;
        k       <= 6'd1;
      end else if (running) begin
        k <= k + 6'd1;
      end
      if (den && k == 6'd63) begin
        out_act <= 1'b1;
        out_n   <= '0;
      end else if (out_act) begin
        out_n <= out_n + 6'd1;
        if (out_n == 6'd63) out_act <= 1'b0;
      end
    end
  end

  for (genvar v = 0; v < 8; v++) begin : g_row
    jpeg_dctub #(.V(v), .DOUT_W(DOUT_W)) u_dctub (
      .clk, .ena, .rst, .den,
      .k     (running ? k : 6'd0),
      .din   (sample),
      .dout  (coef[v])
    );
  end

  always_comb begin
    dout   = coef[zz_rom[out_n][5:3]][zz_rom[out_n][2:0]];
    douten = ena && out_act;
    dfirst = out_act && out_n == 6'd0;
  end
endmodule
