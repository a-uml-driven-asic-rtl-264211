// jpeg_rle1: first run-length stage of the JPEG encoder.
//
// Follows the document's two-state statechart. In state DC the module waits
// for "go" (a valid coefficient flagged as the first of a block); it then
// emits the DC symbol (run length 0, size and amplitude of the coefficient),
// clears its coefficient count and run length and moves to AC. In AC each of
// the next 63 coefficients is counted: a zero extends the zero run, and every
// sixteenth zero of a run emits the (15,0) symbol; a non-zero coefficient
// emits (run, size, amp) and clears the run. When the count reaches 63
// (cnt_done) the state returns to DC; if the last coefficient is zero an end
// of block (0,0) symbol is emitted instead of anything else. Symbols appear
// one enabled cycle after the coefficient on sym with douten; dc_o marks the
// DC symbol. The DC coefficient is passed as is, without differencing against
// the previous block (not described in the document).
module jpeg_rle1
  import jpeg_pkg::*;
#(
  parameter int D_W = 11
) (
  input  logic                  clk,
  input  logic                  ena,
  input  logic                  rst,
  input  logic signed [D_W-1:0] din,
  input  logic                  den,
  input  logic                  dfirst,
  output rle_sym_t              sym,
  output logic                  douten,
  output logic                  dc_o
);
  typedef enum logic {ST_DC, ST_AC} state_t;
  state_t            state;
  logic [5:0]        cnt;
  logic [4:0]        run;
  logic signed [11:0] v;
  logic              go, cnt_done;

  assign v        = 12'(din);
  assign go       = den && dfirst;
  assign cnt_done = (cnt == 6'd63);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= ST_DC;
      cnt    <= '0;
      run    <= '0;
      sym    <= sym_eob();
      douten <= 1'b0;
      dc_o   <= 1'b0;
    end else if (ena) begin
      douten <= 1'b0;
      dc_o   <= 1'b0;
      case (state)
        ST_DC: if (go) begin
          sym    <= '{rlen: 4'd0, size: size_of(v), amp: amp_of(v)};
          douten <= 1'b1;
          dc_o   <= 1'b1;
          cnt    <= 6'd1;
          run    <= '0;
          state  <= ST_AC;
        end
        ST_AC: if (den) begin
          cnt <= cnt + 6'd1;
          if (v == 12'sd0) begin
            if (cnt_done) begin
              sym    <= sym_eob();
              douten <= 1'b1;
            end else if (run == 5'd15) begin
              sym    <= sym_zrl();
              douten <= 1'b1;
              run    <= '0;
            end else begin
              run <= run + 5'd1;
            end
          end else begin
            sym    <= '{rlen: run[3:0], size: size_of(v), amp: amp_of(v)};
            douten <= 1'b1;
            run    <= '0;
          end
          if (cnt_done) state <= ST_DC;
        end
        default: state <= ST_DC;
      endcase
    end
  end
endmodule
