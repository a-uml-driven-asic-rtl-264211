// fir_data: datapath of the FIR filter. It multiplies the input samples by
// the filter coefficients in steps selected by the controller's state_out.
//
// reset_s clears the delay line, the accumulator and the outputs. first_s
// shifts the current sample into the delay line and accumulates taps 0..5,
// second_s taps 6..10, third_s taps 11..15, and output_s copies the sum to
// result and raises output_data_ready for one cycle. wait does nothing, which
// keeps a partial sum intact while the controller waits for valid input.
// result is therefore sum(COEF[i] * x[n-i]) for the TAPS most recent samples.
// The document shows the datapath with reset, state_out, sample,
// output_data_ready and result and without a clock, acting when state_out
// changes; here it is clocked, and since every state lasts one clock this is
// the same sequence of actions. The number of taps, the coefficients and the
// split of taps over the three states are this design's choice.
module fir_data
  import fir_pkg::*;
#(
  parameter int TAPS = 16,
  parameter int W    = 32,
  parameter int COEF [TAPS] = '{-1, -2, 0, 5, 12, 22, 31, 37, 37, 31, 22, 12, 5, 0, -2, -1}
) (
  input  logic                clk,
  input  logic                reset,
  input  fir_state_t          state_out,
  input  logic signed [W-1:0] sample,
  output logic                output_data_ready,
  output logic signed [W-1:0] result
);
  localparam int B1 = 6;             // taps 0..B1-1 in first_s
  localparam int B2 = 11;            // taps B1..B2-1 in second_s, B2..TAPS-1 in third_s

  logic signed [W-1:0] shreg [TAPS];
  logic signed [W-1:0] acc;
  logic signed [W-1:0] part1, part2, part3;

  always_comb begin
    part1 = W'(COEF[0]) * sample;
    for (int i = 1; i < B1; i++) part1 += W'(COEF[i]) * shreg[i-1];
    part2 = '0;
    for (int i = B1; i < B2; i++) part2 += W'(COEF[i]) * shreg[i];
    part3 = '0;
    for (int i = B2; i < TAPS; i++) part3 += W'(COEF[i]) * shreg[i];
  end

  always_ff @(posedge clk) begin
    if (reset || state_out == RESET_S) begin
      for (int i = 0; i < TAPS; i++) shreg[i] <= '0;
      acc               <= '0;
      result            <= '0;
      output_data_ready <= 1'b0;
    end else begin
      output_data_ready <= 1'b0;
      case (state_out)
        FIRST_S: begin
          shreg[0] <= sample;
          for (int i = 1; i < TAPS; i++) shreg[i] <= shreg[i-1];
          acc <= part1;
        end
        SECOND_S: acc <= acc + part2;
        THIRD_S:  acc <= acc + part3;
        OUTPUT_S: begin
          result            <= acc;
          output_data_ready <= 1'b1;
        end
        default: ;
      endcase
    end
  end
endmodule
