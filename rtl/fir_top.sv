// fir_top: FIR filter, the controller fir_fsm and the datapath fir_data
// connected as in the document's block diagram: clock, reset and in_valid go
// to the controller, whose state_out drives the datapath together with
// reset and sample. A new sample is taken when the controller passes first_s
// and its filtered value appears on result with a one-cycle
// output_data_ready pulse; with in_valid held high a result is produced every
// five cycles (wait, first_s, second_s, third_s, output_s). The sample must
// stay stable from in_valid until it has been taken.
module fir_top
  import fir_pkg::*;
#(
  parameter int W = 32
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                in_valid,
  input  logic signed [W-1:0] sample,
  output logic                output_data_ready,
  output logic signed [W-1:0] result,
  output fir_state_t          state
);
  fir_fsm u_fsm (.clk, .reset, .in_valid, .state_out(state));
  fir_data #(.W(W)) u_data (
    .clk, .reset, .state_out(state), .sample, .output_data_ready, .result
  );
endmodule
