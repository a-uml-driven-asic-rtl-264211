// fir_fsm: controller of the FIR filter, a hierarchical statechart with a
// history state.
//
// After reset the machine passes through reset_s into wait. With in_valid
// high it enters the composite state Active through its history connector:
// the first time, and after every completed pass, that is first_s; then
// first_s, second_s, third_s and output_s follow one per clock, and output_s
// returns to wait. If in_valid drops while Active, the machine leaves for
// wait at the end of the current cycle and remembers the sub-state that would
// have come next, so a later in_valid resumes the computation where it
// stopped instead of restarting it. state_out carries the current state to
// the datapath, which performs the step of that state in that cycle.
// States, transitions and the history connector are the document's; the
// exact history contents (the successor state) and the clocking of one state
// per cycle are this design's reading of it.
module fir_fsm
  import fir_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       in_valid,
  output fir_state_t state_out
);
  fir_state_t state, hist;

  function automatic fir_state_t succ(input fir_state_t s);
    case (s)
      FIRST_S:  return SECOND_S;
      SECOND_S: return THIRD_S;
      THIRD_S:  return OUTPUT_S;
      default:  return FIRST_S;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= RESET_S;
      hist  <= FIRST_S;
    end else begin
      case (state)
        RESET_S: state <= WAIT_S;
        WAIT_S:  if (in_valid) state <= hist;
        OUTPUT_S: begin
          state <= WAIT_S;
          hist  <= FIRST_S;
        end
        FIRST_S, SECOND_S, THIRD_S: begin
          if (!in_valid) begin
            state <= WAIT_S;
            hist  <= succ(state);
          end else begin
            state <= succ(state);
          end
        end
        default: state <= RESET_S;
      endcase
    end
  end

  assign state_out = state;

// the history always names a sub-state of Active
  a_hist: assert property (@(posedge clk) disable iff (reset)
    hist inside {FIRST_S, SECOND_S, THIRD_S, OUTPUT_S});
endmodule
