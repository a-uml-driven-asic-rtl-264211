// fir_pkg: state encoding shared by the FIR controller (fir_fsm) and the
// FIR datapath (fir_data), which receives it on state_out. The state names
// are those of the document's statechart; the encoding is this design's.
package fir_pkg;
  typedef enum logic [2:0] {
    RESET_S  = 3'd0,
    WAIT_S   = 3'd1,
    FIRST_S  = 3'd2,
    SECOND_S = 3'd3,
    THIRD_S  = 3'd4,
    OUTPUT_S = 3'd5
  } fir_state_t;
endpackage
