// Transition function of the example control FSM (combinational).
//
// Following the FSM template, the transition function sits in a process of
// its own, separate from the output function and from the clocked state
// register. It maps the current state and the condition input x to the next
// state. The state table is this design's own example of a strongly
// connected five-state machine:
//
//   a1: x ? a2 : a1      a2: x ? a3 : a4      a3: a5
//   a4: x ? a5 : a2      a5: x ? a1 : a5
//
// The unused codes 000, 110 and 111, which only the scan path can load,
// return to a1. To implement another controller, replace this table; the
// scan path and the diagnostic cycle do not depend on it.
//
// Timing: purely combinational.
module etfsm_next_state
  import etfsm_pkg::*;
(
  input  state_e state,
  input  logic   x,
  output state_e next_state
);

  always_comb begin
    unique case (state)
      A1:      next_state = x ? A2 : A1;
      A2:      next_state = x ? A3 : A4;
      A3:      next_state = A5;
      A4:      next_state = x ? A5 : A2;
      A5:      next_state = x ? A1 : A5;
      default: next_state = A1;
    endcase
  end

endmodule
