// Diagnostic state-table expansion: Hamiltonian bypass of all states.
//
// The state table is extended with one extra input, diag. While diag = 1
// every state's next state is its successor on the cycle
// a1 -> a2 -> a3 -> a4 -> a5 -> a1, which passes through every node of the
// state diagram exactly once and so is a Hamiltonian cycle of the expanded
// diagram, whatever the original table. Walking it while watching the
// outputs checks every state and its output with a sequence of length
// NUM_STATES. While diag = 0 the next state from the transition logic passes
// unchanged.
//
// That the table is expanded to bypass all nodes in diagnostic mode follows
// the document; the choice of cycle (code order), the separate input diag
// and sending unused codes to a1 are this design's own.
//
// Timing: purely combinational; a multiplexer in front of the state register.
module etfsm_ham_cycle
  import etfsm_pkg::*;
#(
  parameter int unsigned N_STATES = NUM_STATES
) (
  input  logic   diag,
  input  state_e state,
  input  state_e fsm_next,
  output state_e next_state
);

  always_comb begin
    if (diag)
      next_state = ham_succ(state, N_STATES);
    else
      next_state = fsm_next;
  end

endmodule
