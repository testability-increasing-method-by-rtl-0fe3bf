// Easy-tested control FSM: a Moore machine with a scannable state register
// and a diagnostic Hamiltonian bypass.
//
// Structure (the FSM template): the transition logic (etfsm_next_state)
// computes the next state from the current state and x; the bypass
// multiplexer (etfsm_ham_cycle) replaces it by the successor on the cycle
// a1..a5 when diag = 1; the state register (etfsm_state_reg) loads that value,
// or, when sh = 1, shifts tdi in and the old code out on tdo; the output
// logic (etfsm_output) decodes the current state into y.
//
// Modes, in priority order:
//   rst  = 1          asynchronous reset to a1
//   sh   = 1          setting/scan mode: 3 clocks force any state code and
//                     unload the previous one, most significant bit first
//   diag = 1          diagnostic mode: visit a1, a2, a3, a4, a5, a1, ...
//   otherwise         normal mode: the FSM's own algorithm driven by x
//
// The register-as-shift-register and the two modes follow the document;
// the example state table, the output words and the port list are this
// design's own choices.
//
// Timing: one state change per rising clock edge; y and tdo follow the
// registered state combinationally.
module etfsm_top
  import etfsm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 x,
  input  logic                 sh,
  input  logic                 diag,
  input  logic                 tdi,
  output logic                 tdo,
  output logic [Y_W-1:0]       y,
  output logic [STATE_W-1:0]   state
);

  state_e cur_state;
  state_e fsm_next;
  state_e reg_next;

  etfsm_next_state u_next_state (
    .state      (cur_state),
    .x          (x),
    .next_state (fsm_next)
  );

  etfsm_ham_cycle u_ham_cycle (
    .diag       (diag),
    .state      (cur_state),
    .fsm_next   (fsm_next),
    .next_state (reg_next)
  );

  etfsm_state_reg u_state_reg (
    .clk        (clk),
    .rst        (rst),
    .sh         (sh),
    .tdi        (tdi),
    .next_state (reg_next),
    .state      (cur_state),
    .tdo        (tdo)
  );

  etfsm_output u_output (
    .state (cur_state),
    .y     (y)
  );

  assign state = cur_state;

endmodule
