// Shared types and constants of the easy-tested control FSM.
//
// The FSM has five working states a1..a5 held in a 3-bit register with the
// binary codes 001..101. The three remaining codes (000, 110, 111) are never
// reached by the FSM's own transitions, but the scan path can shift any code
// into the register, so the type names them too; the logic sends them back
// to a1. The successor function gives the diagnostic Hamiltonian cycle
// a1 -> a2 -> a3 -> a4 -> a5 -> a1, which here is simply the code order.
package etfsm_pkg;

  localparam int unsigned STATE_W    = 3;
  localparam int unsigned NUM_STATES = 5;
  localparam int unsigned Y_W        = 3;

  typedef enum logic [STATE_W-1:0] {
    S_UNUSED0 = 3'b000,
    A1        = 3'b001,
    A2        = 3'b010,
    A3        = 3'b011,
    A4        = 3'b100,
    A5        = 3'b101,
    S_UNUSED6 = 3'b110,
    S_UNUSED7 = 3'b111
  } state_e;

  localparam state_e RESET_STATE = A1;

  // Successor on the diagnostic cycle through all working states.
  // Codes outside a1..a5 restart the cycle at a1.
  function automatic state_e ham_succ(state_e s, int unsigned n_states);
    logic [STATE_W-1:0] c;
    c = s;
    if (int'(c) >= 1 && int'(c) < int'(n_states))
      return state_e'(c + 3'd1);
    return A1;
  endfunction

endpackage
