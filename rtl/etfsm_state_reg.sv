// Scannable state register of the easy-tested FSM.
//
// The memory part of the control FSM is built as a shift register so that,
// in test, any state can be forced directly instead of being reached through
// a synchronizing sequence. In normal mode (sh = 0) the register loads the
// next state from the transition logic on each rising clock edge. In setting
// mode (sh = 1) it shifts left by one bit: bit 0 takes the serial input tdi
// and bit 2 leaves on tdo. Three shifted bits, most significant first, set an
// arbitrary 3-bit code; the same three clocks unload the previous code on
// tdo, most significant bit first. Reset is asynchronous and active high and
// sets a1 (001).
//
// The load/shift structure and the reset value follow the document. The
// single active-high mode input sh is the complement of the listing's load
// enable; taking tdo from the top bit is this design's choice.
//
// Timing: one clock per state change or per shifted bit; tdo is registered.
module etfsm_state_reg
  import etfsm_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   sh,
  input  logic   tdi,
  input  state_e next_state,
  output state_e state,
  output logic   tdo
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)
      state <= RESET_STATE;
    else if (sh)
      state <= state_e'({state[STATE_W-2:0], tdi});
    else
      state <= next_state;
  end

  assign tdo = state[STATE_W-1];

endmodule
