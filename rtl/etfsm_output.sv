// Moore output function of the example control FSM (combinational).
//
// Following the FSM template, the outputs are produced by a process of their
// own and, the machine being a Moore machine, depend only on the current
// state. The output words are this design's own choice, made different for
// every working state so that a state can be identified from its output:
//
//   a1 -> 000   a2 -> 001   a3 -> 010   a4 -> 100   a5 -> 011
//
// The unused codes give 111.
//
// Timing: purely combinational.
module etfsm_output
  import etfsm_pkg::*;
(
  input  state_e         state,
  output logic [Y_W-1:0] y
);

  always_comb begin
    unique case (state)
      A1:      y = 3'b000;
      A2:      y = 3'b001;
      A3:      y = 3'b010;
      A4:      y = 3'b100;
      A5:      y = 3'b011;
      default: y = 3'b111;
    endcase
  end

endmodule
