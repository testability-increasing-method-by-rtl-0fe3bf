// Self-checking testbench for etfsm_ham_cycle.
//
// With diag = 0 the block must pass the transition logic's next state
// unchanged for every state code. With diag = 1 the successor must be
// code + 1 for a1..a4, a1 for a5 and a1 for the unused codes; following it
// from a1 must visit all five working states once each and return to a1
// after five steps (a Hamiltonian cycle).
module etfsm_ham_cycle_tb;
  import etfsm_pkg::*;

  logic   diag;
  state_e state;
  state_e fsm_next;
  state_e next_state;

  int checks = 0;
  int failures = 0;

  etfsm_ham_cycle dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp;
    logic [7:0] visited;
    // Pass-through in normal mode.
    #1;
    diag = 1'b0;
    for (int c = 0; c < 8; c++) begin
      for (int n = 0; n < 8; n++) begin
        state = state_e'(3'(c));
        fsm_next = state_e'(3'(n));
        #1;
        checks++;
        if (next_state !== 3'(n)) begin
          failures++;
          $display("FAIL pass state=%0d fsm_next=%0d got %0d", c, n, next_state);
        end
      end
    end
    // Successor in diagnostic mode, whatever fsm_next is.
    diag = 1'b1;
    for (int c = 0; c < 8; c++) begin
      state = state_e'(3'(c));
      fsm_next = state_e'(3'($urandom));
      exp = (c >= 1 && c <= 4) ? 3'(c + 1) : 3'd1;
      #1;
      checks++;
      if (next_state !== exp) begin
        failures++;
        $display("FAIL succ state=%0d got %0d expected %0d", c, next_state, exp);
      end
    end
    // Walk the cycle from a1.
    visited = '0;
    state = A1;
    for (int i = 0; i < 5; i++) begin
      visited[state] = 1'b1;
      #1;
      state = next_state;
    end
    checks++;
    if (state !== A1 || visited !== 8'b0011_1110) begin
      failures++;
      $display("FAIL tour: end=%0d visited=%b", state, visited);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
