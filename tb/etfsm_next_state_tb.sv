// Self-checking testbench for etfsm_next_state.
//
// The example state table is restated here as two arrays indexed by the
// state code, one for x = 0 and one for x = 1, and every one of the 16
// combinations of state code and input is compared with the block.
module etfsm_next_state_tb;
  import etfsm_pkg::*;

  state_e state;
  logic   x;
  state_e next_state;

  int checks = 0;
  int failures = 0;

  // Expected next-state codes for codes 000..111.
  logic [2:0] exp_x0 [8] = '{3'd1, 3'd1, 3'd4, 3'd5, 3'd2, 3'd5, 3'd1, 3'd1};
  logic [2:0] exp_x1 [8] = '{3'd1, 3'd2, 3'd3, 3'd5, 3'd5, 3'd1, 3'd1, 3'd1};

  etfsm_next_state dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      for (int xv = 0; xv < 2; xv++) begin
        state = state_e'(3'(c));
        x = 1'(xv);
        #1;
        checks++;
        if (next_state !== ((xv != 0) ? exp_x1[c] : exp_x0[c])) begin
          failures++;
          $display("FAIL state=%b x=%0d next=%b", 3'(c), xv, next_state);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
