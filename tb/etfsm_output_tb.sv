// Self-checking testbench for etfsm_output.
//
// Compares the Moore output of every state code with a table restated here,
// and checks that the five working states have five different outputs, the
// property the diagnostic walk relies on to identify states.
module etfsm_output_tb;
  import etfsm_pkg::*;

  state_e     state;
  logic [2:0] y;

  int checks = 0;
  int failures = 0;

  logic [2:0] exp_y [8] = '{3'b111, 3'b000, 3'b001, 3'b010, 3'b100, 3'b011, 3'b111, 3'b111};
  logic [7:0] seen;

  etfsm_output dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int c = 0; c < 8; c++) begin
      state = state_e'(3'(c));
      #1;
      checks++;
      if (y !== exp_y[c]) begin
        failures++;
        $display("FAIL state=%b y=%b expected %b", 3'(c), y, exp_y[c]);
      end
      if (c >= 1 && c <= 5) begin
        checks++;
        if (seen[y]) begin
          failures++;
          $display("FAIL output %b repeated", y);
        end
        seen[y] = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
