// Self-checking testbench for etfsm_state_reg.
//
// A reference register kept in the testbench is updated on the same clock
// edges with the load/shift rule written out independently (load next_state
// when sh = 0, shift {state[1:0], tdi} when sh = 1, asynchronous reset to
// 001). The test forces every 3-bit code through the serial input in exactly
// three clocks and checks that the old code leaves on tdo, most significant
// bit first; then it runs random mixes of load, shift and mid-cycle resets.
module etfsm_state_reg_tb;
  import etfsm_pkg::*;

  logic   clk = 1'b0;
  logic   rst;
  logic   sh;
  logic   tdi;
  state_e next_state;
  state_e state;
  logic   tdo;

  int checks = 0;
  int failures = 0;
  logic [2:0] ref_q;

  etfsm_state_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (state !== ref_q || tdo !== ref_q[2]) begin
      failures++;
      $display("FAIL %s: state=%b tdo=%b expected %b/%b", what, state, tdo, ref_q, ref_q[2]);
    end
  endtask

  task automatic step(logic s, logic d, logic [2:0] n);
    sh = s; tdi = d; next_state = state_e'(n);
    @(posedge clk);
    ref_q = s ? {ref_q[1:0], d} : n;
    #1;
  endtask

  initial begin
    logic [2:0] prev;
    logic [2:0] out_bits;
    rst = 1'b1; sh = 1'b0; tdi = 1'b0; next_state = A3;
    #2;
    ref_q = 3'b001;
    check("async reset");
    @(negedge clk);
    rst = 1'b0;
    #1;

    // Set every code in three shifts; the old code must come out on tdo.
    for (int code = 0; code < 8; code++) begin
      prev = ref_q;
      out_bits = '0;
      for (int b = 2; b >= 0; b--) begin
        out_bits[b] = tdo;
        step(1'b1, code[b], 3'b000);
      end
      check("scan set");
      checks++;
      if (state !== 3'(code) || out_bits !== prev) begin
        failures++;
        $display("FAIL scan: code=%0d got %b, unloaded %b expected %b", code, state, out_bits, prev);
      end
    end

    // Normal load of each code.
    for (int code = 0; code < 8; code++) begin
      step(1'b0, 1'b1, 3'(code));
      check("load");
    end

    // Random load/shift mix with occasional asynchronous reset.
    repeat (2000) begin
      if ($urandom_range(0, 49) == 0) begin
        #2 rst = 1'b1;
        #1 ref_q = 3'b001;
        check("async reset mid-cycle");
        @(negedge clk);
        rst = 1'b0;
        #1;
      end
      step(1'($urandom), 1'($urandom), 3'($urandom));
      check("random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
