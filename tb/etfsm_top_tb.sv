// End-to-end self-checking testbench for etfsm_top, at its default sizes.
//
// A reference model of the whole machine (state table, Moore outputs,
// scan shift, diagnostic cycle, reset) is kept in the testbench and compared
// with the design's state, y and tdo after every clock. The test runs the
// three ways the structure is meant to be used:
//   1. Scan-based transition test: for every working state and both values
//      of x, force the state through tdi in three clocks, apply one normal
//      clock, then unload the resulting state through tdo and compare it with
//      the table. This checks all ten transitions without any synchronizing
//      or homing sequence.
//   2. Diagnostic tour: from a scanned-in start state, hold diag = 1 and
//      check that the outputs step through all five states and return.
//   3. Random operation mixing normal, scan and diagnostic clocks, with
//      scanned-in unused codes and asynchronous resets.
// Every mechanism (reset, scan set, scan unload, normal transition, each
// table edge, complete Hamiltonian tour, recovery from an unused code) is
// counted, and one that never happened counts as a failure.
module etfsm_top_tb;
  import etfsm_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  logic       x;
  logic       sh;
  logic       diag;
  logic       tdi;
  logic       tdo;
  logic [2:0] y;
  logic [2:0] state;

  int checks = 0;
  int failures = 0;

  int n_reset = 0, n_scan_set = 0, n_scan_unload = 0, n_normal = 0;
  int n_tour = 0, n_recover = 0, n_diag = 0;
  logic [9:0] edges_seen = '0;   // bit = 2*(state-1) + x

  logic [2:0] ref_q;

  etfsm_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference functions, written from the specification of the example.
  function automatic logic [2:0] ref_next(logic [2:0] s, logic xi);
    case (s)
      3'd1: return xi ? 3'd2 : 3'd1;
      3'd2: return xi ? 3'd3 : 3'd4;
      3'd3: return 3'd5;
      3'd4: return xi ? 3'd5 : 3'd2;
      3'd5: return xi ? 3'd1 : 3'd5;
      default: return 3'd1;
    endcase
  endfunction

  function automatic logic [2:0] ref_y(logic [2:0] s);
    case (s)
      3'd1: return 3'b000;
      3'd2: return 3'b001;
      3'd3: return 3'b010;
      3'd4: return 3'b100;
      3'd5: return 3'b011;
      default: return 3'b111;
    endcase
  endfunction

  task automatic compare(string what);
    checks++;
    if (state !== ref_q || y !== ref_y(ref_q) || tdo !== ref_q[2]) begin
      failures++;
      $display("FAIL %s: state=%b y=%b tdo=%b expected %b/%b/%b",
               what, state, y, tdo, ref_q, ref_y(ref_q), ref_q[2]);
    end
  endtask

  // One clock with the given mode inputs; the reference follows.
  task automatic clock(logic s, logic d, logic dg, logic xi);
    sh = s; tdi = d; diag = dg; x = xi;
    @(posedge clk);
    if (s)
      ref_q = {ref_q[1:0], d};
    else if (dg)
      ref_q = (ref_q >= 3'd1 && ref_q <= 3'd4) ? ref_q + 3'd1 : 3'd1;
    else begin
      if (ref_q >= 3'd1 && ref_q <= 3'd5) edges_seen[2*(int'(ref_q)-1) + int'(xi)] = 1'b1;
      if (ref_q < 3'd1 || ref_q > 3'd5) n_recover++;
      ref_q = ref_next(ref_q, xi);
      n_normal++;
    end
    if (dg && !s) n_diag++;
    #1;
    compare(s ? "shift" : (dg ? "diag" : "normal"));
  endtask

  // Shift a code in, MSB first; returns the code that came out on tdo.
  task automatic scan(logic [2:0] code, output logic [2:0] unloaded);
    for (int b = 2; b >= 0; b--) begin
      unloaded[b] = tdo;
      clock(1'b1, code[b], 1'b0, 1'b0);
    end
    n_scan_set++;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1;
    #1 ref_q = 3'd1;
    n_reset++;
    compare("reset");
    @(negedge clk);
    rst = 1'b0;
    #1;
  endtask

  initial begin
    logic [2:0] out, expect_out;
    rst = 1'b1; sh = 1'b0; diag = 1'b0; x = 1'b0; tdi = 1'b0;
    #2 ref_q = 3'd1;
    n_reset++;
    compare("power-on reset");
    @(negedge clk);
    rst = 1'b0;
    #1;

    // 1. Scan-based transition test of every table edge.
    for (int s = 1; s <= 5; s++) begin
      for (int xv = 0; xv < 2; xv++) begin
        scan(3'(s), out);
        clock(1'b0, 1'b0, 1'b0, 1'(xv));
        expect_out = ref_next(3'(s), 1'(xv));
        scan(3'($urandom_range(1, 5)), out);
        checks++;
        n_scan_unload++;
        if (out !== expect_out) begin
          failures++;
          $display("FAIL scan test: state %0d x=%0d unloaded %b expected %b", s, xv, out, expect_out);
        end
      end
    end

    // 2. Diagnostic tour from every working state.
    for (int s = 1; s <= 5; s++) begin
      logic [7:0] visited;
      int start_y;
      scan(3'(s), out);
      visited = '0;
      for (int i = 0; i < 5; i++) begin
        visited[ref_y(state)] = 1'b1;
        clock(1'b0, 1'b0, 1'b1, 1'($urandom));
      end
      checks++;
      if (state !== 3'(s) || visited !== 8'b0001_1111) begin
        failures++;
        $display("FAIL tour from %0d: end %0d, outputs seen %b", s, state, visited);
      end else
        n_tour++;
    end

    // Recovery from unused codes in normal and in diagnostic mode.
    for (int c = 0; c < 8; c++) begin
      if (c >= 1 && c <= 5) continue;
      scan(3'(c), out);
      clock(1'b0, 1'b0, 1'(c[0]), 1'($urandom));
      checks++;
      if (state !== 3'd1) begin
        failures++;
        $display("FAIL recovery from %b: state %b", 3'(c), state);
      end else
        n_recover++;
    end

    // 3. Random operation.
    do_reset();
    repeat (3000) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 2) do_reset();
      else if (r < 30) clock(1'b1, 1'($urandom), 1'($urandom), 1'($urandom));
      else if (r < 50) clock(1'b0, 1'($urandom), 1'b1, 1'($urandom));
      else clock(1'b0, 1'($urandom), 1'b0, 1'($urandom));
    end

    $display("mechanisms: reset=%0d scan_set=%0d scan_unload=%0d normal=%0d edges=%b diag=%0d tours=%0d recover=%0d",
             n_reset, n_scan_set, n_scan_unload, n_normal, edges_seen, n_diag, n_tour, n_recover);
    checks++; if (n_reset == 0) begin failures++; $display("FAIL no reset"); end
    checks++; if (n_scan_set == 0) begin failures++; $display("FAIL no scan set"); end
    checks++; if (n_scan_unload == 0) begin failures++; $display("FAIL no scan unload"); end
    checks++; if (n_normal == 0) begin failures++; $display("FAIL no normal clock"); end
    checks++; if (edges_seen !== '1) begin failures++; $display("FAIL table edges missed %b", edges_seen); end
    checks++; if (n_diag == 0) begin failures++; $display("FAIL no diagnostic clock"); end
    checks++; if (n_tour == 0) begin failures++; $display("FAIL no complete tour"); end
    checks++; if (n_recover == 0) begin failures++; $display("FAIL no recovery"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
