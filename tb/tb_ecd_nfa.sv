// Testbench for ecd_nfa with the example NFA of (a|b)*(cd).
// Part 1 follows the active-state sets by hand for the strings "aacd" and
// "caaacd"; part 2 drives random ECD sequences with idle clocks between them
// and compares `match` with the three-character reference rule.
module tb_ecd_nfa;
  import ecd_nfa_pkg::*;
  import ecd_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic vec_valid = 0;
  logic [MAX_ECDS-1:0] ecd_vec = '0;
  logic [4:0] state;
  logic match;
  int checks = 0, failures = 0;
  int h0 = 3, h1 = 3, h2 = 3, n = 0;
  int n_match = 0, idles = 0;

  ecd_nfa dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // present one ECD (or an idle clock) and wait for the state update
  task automatic step(int e, bit v);
    vec_valid = v;
    ecd_vec   = MAX_ECDS'(1) << e;
    @(posedge clk); #1;
    vec_valid = 0;
  endtask

  task automatic restart();
    rst_n = 0; @(posedge clk); #1;
    check(state == 5'b00001, "reset activates state 0 only");
    rst_n = 1; @(posedge clk); #1;
  endtask

  initial begin
    restart();
    // "aacd": a,a -> {0,1,2}; c -> {0,3}; d -> {0,4}
    step(0, 1); check(state == 5'b00111, "a: states 0,1,2");
    step(0, 1); check(state == 5'b00111, "aa: states 0,1,2");
    step(3, 0); check(state == 5'b00111, "idle clock holds state");
    step(1, 1); check(state == 5'b01001, "aac: states 0,3");
    check(match == 0, "no match before d");
    step(2, 1); check(state == 5'b10001, "aacd: states 0,4");
    check(match == 1, "aacd n_match");
    step(3, 1); check(state == 5'b00001 && match == 0, "match lasts one character");
    // "cd" alone reaches no accepting state
    restart();
    step(1, 1); step(2, 1); check(match == 0, "cd alone does not match");
    // random sequences
    restart();
    for (int i = 0; i < 4000; i++) begin
      bit v;
      int e;
      v = ($urandom_range(0, 3) != 0);
      e = $urandom_range(0, 3);
      if (e == 3 && $urandom_range(0, 1) == 1) e = $urandom_range(0, 2);
      step(e, v);
      if (v) begin
        h2 = h1; h1 = h0; h0 = e; n++;
      end else idles++;
      check(match == abcd_match(h2, h1, h0, n), $sformatf("random step %0d", i));
      check(state[0] == 1, "state 0 stays active");
      if (match) n_match++;
    end
    check(n_match > 10, "random run produced matches");
    $display("matches=%0d idle_clocks=%0d", n_match, idles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
