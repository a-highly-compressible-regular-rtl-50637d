// Full-size testbench: ecd_nfa_top with every parameter at its default (one
// REM block holding (a|b)*(cd), 128 ECDs). It streams the words "aacd",
// "bacd", "cd", "abcd" and "caaacd" separated by spaces, back to back at one
// byte per clock, and checks every result against the three-character
// reference rule, the four-clock latency, one result per clock, and the
// expected match positions:
// a match on the last byte of "aacd", "bacd", "abcd" and "caaacd" (the search
// is unanchored, so the "aacd" inside it is found), none for "cd".
module tb_ecd_nfa_top_full;
  import ecd_nfa_pkg::*;
  import ecd_ref_pkg::*;

  localparam int LATENCY = 4;
  localparam string TEXT = "aacd bacd cd abcd caaacd ";

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  byte_t in_byte = '0;
  logic out_valid;
  logic [0:0] match_vec;
  logic match_all, match_any;
  logic [0:0] match_id;
  logic tbl_wr_en = 0;
  logic [0:0] tbl_rem = '0;
  byte_t tbl_addr = '0;
  ecd_word_t tbl_data = '0;
  int checks = 0, failures = 0;

  ecd_nfa_top dut (.*);

  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at cycle %0d: %s", cycle, what); end
  endtask

  int exp_cyc [$];
  bit exp_m [$];
  int pos = 0;
  int hits [$];
  int first_out = 0, last_out = 0;

  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      if (exp_cyc.size() == 0) check(0, "unexpected result");
      else begin
        int c;
        bit m;
        c = exp_cyc.pop_front();
        m = exp_m.pop_front();
        check(cycle == c + LATENCY, "latency");
        check(match_vec[0] == m, $sformatf("match at text position %0d", pos));
        check(match_all == m && match_any == m && match_id == 1'b0, "encoder outputs");
        if (match_vec[0]) hits.push_back(pos);
        if (pos == 0) first_out = cycle;
        last_out = cycle;
        pos++;
      end
    end
  end

  initial begin
    int h0, h1, h2;
    h0 = 3; h1 = 3; h2 = 3;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < TEXT.len(); i++) begin
      @(posedge clk); #2;
      in_valid <= 1; in_byte <= TEXT[i];
      h2 = h1; h1 = h0; h0 = abcd_class(int'(TEXT[i]));
      exp_cyc.push_back(cycle);
      exp_m.push_back(abcd_match(h2, h1, h0, i + 1));
    end
    @(posedge clk); #2;
    in_valid <= 0;
    repeat (LATENCY + 2) @(posedge clk);
    #3;
    check(exp_cyc.size() == 0, "all results delivered");
    // back-to-back input gives one result per clock
    check(last_out - first_out == TEXT.len() - 1,
          $sformatf("%0d results took %0d clocks", TEXT.len(), last_out - first_out + 1));
    // last-byte positions of aacd, bacd, abcd, caaacd
    check(hits.size() == 4, $sformatf("%0d matches", hits.size()));
    if (hits.size() == 4) begin
      check(hits[0] == 3,  "aacd matched");
      check(hits[1] == 8,  "bacd matched");
      check(hits[2] == 16, "abcd matched");
      check(hits[3] == 23, "caaacd matched");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
