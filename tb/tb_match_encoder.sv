// Testbench for match_encoder with three REM inputs: every input pattern,
// in random order and with idle clocks, is checked one clock later against
// its vector, AND, OR and lowest-set-bit index, and outputs must hold while
// the input is idle.
module tb_match_encoder;
  localparam int N = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [N-1:0] rem_match = '0;
  logic out_valid;
  logic [N-1:0] match_vec;
  logic match_all, match_any;
  logic [1:0] match_id;
  int checks = 0, failures = 0;
  logic [N-1:0] last = '0;

  match_encoder #(.NUM_REM(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int lowest(logic [N-1:0] v);
    for (int i = 0; i < N; i++) if (v[i]) return i;
    return 0;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      logic [N-1:0] v;
      bit valid;
      v = N'($urandom_range(0, (1 << N) - 1));
      valid = (i < 8) || ($urandom_range(0, 3) != 0);
      if (i < 8) v = N'(i);
      in_valid <= valid; rem_match <= v;
      @(posedge clk); #1;
      if (valid) last = v;
      check(out_valid == valid, "out_valid follows in_valid");
      check(match_vec == last, "match vector");
      check(match_all == (last == '1), "AND of matches");
      check(match_any == (last != '0), "OR of matches");
      check(int'(match_id) == lowest(last), "lowest matching index");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
