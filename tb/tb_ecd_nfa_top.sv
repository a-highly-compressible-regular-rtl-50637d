// End-to-end testbench for ecd_nfa_top with two REM blocks: block 0 holds
// the example (a|b)*(cd), block 1 the expression c+d. A random byte stream
// with idle clocks and long back-to-back bursts is checked, byte by byte,
// against the independent three-character reference rules: the match vector,
// its AND, the any flag, the lowest index and the four-clock latency. Midway
// both class tables are rewritten through the update port.
// Counted mechanisms (each must occur at least once): a match of each
// block, both blocks matching on the same byte (AND), an idle clock, a burst
// of 32 bytes delivered at one result per clock, and a match that relied on
// an updated class.
module tb_ecd_nfa_top;
  import ecd_nfa_pkg::*;
  import ecd_ref_pkg::*;

  localparam int LATENCY = 4;
  localparam int NREM = 2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  byte_t in_byte = '0;
  logic out_valid;
  logic [NREM-1:0] match_vec;
  logic match_all, match_any;
  logic [0:0] match_id;
  logic tbl_wr_en = 0;
  logic [0:0] tbl_rem = '0;
  byte_t tbl_addr = '0;
  ecd_word_t tbl_data = '0;
  int checks = 0, failures = 0;

  ecd_nfa_top #(
    .NUM_REM(NREM),
    .NUM_STATES(EX_ABCD_STATES),
    .NUM_EDGES(EX_ABCD_EDGES + EX_CD_EDGES),
    .TABLES({ex_cd_table(), ex_abcd_table()}),
    .EDGES({ex_cd_edges(4'd1), ex_abcd_edges(4'd0)}),
    .ACCEPT({5'b00100, 5'b10000})
  ) dut (.*);

  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at cycle %0d: %s", cycle, what); end
  endtask

  typedef struct {
    int cyc;
    bit [NREM-1:0] m;
    bit upd;
  } exp_t;
  exp_t expq [$];

  int cls0 [256], cls1 [256];
  int a0 = 3, a1 = 3, a2 = 3;  // classes of last three bytes, block 0
  int c0 = 2, c1 = 2;          // classes of last two bytes, block 1
  int n = 0;
  logic [7:0] r0 = '0, r1 = '0, r2 = '0;
  int n_m0 = 0, n_m1 = 0, n_all = 0, n_idle = 0, n_upd = 0, n_burst = 0;
  int run = 0, last_out = -10;

  // result monitor
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      if (expq.size() == 0) check(0, "unexpected result");
      else begin
        exp_t e;
        e = expq.pop_front();
        check(cycle == e.cyc + LATENCY, $sformatf("latency %0d", cycle - e.cyc));
        check(match_vec == e.m, $sformatf("match_vec %b expected %b", match_vec, e.m));
        check(match_all == (&e.m), "match_all");
        check(match_any == (|e.m), "match_any");
        check(match_id == ((e.m[0] || !e.m[1]) ? 1'b0 : 1'b1), "match_id");
        if (match_vec[0]) n_m0++;
        if (match_vec[1]) n_m1++;
        if (match_all) n_all++;
        if (e.upd && |match_vec) n_upd++;
        run = (last_out == cycle - 1) ? run + 1 : 1;
        last_out = cycle;
        if (run == 32) n_burst++;
      end
    end
  end

  task automatic drive_byte(logic [7:0] b, bit after_update);
    bit upd;
    in_valid <= 1; in_byte <= b;
    a2 = a1; a1 = a0; a0 = cls0[b];
    c1 = c0; c0 = cls1[b];
    r2 = r1; r1 = r0; r0 = b;
    n++;
    upd = after_update && (r2 == 8'h65 || r1 == 8'h78 || r0 == 8'h78);
    expq.push_back('{cycle, {cd_match(c1, c0, n), abcd_match(a2, a1, a0, n)}, upd});
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      cls0[i] = abcd_class(i);
      cls1[i] = cd_class(i);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 8000; i++) begin
      bit burst;
      burst = (i % 1000) < 40;  // 40 back-to-back bytes every 1000 clocks
      @(posedge clk); #2;
      tbl_wr_en <= 0;
      if (!burst && $urandom_range(0, 4) == 0) begin
        in_valid <= 0;
        n_idle++;
      end else begin
        logic [7:0] b;
        b = pick_byte();
        if ($urandom_range(0, 9) == 0) b = 8'h78;  // 'x'
        drive_byte(b, i > 4001);
      end
      // 'e' joins class a|b of block 0; 'x' joins class c of block 1
      if (i == 4000) begin
        tbl_wr_en <= 1; tbl_rem <= 1'b0; tbl_addr <= 8'h65; tbl_data <= 8'd0;
        cls0[8'h65] = CL_AB;
      end
      if (i == 4001) begin
        tbl_wr_en <= 1; tbl_rem <= 1'b1; tbl_addr <= 8'h78; tbl_data <= 8'd0;
        cls1[8'h78] = 0;
      end
    end
    @(posedge clk); #2;
    in_valid <= 0;
    tbl_wr_en <= 0;
    repeat (LATENCY + 2) @(posedge clk);
    #3;
    check(expq.size() == 0, "all results delivered");
    check(n_m0 > 0, "block 0 matched");
    check(n_m1 > 0, "block 1 matched");
    check(n_all > 0, "both blocks matched on one byte");
    check(n_idle > 0, "idle clocks occurred");
    check(n_burst > 0, "burst delivered at one result per clock");
    check(n_upd > 0, "an updated class took part in a match");
    $display("block0=%0d block1=%0d all=%0d idle=%0d bursts=%0d updated=%0d",
             n_m0, n_m1, n_all, n_idle, n_burst, n_upd);
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
