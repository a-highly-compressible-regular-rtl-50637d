// Testbench for reme_block with the example expression (a|b)*(cd).
// A random byte stream with idle clocks is matched against the
// three-character reference rule. Each result must arrive exactly three
// clocks after its byte. Midway the class table is rewritten so that 'e'
// joins class a|b and 'x' joins class c, and the reference follows suit.
module tb_reme_block;
  import ecd_nfa_pkg::*;
  import ecd_ref_pkg::*;

  localparam int LATENCY = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  byte_t in_byte = '0;
  logic match_valid, match;
  logic wr_en = 0;
  byte_t wr_addr = '0;
  ecd_word_t wr_data = '0;
  int checks = 0, failures = 0;

  int cycle = 0;
  int ref_cls [256];
  int h0 = 3, h1 = 3, h2 = 3, n = 0;
  logic [7:0] r0 = '0, r1 = '0, r2 = '0;  // last raw bytes
  int exp_cycle [$];
  bit exp_match [$];
  int n_match = 0, n_updated_hits = 0, n_idle = 0;

  reme_block dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at cycle %0d: %s", cycle, what); end
  endtask

  // result monitor
  always @(posedge clk) begin
    #1;
    if (rst_n && match_valid) begin
      if (exp_cycle.size() == 0) check(0, "unexpected result");
      else begin
        int c;
        bit m;
        c = exp_cycle.pop_front();
        m = exp_match.pop_front();
        check(cycle == c + LATENCY, $sformatf("latency %0d", cycle - c));
        check(match == m, $sformatf("match %0d expected %0d", match, m));
        if (match) n_match++;
      end
    end
  end

  initial begin
    for (int i = 0; i < 256; i++) ref_cls[i] = abcd_class(i);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 6000; i++) begin
      @(posedge clk); #2;
      wr_en <= 0;
      if ($urandom_range(0, 4) == 0) begin
        in_valid <= 0;
        n_idle++;
      end else begin
        logic [7:0] b;
        b = pick_byte();
        if ($urandom_range(0, 9) == 0) b = 8'h78;  // 'x'
        in_valid <= 1; in_byte <= b;
        h2 = h1; h1 = h0; h0 = ref_cls[b]; n++;
        r2 = r1; r1 = r0; r0 = b;
        if (i > 3001 && (r2 == 8'h65 || r1 == 8'h78) && abcd_match(h2, h1, h0, n))
          n_updated_hits++;
        exp_cycle.push_back(cycle);
        exp_match.push_back(abcd_match(h2, h1, h0, n));
      end
      if (i == 3000) begin
        wr_en <= 1; wr_addr <= 8'h65; wr_data <= 8'd0;  // 'e' -> class a|b
      end
      if (i == 3001) begin
        wr_en <= 1; wr_addr <= 8'h78; wr_data <= 8'd1;  // 'x' -> class c
      end
      // the write lands after this byte's read: update the reference now
      if (i == 3000) ref_cls[8'h65] = CL_AB;
      if (i == 3001) ref_cls[8'h78] = CL_C;
    end
    @(posedge clk); #2;
    in_valid <= 0;
    wr_en <= 0;
    repeat (LATENCY + 2) @(posedge clk);
    #3;
    check(exp_cycle.size() == 0, "all results delivered");
    check(n_match > 20, "stream produced matches");
    check(n_updated_hits > 0, "updated classes took part in matches");
    $display("matches=%0d idle=%0d updated_class_matches=%0d", n_match, n_idle, n_updated_hits);
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
