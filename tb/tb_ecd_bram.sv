// Testbench for ecd_bram: checks every entry of the example class table,
// the one-clock read latency and the valid flag, a table write, and that a
// read and a write of the same entry in one clock return the old entry.
module tb_ecd_bram;
  import ecd_nfa_pkg::*;
  import ecd_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  byte_t in_byte = '0;
  logic ecd_valid;
  ecd_word_t ecd;
  logic wr_en = 0;
  byte_t wr_addr = '0;
  ecd_word_t wr_data = '0;
  int checks = 0, failures = 0;

  ecd_bram dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // every entry, one per clock, result one clock later
    for (int i = 0; i < 256; i++) begin
      in_valid <= 1; in_byte <= byte_t'(i);
      @(posedge clk);
      #1;
      check(ecd_valid == 1, "ecd_valid one clock after in_valid");
      check(int'(ecd) == abcd_class(i), $sformatf("entry %0d = %0d", i, ecd));
    end
    in_valid <= 0;
    @(posedge clk); #1;
    check(ecd_valid == 0, "ecd_valid drops with in_valid");
    // read and write the same entry in one clock: old value is returned
    in_valid <= 1; in_byte <= 8'h65; wr_en <= 1; wr_addr <= 8'h65; wr_data <= 8'd0;
    @(posedge clk); #1;
    check(ecd == 8'd3, "read during write returns old entry");
    wr_en <= 0;
    @(posedge clk); #1;
    check(ecd == 8'd0, "written entry reads back");
    in_byte <= 8'h64;
    @(posedge clk); #1;
    check(ecd == 8'd2, "other entries unchanged");
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
