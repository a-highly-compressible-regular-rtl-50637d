// Testbench for ecd_decoder: every 7-bit ECD must give exactly its own bit
// one clock later, and the valid flag must follow with the same delay.
module tb_ecd_decoder;
  import ecd_nfa_pkg::*;

  logic clk = 0, rst_n = 0;
  logic ecd_valid = 0;
  logic [ECD_W-1:0] ecd = '0;
  logic vec_valid;
  logic [MAX_ECDS-1:0] ecd_vec;
  int checks = 0, failures = 0;

  ecd_decoder dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(vec_valid == 0 && ecd_vec == '0, "reset clears outputs");
    rst_n <= 1;
    @(posedge clk);
    for (int e = 0; e < 128; e++) begin
      ecd_valid <= (e % 5 != 0); ecd <= ECD_W'(e);
      @(posedge clk); #1;
      check(vec_valid == (e % 5 != 0), "vec_valid follows ecd_valid");
      for (int b = 0; b < 128; b++)
        check(ecd_vec[b] == (b == e), $sformatf("ecd %0d bit %0d", e, b));
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
