// ECD class table: a 256 x 8-bit block RAM that maps every input byte to the
// equivalence class descriptor (ECD) of its class.
//
// The input byte is the read address; the entry read out is the byte's ECD.
// The read is synchronous, as in an FPGA block RAM: an ECD appears one clock
// after its byte, with `ecd_valid` following `in_valid` by the same clock.
// The table starts out holding INIT, the table produced for the expression
// when the design is built. A write port lets the table be changed while the
// matcher runs, so that classes can be updated without a rebuild; a read and
// a write to the same entry in one clock return the old entry.
//
// The 256 x 8 size and the byte-to-ECD look-up follow the document. The
// write port, its read-before-write behaviour and the valid signal are this
// design's own choices.
module ecd_bram
  import ecd_nfa_pkg::*;
#(
  parameter ecd_table_t INIT = ex_abcd_table()
) (
  input  logic      clk,
  input  logic      rst_n,
  // byte stream
  input  logic      in_valid,
  input  byte_t     in_byte,
  output logic      ecd_valid,
  output ecd_word_t ecd,
  // table update port
  input  logic      wr_en,
  input  byte_t     wr_addr,
  input  ecd_word_t wr_data
);

  ecd_word_t mem [256];

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = INIT[i];
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    ecd <= mem[in_byte];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ecd_valid <= 1'b0;
    else        ecd_valid <= in_valid;
  end

endmodule
