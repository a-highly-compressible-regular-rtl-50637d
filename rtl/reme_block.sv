// REM block: one regular-expression matching block, taking one byte per
// clock and flagging each position where its expression has just matched.
//
// Three stages, each one clock:
//   1. ecd_bram    - the byte addresses the 256 x 8 class table, giving its ECD;
//   2. ecd_decoder - the low 7 bits of the ECD become a one-hot class vector;
//   3. ecd_nfa     - the class vector advances the one-hot state register.
// `match_valid` pulses three clocks after a byte with `in_valid`; `match` is
// then high if the expression matched on a substring ending at that byte.
// Bytes without `in_valid` are ignored and leave the NFA state unchanged.
// The class table can be rewritten through the wr_* port while matching.
//
// Bit 7 of each table entry is stored but not decoded, since only seven ECD
// bits reach the decoder, and the NFA state vector stays inside the block;
// lint reports both as unused on purpose.
//
// The three sub-blocks and their order follow the document; the valid
// signals and the update port are this design's choices.
module reme_block
  import ecd_nfa_pkg::*;
#(
  parameter ecd_table_t  TABLE      = ex_abcd_table(),
  parameter int unsigned NUM_STATES = EX_ABCD_STATES,
  parameter int unsigned NUM_ECDS   = MAX_ECDS,
  parameter int unsigned NUM_EDGES  = EX_ABCD_EDGES,
  parameter nfa_edge_t [NUM_EDGES-1:0] EDGES = ex_abcd_edges(0),
  parameter int unsigned REM_ID     = 0,
  parameter logic [NUM_STATES-1:0] START  = NUM_STATES'(1),
  parameter logic [NUM_STATES-1:0] ACCEPT = NUM_STATES'(1) << (NUM_STATES - 1)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  byte_t     in_byte,
  output logic      match_valid,
  output logic      match,
  input  logic      wr_en,
  input  byte_t     wr_addr,
  input  ecd_word_t wr_data
);

  logic                  ecd_valid;
  ecd_word_t             ecd;
  logic                  vec_valid;
  logic [NUM_ECDS-1:0]   ecd_vec;
  logic [NUM_STATES-1:0] state;

  ecd_bram #(.INIT(TABLE)) u_bram (
    .clk, .rst_n,
    .in_valid, .in_byte,
    .ecd_valid, .ecd,
    .wr_en, .wr_addr, .wr_data
  );

  ecd_decoder #(.NUM_ECDS(NUM_ECDS)) u_dec (
    .clk, .rst_n,
    .ecd_valid,
    .ecd (ecd[ECD_W-1:0]),
    .vec_valid, .ecd_vec
  );

  ecd_nfa #(
    .NUM_STATES(NUM_STATES), .NUM_ECDS(NUM_ECDS), .NUM_EDGES(NUM_EDGES),
    .EDGES(EDGES), .REM_ID(REM_ID), .START(START), .ACCEPT(ACCEPT)
  ) u_nfa (
    .clk, .rst_n,
    .vec_valid, .ecd_vec,
    .state, .match
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) match_valid <= 1'b0;
    else        match_valid <= vec_valid;
  end

endmodule
