// ECD-NFA matcher top: NUM_REM regular-expression matching (REM) blocks that
// all watch the same byte stream, one byte per clock, and a match encoder
// that combines their 1-bit match outputs.
//
// Each REM block r has its own class table TABLES[r] and takes the edges of
// EDGES whose `rem` field is r, with START[r] and ACCEPT[r] as its start and
// accepting states (all blocks share NUM_STATES, the largest state count).
// A byte presented with `in_valid` in clock t gives `out_valid` in clock t+4:
// one clock each for the table read, the ECD decode, the NFA step and the
// match encoder. `match_vec[r]` then says whether expression r matched on a
// substring ending at that byte, `match_all` is their AND, and `match_any`
// and `match_id` give whether any matched and the lowest such r.
// The class tables are rewritten through the tbl_* port (table `tbl_rem`,
// entry `tbl_addr`); the new class takes effect for bytes presented after
// the write clock.
//
// The defaults give the document's main configuration: one byte wide, one
// expression per matcher, the example expression (a|b)*(cd). The valid
// signals, the table write port and the encoder's index output are this
// design's own choices.
module ecd_nfa_top
  import ecd_nfa_pkg::*;
#(
  parameter int unsigned NUM_REM    = 1,
  parameter int unsigned NUM_STATES = EX_ABCD_STATES,
  parameter int unsigned NUM_ECDS   = MAX_ECDS,
  parameter int unsigned NUM_EDGES  = EX_ABCD_EDGES,
  parameter ecd_table_t [NUM_REM-1:0] TABLES = {NUM_REM{ex_abcd_table()}},
  parameter nfa_edge_t  [NUM_EDGES-1:0] EDGES = ex_abcd_edges(0),
  parameter logic [NUM_REM-1:0][NUM_STATES-1:0] START  = {NUM_REM{NUM_STATES'(1)}},
  parameter logic [NUM_REM-1:0][NUM_STATES-1:0] ACCEPT =
    {NUM_REM{NUM_STATES'(1) << (NUM_STATES - 1)}},
  localparam int unsigned ID_W = (NUM_REM > 1) ? $clog2(NUM_REM) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // input byte stream
  input  logic               in_valid,
  input  byte_t              in_byte,
  // match results
  output logic               out_valid,
  output logic [NUM_REM-1:0] match_vec,
  output logic               match_all,
  output logic               match_any,
  output logic [ID_W-1:0]    match_id,
  // class table update
  input  logic               tbl_wr_en,
  input  logic [ID_W-1:0]    tbl_rem,
  input  byte_t              tbl_addr,
  input  ecd_word_t          tbl_data
);

  logic [NUM_REM-1:0] rem_valid;
  logic [NUM_REM-1:0] rem_match;

  for (genvar r = 0; r < NUM_REM; r++) begin : g_rem
    reme_block #(
      .TABLE(TABLES[r]),
      .NUM_STATES(NUM_STATES), .NUM_ECDS(NUM_ECDS), .NUM_EDGES(NUM_EDGES),
      .EDGES(EDGES), .REM_ID(r), .START(START[r]), .ACCEPT(ACCEPT[r])
    ) u_rem (
      .clk, .rst_n,
      .in_valid, .in_byte,
      .match_valid(rem_valid[r]),
      .match(rem_match[r]),
      .wr_en(tbl_wr_en && (NUM_REM == 1 || tbl_rem == ID_W'(r))),
      .wr_addr(tbl_addr),
      .wr_data(tbl_data)
    );
  end

  match_encoder #(.NUM_REM(NUM_REM)) u_enc (
    .clk, .rst_n,
    .in_valid(rem_valid[0]),
    .rem_match,
    .out_valid, .match_vec, .match_all, .match_any, .match_id
  );

  initial assert (NUM_REM <= (1 << REM_W))
    else $error("NUM_REM must not exceed %0d", 1 << REM_W);

endmodule
