// Shared types and constants of the ECD-NFA regular-expression matcher.
//
// An ECD (equivalence class descriptor) is a small integer naming a class of
// input bytes that all have the same effect on an NFA. The matcher looks each
// input byte up in a 256-entry class table, decodes the 7-bit ECD to a one-hot
// vector, and drives a one-hot NFA whose transitions are labelled with ECDs.
//
// The NFA is described by an edge list. Each edge names the REM block (one
// regular expression per block) it belongs to, its source and destination
// states and the set of ECDs that fire it, as a 128-bit mask. The example
// expression (a|b)*(cd) follows the document: its class table maps a,b to
// ECD 0, c to 1, d to 2 and every other byte to 3, and its NFA has five states
// and seven edges (0->0 on {0,1,2,3}, 0->1, 0->2, 1->1 and 1->2 on {0},
// 2->3 on {1}, 3->4 on {2}) with state 4 accepting. The second example,
// c+d, is this design's own, used only to exercise several REM blocks at once.
package ecd_nfa_pkg;

  localparam int unsigned BYTE_W   = 8;    // input character width
  localparam int unsigned ECD_W    = 7;    // ECD bits used by the decoder
  localparam int unsigned ECD_WORD = 8;    // width of one class-table entry
  localparam int unsigned MAX_ECDS = 1 << ECD_W;  // 128 classes
  localparam int unsigned STATE_W  = 8;    // width of a state index in an edge
  localparam int unsigned REM_W    = 4;    // width of a REM index in an edge

  typedef logic [BYTE_W-1:0]   byte_t;
  typedef logic [ECD_WORD-1:0] ecd_word_t;
  typedef logic [MAX_ECDS-1:0] ecd_mask_t;
  typedef logic [255:0][ECD_WORD-1:0] ecd_table_t;

  // One NFA transition: taken from state src to state dst when the current
  // ECD is in the set ecds and the edge belongs to REM block rem.
  typedef struct packed {
    logic [REM_W-1:0]   rem;
    logic [STATE_W-1:0] src;
    logic [STATE_W-1:0] dst;
    ecd_mask_t          ecds;
  } nfa_edge_t;

  // Build an ECD mask holding the listed classes (up to four; -1 = unused).
  function automatic ecd_mask_t ecd_set(int e0, int e1 = -1, int e2 = -1, int e3 = -1);
    ecd_mask_t m;
    m = '0;
    if (e0 >= 0) m[e0] = 1'b1;
    if (e1 >= 0) m[e1] = 1'b1;
    if (e2 >= 0) m[e2] = 1'b1;
    if (e3 >= 0) m[e3] = 1'b1;
    return m;
  endfunction

  // Class table of (a|b)*(cd): a,b -> 0, c -> 1, d -> 2, everything else -> 3.
  function automatic ecd_table_t ex_abcd_table();
    ecd_table_t t;
    for (int c = 0; c < 256; c++) begin
      unique case (c)
        "a", "b": t[c] = 8'd0;
        "c":      t[c] = 8'd1;
        "d":      t[c] = 8'd2;
        default:  t[c] = 8'd3;
      endcase
    end
    return t;
  endfunction

  localparam int unsigned EX_ABCD_STATES = 5;
  localparam int unsigned EX_ABCD_EDGES  = 7;

  // ECD-labelled NFA of (a|b)*(cd) for REM block `rem`.
  function automatic logic [EX_ABCD_EDGES-1:0][$bits(nfa_edge_t)-1:0] ex_abcd_edges(logic [REM_W-1:0] rem);
    logic [EX_ABCD_EDGES-1:0][$bits(nfa_edge_t)-1:0] e;
    e[0] = {rem, STATE_W'(0), STATE_W'(0), ecd_set(0, 1, 2, 3)};
    e[1] = {rem, STATE_W'(0), STATE_W'(1), ecd_set(0)};
    e[2] = {rem, STATE_W'(0), STATE_W'(2), ecd_set(0)};
    e[3] = {rem, STATE_W'(1), STATE_W'(1), ecd_set(0)};
    e[4] = {rem, STATE_W'(1), STATE_W'(2), ecd_set(0)};
    e[5] = {rem, STATE_W'(2), STATE_W'(3), ecd_set(1)};
    e[6] = {rem, STATE_W'(3), STATE_W'(4), ecd_set(2)};
    return e;
  endfunction

  // Class table of c+d: c -> 0, d -> 1, everything else -> 2.
  function automatic ecd_table_t ex_cd_table();
    ecd_table_t t;
    for (int c = 0; c < 256; c++) begin
      unique case (c)
        "c":     t[c] = 8'd0;
        "d":     t[c] = 8'd1;
        default: t[c] = 8'd2;
      endcase
    end
    return t;
  endfunction

  localparam int unsigned EX_CD_EDGES = 4;

  // ECD-labelled NFA of c+d: 0->0 on all, 0->1 and 1->1 on {0}, 1->2 on {1}.
  function automatic logic [EX_CD_EDGES-1:0][$bits(nfa_edge_t)-1:0] ex_cd_edges(logic [REM_W-1:0] rem);
    logic [EX_CD_EDGES-1:0][$bits(nfa_edge_t)-1:0] e;
    e[0] = {rem, STATE_W'(0), STATE_W'(0), ecd_set(0, 1, 2)};
    e[1] = {rem, STATE_W'(0), STATE_W'(1), ecd_set(0)};
    e[2] = {rem, STATE_W'(1), STATE_W'(1), ecd_set(0)};
    e[3] = {rem, STATE_W'(1), STATE_W'(2), ecd_set(1)};
    return e;
  endfunction

endpackage
