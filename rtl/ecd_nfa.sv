// ECD-NFA: a nondeterministic finite automaton built as one flip-flop per
// state, whose transitions are labelled with ECDs instead of characters.
//
// Every active state fires, in parallel, each of its outgoing edges whose ECD
// set contains the current ECD; the next state vector is the OR of the
// destinations of all fired edges. Because the input is one-hot over the ECDs,
// an edge fires when (state[src] & |(ecd_vec & edge.ecds)). The state vector
// advances once per valid input, so the matcher takes one character per clock
// whatever the number of active states. `match` is high while an accepting
// state is active, i.e. from the clock after the ECD of the last character of
// a match was presented until the next valid input.
//
// The edge list EDGES may hold the edges of several REM blocks; this instance
// uses only those whose `rem` field equals REM_ID. The defaults are the
// document's example, the NFA of (a|b)*(cd) with states 0..4 and state 4
// accepting. Reset activates the START states (state 0). The state 0
// self-loop on every ECD keeps the search unanchored, as drawn in the
// document; reset values and the valid handshake are this design's choices.
module ecd_nfa
  import ecd_nfa_pkg::*;
#(
  parameter int unsigned NUM_STATES = EX_ABCD_STATES,
  parameter int unsigned NUM_ECDS   = MAX_ECDS,
  parameter int unsigned NUM_EDGES  = EX_ABCD_EDGES,
  parameter nfa_edge_t [NUM_EDGES-1:0] EDGES = ex_abcd_edges(0),
  parameter int unsigned REM_ID     = 0,
  parameter logic [NUM_STATES-1:0] START  = NUM_STATES'(1),
  parameter logic [NUM_STATES-1:0] ACCEPT = NUM_STATES'(1) << (NUM_STATES - 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  vec_valid,
  input  logic [NUM_ECDS-1:0]   ecd_vec,
  output logic [NUM_STATES-1:0] state,
  output logic                  match
);

  logic [NUM_STATES-1:0] next_state;

  always_comb begin
    next_state = '0;
    for (int k = 0; k < NUM_EDGES; k++) begin
      if (EDGES[k].rem == REM_W'(REM_ID) && |(ecd_vec & EDGES[k].ecds[NUM_ECDS-1:0])) begin
        for (int s = 0; s < NUM_STATES; s++) begin
          for (int d = 0; d < NUM_STATES; d++) begin
            if (EDGES[k].src == STATE_W'(s) && EDGES[k].dst == STATE_W'(d) && state[s])
              next_state[d] = 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         state <= START;
    else if (vec_valid) state <= next_state;
  end

  assign match = |(state & ACCEPT);

  // The decoder drives at most one ECD bit at a time.
  a_onehot_ecd : assert property (@(posedge clk) disable iff (!rst_n)
                                  vec_valid |-> $onehot0(ecd_vec));

endmodule
