// Match encoder: gathers the 1-bit match outputs of the REM blocks into one
// registered match vector and combines them.
//
// Each clock with `in_valid` it stores the REM matches as `match_vec` (bit r
// for REM block r) and forms `match_all`, the AND of all bits, which flags a
// position where every expression matches at once. It also encodes the vector
// as `match_any` (some bit set) and `match_id`, the index of the lowest set
// bit. Outputs appear one clock after the inputs, with `out_valid` following
// `in_valid`; they hold their value between valid inputs.
//
// Storing the matches as a vector and ANDing them follows the document. The
// binary index, the any flag and the register are this design's choices.
module match_encoder #(
  parameter int unsigned NUM_REM = 1,
  localparam int unsigned ID_W   = (NUM_REM > 1) ? $clog2(NUM_REM) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [NUM_REM-1:0] rem_match,
  output logic               out_valid,
  output logic [NUM_REM-1:0] match_vec,
  output logic               match_all,
  output logic               match_any,
  output logic [ID_W-1:0]    match_id
);

  logic [ID_W-1:0] first_id;

  always_comb begin
    first_id = '0;
    for (int r = NUM_REM - 1; r >= 0; r--) begin
      if (rem_match[r]) first_id = ID_W'(r);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      match_vec <= '0;
      match_all <= 1'b0;
      match_any <= 1'b0;
      match_id  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        match_vec <= rem_match;
        match_all <= &rem_match;
        match_any <= |rem_match;
        match_id  <= first_id;
      end
    end
  end

endmodule
