// ECD decoder: turns the ECD read from the class table into a one-hot bit
// vector, one bit per ECD, that drives the transitions of the ECD-NFA.
//
// Only the low ECD_W (7) bits of the table entry are decoded, giving up to
// 128 classes; bit e of `ecd_vec` is set when the ECD equals e. An ECD at or
// above NUM_ECDS sets no bit. The output is registered, so the vector appears
// one clock after the ECD, with `vec_valid` following `ecd_valid`.
//
// The 7-bit input and the one-hot vector follow the document; the output
// register and the valid signal are this design's choices.
module ecd_decoder
  import ecd_nfa_pkg::*;
#(
  parameter int unsigned NUM_ECDS = MAX_ECDS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ecd_valid,
  input  logic [ECD_W-1:0]    ecd,
  output logic                vec_valid,
  output logic [NUM_ECDS-1:0] ecd_vec
);

  logic [NUM_ECDS-1:0] onehot;

  always_comb begin
    onehot = '0;
    for (int e = 0; e < NUM_ECDS; e++) begin
      if (ecd == ECD_W'(e)) onehot[e] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vec_valid <= 1'b0;
      ecd_vec   <= '0;
    end else begin
      vec_valid <= ecd_valid;
      ecd_vec   <= onehot;
    end
  end

  initial assert (NUM_ECDS >= 1 && NUM_ECDS <= MAX_ECDS)
    else $error("NUM_ECDS must be 1..%0d", MAX_ECDS);

endmodule
