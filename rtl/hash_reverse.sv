// Hash reversal stage (second pipeline stage) of the privacy-amplification
// core.
//
// In a top-right group the RB's hash elements, left to right along a row, are
// T(k) with rising k, the order in which the hash memory stores them; in the
// main and bottom-left groups they come from the first column of the
// Toeplitz matrix and run the other way, so the stored word is used with its
// bit order reversed (bit k <- bit p-1-k). This stage registers the word,
// reversed when `rev` is set, so that the PMAC always sees element k of an RB
// row at bit k.
//
// Timing: one register stage; `en` gates the load.
module hash_reverse #(
  parameter int unsigned P = 256
) (
  input  logic         clk,
  input  logic         en,
  input  logic         rev,
  input  logic [P-1:0] hash_in,
  output logic [P-1:0] hash_out
);

  logic [P-1:0] reversed;

  always_comb begin
    for (int k = 0; k < P; k++) reversed[k] = hash_in[P-1-k];
  end

  always_ff @(posedge clk) begin
    if (en) hash_out <= rev ? reversed : hash_in;
  end

endmodule
