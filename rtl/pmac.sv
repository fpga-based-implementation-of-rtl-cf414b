// PMAC: p parallel multiply-accumulators over GF(2) (third pipeline stage).
//
// One rhomboid block is a p x p piece of the padded Toeplitz matrix whose
// rows are all the same p hash elements h[0..p-1], each row shifted one
// column to the right of the row above. Row i of the block therefore meets
// data bits i .. i+p-1 of the 2p-bit window {data2, data1} (data1 = column
// word J, data2 = word J+1). Each of the p units forms
//   out[i] = key_mid[i] XOR  XOR_k ( h[k] AND window[i+k] ),
// i.e. p single-bit multiplications (AND) summed with the row's running key
// bit (XOR), all p units in parallel. The operation follows the document;
// the window formulation and the register at the output are this design's.
//
// Timing: result registered, one cycle latency; `en` gates the load.
module pmac #(
  parameter int unsigned P = 256
) (
  input  logic         clk,
  input  logic         en,
  input  logic [P-1:0] hash,      // h[k] at bit k
  input  logic [P-1:0] data1,     // data word J
  input  logic [P-1:0] data2,     // data word J+1
  input  logic [P-1:0] key_mid,   // running key of this row block
  output logic [P-1:0] result
);

  logic [2*P-1:0] window;
  logic [P-1:0]   prod;

  assign window = {data2, data1};

  always_comb begin
    for (int i = 0; i < P; i++) prod[i] = ^(hash & window[i +: P]);
  end

  always_ff @(posedge clk) begin
    if (en) result <= prod ^ key_mid;
  end

endmodule
