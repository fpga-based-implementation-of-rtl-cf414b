// Hash-function memory of the privacy-amplification core.
//
// A single-port memory p bits wide and DEPTH = s_max words deep holding the
// M + N - 1 random bits that define the Toeplitz matrix, one word per RB
// group, in group order:
//   word g, g = 0 .. n-2:   bit b = T(p*g + b + 1), the first row of the
//                           matrix (T(1) .. T(L)), zero past T(L);
//   word n-1+q, q = 0..m-1: bit b = T(L + p*q + b + 1), the first column below
//                           its top element (T(L+1) .. T(L+L_k-1)), zero past it.
// Each group reads its word once. The document uses such a read-only memory
// to test the core; here it is loaded through the same port between blocks
// (we = 1), which stands in for the FPGA's configuration-time initialisation.
//
// Timing: synchronous read, one cycle latency; the output holds its value
// until the next read, so a group's hash word stays put for all its RBs.
module hash_rom #(
  parameter int unsigned P     = 256,
  parameter int unsigned DEPTH = 4298,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [P-1:0]  wdata,
  output logic [P-1:0]  rdata
);

  logic [P-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
