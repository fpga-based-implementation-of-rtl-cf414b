// BRAM-2: intermediate-key memory of the privacy-amplification core.
//
// A dual-port RAM p bits wide and DEPTH = m_max words deep. Word A holds the
// running GF(2) sum for rows p*A .. p*A+p-1 of the Toeplitz product; it is
// rewritten after every RB of row block A and holds the final key word after
// the last one. Port A writes the PMAC results; port B reads the
// intermediate key of the RB being issued and, between blocks, the final key.
//
// Timing: synchronous read with one cycle latency. A read and a write of the
// same word in the same cycle return the old contents (read-first); the
// datapath forwards results that are still in flight, so it never relies on
// the new value.
module mid_ram #(
  parameter int unsigned P     = 256,
  parameter int unsigned DEPTH = 391,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: write
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [P-1:0]  a_wdata,
  // port B: read
  input  logic          b_en,
  input  logic [AW-1:0] b_addr,
  output logic [P-1:0]  b_rdata
);

  logic [P-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
