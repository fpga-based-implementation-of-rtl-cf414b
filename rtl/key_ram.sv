// BRAM-1: corrected-key memory of the privacy-amplification core.
//
// A true dual-port RAM p bits wide and DEPTH = n_max + 2 words deep. Word 0
// stands for the p zeros padded in front of the key, words 1 .. nk hold the
// corrected key (word j+1 = key bits p*j .. p*j+p-1, bit 0 first) and the
// words past nk stand for the zeros padded after it. Each RB needs two
// adjacent data words, data1 = word J and data2 = word J+1, read through
// port A and port B in the same cycle.
//
// The zero padding is not stored: a read of word 0 or of a word past nk
// returns zeros, and in word nk the bits at or beyond L mod p are cleared, so
// whatever was loaded there (or left from a longer block) cannot leak into
// the product. That gating is this design's way of providing the zero words
// the document places at the two ends of the memory.
//
// Timing: synchronous read, one cycle latency, read-first on port A; port A
// also takes the load writes (a_we) between blocks. nk and l_tail must be
// stable while reads are issued.
module key_ram #(
  parameter int unsigned P     = 256,
  parameter int unsigned DEPTH = 3910,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned LOG2P = $clog2(P)
) (
  input  logic             clk,
  input  logic [AW-1:0]    nk,       // last word holding key bits
  input  logic [LOG2P-1:0] l_tail,   // valid bits in word nk (0: all p)
  // port A: read/write
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [P-1:0]     a_wdata,
  output logic [P-1:0]     a_rdata,
  // port B: read
  input  logic             b_en,
  input  logic [AW-1:0]    b_addr,
  output logic [P-1:0]     b_rdata
);

  logic [P-1:0] mem [DEPTH];
  logic [P-1:0] a_q, b_q;
  logic [P-1:0] a_mask, b_mask;

  // read mask of a word: all ones inside the key, zeros outside, partial in
  // the last key word
  function automatic logic [P-1:0] word_mask(input logic [AW-1:0] addr,
                                             input logic [AW-1:0] last,
                                             input logic [LOG2P-1:0] tail);
    logic [P-1:0] m;
    if (addr == '0 || addr > last) m = '0;
    else if (addr == last && tail != '0) m = ~({P{1'b1}} << tail);
    else m = '1;
    return m;
  endfunction

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_q    <= mem[a_addr];
      a_mask <= word_mask(a_addr, nk, l_tail);
    end
    if (b_en) begin
      b_q    <= mem[b_addr];
      b_mask <= word_mask(b_addr, nk, l_tail);
    end
  end

  assign a_rdata = a_q & a_mask;
  assign b_rdata = b_q & b_mask;

endmodule
