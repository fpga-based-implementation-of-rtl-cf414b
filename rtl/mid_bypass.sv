// Intermediate-key bypass of the privacy-amplification core.
//
// The running key of row block A is read from the intermediate-key memory
// when an RB is issued but written back three cycles later. When two RBs of
// the same row are issued less than four cycles apart (short diagonals near
// the corners of the RB matrix, down to back-to-back RBs in the last group),
// the value read from the memory is stale. This unit keeps the results of
// the last two write-backs besides the one in progress and, in the PMAC
// stage, replaces the memory value by the youngest in-flight result of the
// same row:
//   distance 1: the result being written this cycle (wr_*),
//   distance 2: the result written at the last clock edge,
//   distance 3: the one written at the edge on which the memory was read.
// `hits` reports which source was used (bit 0: distance 1, bit 1:
// distance 2, bit 2: distance 3). The document gives the uninterrupted
// four-cycle pipeline; this forwarding is how this design keeps it correct.
module mid_bypass #(
  parameter int unsigned P  = 256,
  parameter int unsigned AW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  // write-back stage
  input  logic          wr_valid,
  input  logic [AW-1:0] wr_row,
  input  logic [P-1:0]  wr_data,
  // PMAC stage
  input  logic [AW-1:0] rd_row,
  input  logic [P-1:0]  rd_mem,     // value read from the memory
  output logic [P-1:0]  rd_data,    // value to use
  output logic [2:0]    hits
);

  logic          h1_valid, h2_valid;
  logic [AW-1:0] h1_row, h2_row;
  logic [P-1:0]  h1_data, h2_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h1_valid <= 1'b0;
      h2_valid <= 1'b0;
      h1_row   <= '0;
      h2_row   <= '0;
    end else begin
      h1_valid <= wr_valid;
      h1_row   <= wr_row;
      h2_valid <= h1_valid;
      h2_row   <= h1_row;
    end
  end

  always_ff @(posedge clk) begin
    h1_data <= wr_data;
    h2_data <= h1_data;
  end

  always_comb begin
    hits = '0;
    if (wr_valid && wr_row == rd_row) begin
      rd_data = wr_data;
      hits[0] = 1'b1;
    end else if (h1_valid && h1_row == rd_row) begin
      rd_data = h1_data;
      hits[1] = 1'b1;
    end else if (h2_valid && h2_row == rd_row) begin
      rd_data = h2_data;
      hits[2] = 1'b1;
    end else begin
      rd_data = rd_mem;
    end
  end

endmodule
