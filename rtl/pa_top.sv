// Size-adaptive privacy amplification by Toeplitz hashing.
//
// Computes the final key K = T * X over GF(2), where X is an L-bit corrected
// key and T an L_k x L Toeplitz matrix given by its first row T(1) .. T(L)
// and first column T(1), T(L+1) .. T(L+L_k-1). L and L_k are set per block
// (`len_l`, `len_lk`) up to L_MAX and LK_MAX.
//
// The matrix is padded (p columns in front, zero columns after, rows up to a
// multiple of p) and cut into an m x n array of p x p rhomboid blocks (RBs),
// m = ceil(L_k/p), n = ceil(L/p) + 1. All RBs on one diagonal share the same
// p hash bits, so the matrix is never stored: the controller walks the
// s = m + n - 1 diagonals, reads each diagonal's hash word once, and issues
// one RB per clock to a four-stage pipeline:
//   1 read     key words J and J+1 (BRAM-1, both ports), the running key of
//              row block A (BRAM-2) and, at a group start, the hash word;
//   2 reverse  hash bits reversed for the main and bottom-left diagonals;
//   3 PMAC     p x p AND/XOR, accumulated onto the running key, with the
//              running key forwarded from stages 4.. when still in flight;
//   4 write    result back to BRAM-2; on the row's last RB it is a final
//              key word and is also presented on the key_* stream.
// A block takes m*n + 4 cycles from `start` to `done`. Blocks, sizes, group
// order, the pipeline and the memory shapes follow the document; the load and
// read-out ports, the bypass and the clearing of key bits past L_k are this
// design's own choices.
//
// Interface (all synchronous to clk, active-low asynchronous reset):
//   key_wr_*   load corrected-key word j (bits p*j .. p*j+p-1) while idle;
//   hash_wr_*  load hash word g (layout in hash_rom) while idle;
//   start      with len_l, len_lk, in an idle cycle; busy until done pulses;
//   key_valid  final key word key_index (bits p*A ..), bits past L_k zero;
//   key_rd_*   read final key word key_rd_addr while idle, data next cycle;
//   bypass_used  which in-flight result the PMAC stage forwarded (status).
module pa_top
  import pa_pkg::*;
#(
  parameter int unsigned P      = P_DEFAULT,
  parameter int unsigned L_MAX  = L_MAX_DEFAULT,
  parameter int unsigned LK_MAX = LK_MAX_DEFAULT,
  localparam int unsigned LOG2P   = $clog2(P),
  localparam int unsigned LEN_W   = $clog2(L_MAX + 1),
  localparam int unsigned LKLEN_W = $clog2(LK_MAX + 1),
  localparam int unsigned NK_MAX  = (L_MAX + P - 1) / P,
  localparam int unsigned M_MAX   = (LK_MAX + P - 1) / P,
  localparam int unsigned KEY_DEPTH  = NK_MAX + 3,          // n_max + 2
  localparam int unsigned MID_DEPTH  = (M_MAX > 0) ? M_MAX : 1,
  localparam int unsigned HASH_DEPTH = M_MAX + NK_MAX,      // s_max
  localparam int unsigned KAW = $clog2(KEY_DEPTH),
  localparam int unsigned MAW = (MID_DEPTH > 1) ? $clog2(MID_DEPTH) : 1,
  localparam int unsigned HAW = $clog2(HASH_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // corrected-key load
  input  logic               key_wr_en,
  input  logic [KAW-1:0]     key_wr_addr,
  input  logic [P-1:0]       key_wr_data,
  // hash load
  input  logic               hash_wr_en,
  input  logic [HAW-1:0]     hash_wr_addr,
  input  logic [P-1:0]       hash_wr_data,
  // block control
  input  logic               start,
  input  logic [LEN_W-1:0]   len_l,
  input  logic [LKLEN_W-1:0] len_lk,
  output logic               busy,
  output logic               done,
  // final key stream
  output logic               key_valid,
  output logic [MAW-1:0]     key_index,
  output logic [P-1:0]       key_data,
  // final key read-out
  input  logic               key_rd_en,
  input  logic [MAW-1:0]     key_rd_addr,
  output logic [P-1:0]       key_rd_data,
  // status: running key forwarded from 1, 2 or 3 cycles back in this cycle
  output logic [2:0]         bypass_used
);

  // ------------------------------------------------------------------ control
  rb_cmd_t          cmd;
  idx_t             nk, m_words;
  logic [LOG2P-1:0] l_tail, lk_tail;

  pa_control #(.P(P), .L_MAX(L_MAX), .LK_MAX(LK_MAX)) u_ctrl (
    .clk, .rst_n, .start, .len_l, .len_lk,
    .busy, .done, .cmd, .nk, .l_tail, .m_words, .lk_tail
  );

  // ------------------------------------------------------- stage 1: read
  logic [P-1:0] d1, d2, kmid_mem, hash_word;
  // stage-4 (write-back) signals, used by BRAM-2's write port
  logic [P-1:0]   s4_res, s4_wdata;
  logic           s4_valid, s4_last;
  logic [MAW-1:0] s4_row;

  key_ram #(.P(P), .DEPTH(KEY_DEPTH)) u_bram1 (
    .clk,
    .nk      (nk[KAW-1:0]),
    .l_tail  (l_tail),
    .a_en    (busy ? cmd.valid : key_wr_en),
    .a_we    (!busy && key_wr_en),
    .a_addr  (busy ? cmd.col[KAW-1:0] : key_wr_addr + KAW'(1)),
    .a_wdata (key_wr_data),
    .a_rdata (d1),
    .b_en    (cmd.valid),
    .b_addr  (cmd.col[KAW-1:0] + KAW'(1)),
    .b_rdata (d2)
  );

  mid_ram #(.P(P), .DEPTH(MID_DEPTH)) u_bram2 (
    .clk,
    .a_we    (s4_valid),
    .a_addr  (s4_row),
    .a_wdata (s4_wdata),
    .b_en    (busy ? cmd.valid : key_rd_en),
    .b_addr  (busy ? cmd.row[MAW-1:0] : key_rd_addr),
    .b_rdata (kmid_mem)
  );

  hash_rom #(.P(P), .DEPTH(HASH_DEPTH)) u_hash (
    .clk,
    .en    (busy ? cmd.hash_rd : hash_wr_en),
    .we    (!busy && hash_wr_en),
    .addr  (busy ? cmd.grp[HAW-1:0] : hash_wr_addr),
    .wdata (hash_wr_data),
    .rdata (hash_word)
  );

  assign key_rd_data = kmid_mem;

  logic           s2_valid, s2_rev, s2_first, s2_last;
  logic [MAW-1:0] s2_row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_rev   <= 1'b0;
      s2_first <= 1'b0;
      s2_last  <= 1'b0;
      s2_row   <= '0;
    end else begin
      s2_valid <= cmd.valid;
      s2_rev   <= cmd.rev;
      s2_first <= cmd.first;
      s2_last  <= cmd.last;
      s2_row   <= cmd.row[MAW-1:0];
    end
  end

  // ---------------------------------------------------- stage 2: reverse
  logic [P-1:0]   s3_hash, s3_d1, s3_d2, s3_kmid;
  logic           s3_valid, s3_first, s3_last;
  logic [MAW-1:0] s3_row;

  hash_reverse #(.P(P)) u_rev (
    .clk, .en(s2_valid), .rev(s2_rev), .hash_in(hash_word), .hash_out(s3_hash)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_valid <= 1'b0;
      s3_first <= 1'b0;
      s3_last  <= 1'b0;
      s3_row   <= '0;
    end else begin
      s3_valid <= s2_valid;
      s3_first <= s2_first;
      s3_last  <= s2_last;
      s3_row   <= s2_row;
    end
  end

  always_ff @(posedge clk) begin
    if (s2_valid) begin
      s3_d1   <= d1;
      s3_d2   <= d2;
      s3_kmid <= kmid_mem;
    end
  end

  // ------------------------------------------------------- stage 3: PMAC
  logic [P-1:0] kmid_fwd, kmid_use;

  mid_bypass #(.P(P), .AW(MAW)) u_bypass (
    .clk, .rst_n,
    .wr_valid (s4_valid),
    .wr_row   (s4_row),
    .wr_data  (s4_wdata),
    .rd_row   (s3_row),
    .rd_mem   (s3_kmid),
    .rd_data  (kmid_fwd),
    .hits     (bypass_used)
  );

  // the first RB of a row starts from zero: no forwarding, no stale memory
  assign kmid_use = s3_first ? '0 : kmid_fwd;

  pmac #(.P(P)) u_pmac (
    .clk, .en(s3_valid), .hash(s3_hash), .data1(s3_d1), .data2(s3_d2),
    .key_mid(kmid_use), .result(s4_res)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s4_valid <= 1'b0;
      s4_last  <= 1'b0;
      s4_row   <= '0;
    end else begin
      s4_valid <= s3_valid;
      s4_last  <= s3_last;
      s4_row   <= s3_row;
    end
  end

  // ------------------------------------------------------ stage 4: write
  // Rows past L_k (padding rows of the last word) are cleared in the final
  // word so that the stored and streamed key holds exactly L_k bits.
  logic [P-1:0] lk_mask;
  always_comb begin
    lk_mask = '1;
    if (s4_last && idx_t'(s4_row) == m_words - idx_t'(1) && lk_tail != '0)
      lk_mask = ~({P{1'b1}} << lk_tail);
  end
  assign s4_wdata = s4_res & lk_mask;

  assign key_valid = s4_valid && s4_last;
  assign key_index = s4_row;
  assign key_data  = s4_wdata;

  // Loads are only accepted between blocks.
  a_no_load_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !key_wr_en && !hash_wr_en)
    else $error("pa_top: memory load while a block is running");

endmodule
