// Control unit of the privacy-amplification core.
//
// On `start` it latches the corrected-key length L and the final-key length
// L_k, and derives the sizes of the padded matrix in p-bit words:
//   nk = ceil(L/p)      words of corrected key,
//   n  = nk + 1         RB columns,
//   m  = ceil(L_k/p)    RB rows (words of final key),
//   s  = m + n - 1      groups (diagonals of RBs, one hash word each).
// It then walks the RB matrix one RB per clock, group by group: first the
// top-right diagonals g = 0 .. n-2 (row A from 0, column J = g+1), then the
// main diagonal and the bottom-left diagonals g = n-1 .. s-1 (row
// A from g-n+1, column J = 0). Along a diagonal A and J both step by one; the
// group ends when A reaches m or J reaches n, which covers the three jump
// criteria of the document (rows exhausted in the main part, key address past
// its end in the top-right corner, rows exhausted in the bottom-left corner).
// Every (A, J) pair is visited exactly once, so a block takes m*n issue cycles.
//
// Per RB it flags the first RB of a group (read the group's hash word), a
// bottom-left group (hash bits reversed), the first visit of a row (its
// intermediate key starts at zero) and the last visit of a row (J = 0: the
// result is final). Only the group order and the jump criteria come from the
// document; the counters, the flags and the first-visit rule (which also
// covers L_k > L) are this design's.
//
// Timing: `start` is sampled in an idle cycle; the first RB is issued the
// next cycle and one follows every cycle; `busy` stays high until the last
// RB has left the four-stage datapath, and `done` pulses one cycle later, so
// start-to-done is m*n + PIPE_STAGES cycles. With L_k = 0 no RB is issued.
// p must be a power of two, L <= L_MAX and L_k <= LK_MAX.
module pa_control
  import pa_pkg::*;
#(
  parameter int unsigned P      = P_DEFAULT,
  parameter int unsigned L_MAX  = L_MAX_DEFAULT,
  parameter int unsigned LK_MAX = LK_MAX_DEFAULT,
  localparam int unsigned LEN_W  = $clog2(L_MAX + 1),
  localparam int unsigned LKLEN_W = $clog2(LK_MAX + 1),
  localparam int unsigned LOG2P  = $clog2(P)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [LEN_W-1:0]   len_l,     // L, corrected-key length in bits
  input  logic [LKLEN_W-1:0] len_lk,    // L_k, final-key length in bits
  output logic               busy,
  output logic               done,      // one-cycle pulse: final key complete
  output rb_cmd_t            cmd,       // the RB issued this cycle
  output idx_t               nk,        // words of corrected key of this block
  output logic [LOG2P-1:0]   l_tail,    // L mod p (0: last word full)
  output idx_t               m_words,   // m, words of final key
  output logic [LOG2P-1:0]   lk_tail    // L_k mod p (0: last word full)
);

  if (P != (1 << LOG2P)) begin : g_p_pow2
    $error("pa_control: P must be a power of two");
  end

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;

  state_t     state;
  idx_t       n_r, m_r, s_r;
  idx_t       g_r, a_r, j_r;
  logic       lower_r;       // current group lies on or below the main diagonal
  logic       grp_first_r;   // next RB is the first of its group
  logic [1:0] drain_cnt;
  logic       done_r;

  idx_t nk_c, m_c;
  assign nk_c = ceil_shift(idx_t'(len_l), LOG2P);
  assign m_c  = ceil_shift(idx_t'(len_lk), LOG2P);

  // next position along the current diagonal, and the start of the next group
  idx_t a_nx, j_nx, g_nx;
  logic grp_end, blk_end;
  assign a_nx    = a_r + idx_t'(1);
  assign j_nx    = j_r + idx_t'(1);
  assign g_nx    = g_r + idx_t'(1);
  assign grp_end = (a_nx >= m_r) || (j_nx >= n_r);
  assign blk_end = grp_end && (g_nx >= s_r);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      n_r         <= '0;
      m_r         <= '0;
      s_r         <= '0;
      g_r         <= '0;
      a_r         <= '0;
      j_r         <= '0;
      lower_r     <= 1'b0;
      grp_first_r <= 1'b0;
      drain_cnt   <= '0;
      done_r      <= 1'b0;
      nk          <= '0;
      l_tail      <= '0;
      lk_tail     <= '0;
    end else begin
      done_r <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            nk      <= nk_c;
            l_tail  <= len_l[LOG2P-1:0];
            lk_tail <= len_lk[LOG2P-1:0];
            n_r     <= nk_c + idx_t'(1);
            m_r     <= m_c;
            s_r     <= m_c + nk_c;            // m + n - 1
            g_r     <= '0;
            grp_first_r <= 1'b1;
            if (m_c == '0) begin
              state     <= S_DRAIN;
              drain_cnt <= 2'(PIPE_STAGES - 2);
            end else if (nk_c == '0) begin
              // n = 1: there is no top-right group, start on the main diagonal
              state   <= S_RUN;
              lower_r <= 1'b1;
              a_r     <= '0;
              j_r     <= '0;
            end else begin
              state   <= S_RUN;
              lower_r <= 1'b0;
              a_r     <= '0;
              j_r     <= idx_t'(1);
            end
          end
        end
        S_RUN: begin
          if (blk_end) begin
            state       <= S_DRAIN;
            drain_cnt   <= 2'd2;
            grp_first_r <= 1'b0;
          end else if (grp_end) begin
            g_r         <= g_nx;
            grp_first_r <= 1'b1;
            if (g_nx < n_r - idx_t'(1)) begin
              lower_r <= 1'b0;
              a_r     <= '0;
              j_r     <= g_nx + idx_t'(1);
            end else begin
              lower_r <= 1'b1;
              a_r     <= g_nx - (n_r - idx_t'(1));
              j_r     <= '0;
            end
          end else begin
            a_r         <= a_nx;
            j_r         <= j_nx;
            grp_first_r <= 1'b0;
          end
        end
        S_DRAIN: begin
          if (drain_cnt == '0) begin
            state  <= S_IDLE;
            done_r <= 1'b1;
          end else begin
            drain_cnt <= drain_cnt - 2'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    cmd         = '0;
    cmd.valid   = (state == S_RUN);
    cmd.row     = a_r;
    cmd.col     = j_r;
    cmd.grp     = g_r;
    cmd.hash_rd = (state == S_RUN) && grp_first_r;
    cmd.rev     = lower_r;
    // A row is first visited on the first top-right diagonal when one reaches
    // it (A <= n-2), otherwise where its bottom-left diagonal meets the last
    // column (J = n-1, only when L_k > L).
    cmd.first   = lower_r ? (j_r == n_r - idx_t'(1)) : (g_r == '0);
    cmd.last    = lower_r && (j_r == '0);
  end

  assign busy    = (state != S_IDLE);
  assign done    = done_r;
  assign m_words = m_r;

  // Lengths beyond the memories' capacity are not supported.
  a_len_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && start) |-> (len_l <= LEN_W'(L_MAX) && len_lk <= LKLEN_W'(LK_MAX)))
    else $error("pa_control: block length exceeds L_MAX/LK_MAX");

endmodule
