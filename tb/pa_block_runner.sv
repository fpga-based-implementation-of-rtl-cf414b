// Test helper: runs one block of size L x L_k through a privacy-amplification
// core with a P-bit processing unit and checks it. When `go` rises it loads a
// random corrected key and random Toeplitz bits, starts the block, counts the
// cycles to `done` against m*n + 4, checks that every final key word is
// streamed once and matches the read-out port, and compares SAMPLES key bits
// with T * X over GF(2) computed from the matrix definition. `finished` rises
// when it is through (the core is reset first, after `go`); `checks`, `failures` and `cycles` then hold its result.
module pa_block_runner #(
  parameter int P       = 32,
  parameter int L       = 1_000_000,
  parameter int LK      = 100_000,
  parameter int SAMPLES = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output longint cycles
);
  localparam int NK = (L + P - 1) / P, M = (LK + P - 1) / P, N = NK + 1;
  localparam int KAW = $clog2(NK + 3), MAW = (M > 1) ? $clog2(M) : 1, HAW = $clog2(M + NK);

  logic key_wr_en, hash_wr_en, start, busy, done, key_valid, key_rd_en;
  logic [KAW-1:0] key_wr_addr;
  logic [HAW-1:0] hash_wr_addr;
  logic [P-1:0] key_wr_data, hash_wr_data, key_data, key_rd_data;
  logic [$clog2(L+1)-1:0] len_l;
  logic [$clog2(LK+1)-1:0] len_lk;
  logic [MAW-1:0] key_index, key_rd_addr;
  logic [2:0] bypass_used;

  // local reset, applied once the runner is clocked
  logic rst_loc_n;
  pa_top #(.P(P), .L_MAX(L), .LK_MAX(LK)) dut (.*, .rst_n(rst_loc_n));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (p=%0d): %s", P, what);
    end
  endtask

  bit tbit [];
  bit xbit [];
  logic [P-1:0] streamed [M];
  bit seen [M];

  function automatic bit ref_bit(int r);
    bit acc = 0;
    for (int c = 0; c < L; c++) if (xbit[c]) acc ^= (c >= r) ? tbit[c - r + 1] : tbit[L + r - c];
    return acc;
  endfunction

  initial begin
    logic [P-1:0] w;
    int got, rows[$];
    finished = 0; checks = 0; failures = 0; cycles = 0;
    key_wr_en = 0; hash_wr_en = 0; start = 0; key_rd_en = 0;
    key_wr_addr = '0; hash_wr_addr = '0; key_wr_data = '0; hash_wr_data = '0;
    key_rd_addr = '0; len_l = '0; len_lk = '0;
    rst_loc_n = 0;
    wait (go && rst_n);
    repeat (2) @(negedge clk);
    rst_loc_n = 1;
    tbit = new[L + LK];
    xbit = new[L];
    for (int i = 1; i < L + LK; i++) tbit[i] = 1'($urandom);
    for (int i = 0; i < L; i++) xbit[i] = 1'($urandom);
    for (int j = 0; j < NK; j++) begin
      for (int b = 0; b < P; b++) w[b] = (j * P + b < L) ? xbit[j * P + b] : 1'b1;
      @(negedge clk);
      key_wr_en = 1; key_wr_addr = KAW'(j); key_wr_data = w;
    end
    for (int g = 0; g < NK; g++) begin
      for (int b = 0; b < P; b++) w[b] = (g * P + b + 1 <= L) ? tbit[g * P + b + 1] : 1'b0;
      @(negedge clk);
      key_wr_en = 0; hash_wr_en = 1; hash_wr_addr = HAW'(g); hash_wr_data = w;
    end
    for (int q = 0; q < M; q++) begin
      for (int b = 0; b < P; b++) w[b] = (q * P + b + 1 <= LK - 1) ? tbit[L + q * P + b + 1] : 1'b0;
      @(negedge clk);
      key_wr_en = 0; hash_wr_en = 1; hash_wr_addr = HAW'(NK + q); hash_wr_data = w;
    end
    @(negedge clk);
    key_wr_en = 0; hash_wr_en = 0;
    len_l = $bits(len_l)'(L); len_lk = $bits(len_lk)'(LK); start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1; got = 0;
    while (!done) begin
      if (key_valid) begin
        check(!seen[key_index], "key word streamed twice");
        seen[key_index] = 1;
        streamed[key_index] = key_data;
        got++;
      end
      @(negedge clk);
      cycles++;
    end
    check(got == M, $sformatf("%0d final words, exp %0d", got, M));
    check(cycles == longint'(M) * N + 4, $sformatf("%0d cycles, exp %0d", cycles, longint'(M) * N + 4));
    for (int a = 0; a < M; a++) begin
      key_rd_en = 1; key_rd_addr = MAW'(a);
      @(negedge clk);
      key_rd_en = 0;
      check(key_rd_data === streamed[a], $sformatf("read-out word %0d", a));
    end
    rows = '{0, P - 1, LK - 1};
    while (rows.size() < SAMPLES) rows.push_back($urandom_range(LK - 1));
    foreach (rows[i]) check(streamed[rows[i] / P][rows[i] % P] == ref_bit(rows[i]),
                            $sformatf("key bit %0d", rows[i]));
    finished = 1;
  end
endmodule
