// Full-size testbench of the privacy-amplification core at its default
// parameters: a 256 x 256 processing unit, a 1,000,000-bit corrected key and
// a 100,000-bit final key (10 % compression). It loads a random key and
// random Toeplitz bits, runs one block, checks that it takes
// m*n + 4 = 391 * 3908 + 4 cycles, and compares 96 final key bits (the first
// and last of the key, the edges of the word and the rest at random) with
// the product T * X over GF(2) computed here from the matrix definition. All
// 391 final key words must appear once on the key stream and match the
// read-out port.
module tb_pa_full;
  localparam int P = 256, L = 1_000_000, LK = 100_000;
  localparam int NK = (L + P - 1) / P, M = (LK + P - 1) / P, N = NK + 1;

  logic clk = 0, rst_n = 0;
  logic key_wr_en, hash_wr_en, start, busy, done, key_valid, key_rd_en;
  logic [11:0] key_wr_addr;
  logic [12:0] hash_wr_addr;
  logic [P-1:0] key_wr_data, hash_wr_data, key_data, key_rd_data;
  logic [19:0] len_l;
  logic [16:0] len_lk;
  logic [8:0] key_index, key_rd_addr;
  logic [2:0] bypass_used;

  pa_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles;

  initial begin
    repeat (1_700_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
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
    tbit = new[L + LK];
    xbit = new[L];
    for (int i = 1; i < L + LK; i++) tbit[i] = 1'($urandom);
    for (int i = 0; i < L; i++) xbit[i] = 1'($urandom);
    key_wr_en = 0; hash_wr_en = 0; start = 0; key_rd_en = 0;
    key_wr_addr = '0; hash_wr_addr = '0; key_wr_data = '0; hash_wr_data = '0;
    key_rd_addr = '0; len_l = '0; len_lk = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < NK; j++) begin
      for (int b = 0; b < P; b++) w[b] = (j * P + b < L) ? xbit[j * P + b] : 1'b1;
      @(negedge clk);
      key_wr_en = 1; key_wr_addr = 12'(j); key_wr_data = w;
    end
    for (int g = 0; g < NK; g++) begin
      for (int b = 0; b < P; b++) w[b] = (g * P + b + 1 <= L) ? tbit[g * P + b + 1] : 1'b0;
      @(negedge clk);
      key_wr_en = 0; hash_wr_en = 1; hash_wr_addr = 13'(g); hash_wr_data = w;
    end
    for (int q = 0; q < M; q++) begin
      for (int b = 0; b < P; b++) w[b] = (q * P + b + 1 <= LK - 1) ? tbit[L + q * P + b + 1] : 1'b0;
      @(negedge clk);
      key_wr_en = 0; hash_wr_en = 1; hash_wr_addr = 13'(NK + q); hash_wr_data = w;
    end
    @(negedge clk);
    hash_wr_en = 0;
    len_l = 20'(L); len_lk = 17'(LK); start = 1;
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
    $display("block done after %0d cycles", cycles);
    check(got == M, $sformatf("%0d final words, exp %0d", got, M));
    check(cycles == longint'(M) * N + 4, $sformatf("%0d cycles, exp %0d", cycles, longint'(M) * N + 4));
    for (int a = 0; a < M; a++) begin
      key_rd_en = 1; key_rd_addr = 9'(a);
      @(negedge clk);
      key_rd_en = 0;
      check(key_rd_data === streamed[a], $sformatf("read-out word %0d", a));
    end
    // bits past L_k are cleared
    if (LK % P != 0) check((streamed[M-1] >> (LK % P)) == '0, "bits past L_k");
    rows = '{0, 1, P - 1, P, LK - 1, LK - 2, LK - P, 50_000};
    while (rows.size() < 96) rows.push_back($urandom_range(LK - 1));
    foreach (rows[i]) begin
      bit e;
      e = ref_bit(rows[i]);
      check(streamed[rows[i] / P][rows[i] % P] == e, $sformatf("key bit %0d", rows[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
