// End-to-end testbench of the privacy-amplification core at a small
// processing unit (p = 8). For a series of blocks of varying L and L_k it
// draws a random corrected key and random Toeplitz bits, loads the key and
// hash memories, runs the block and compares every final key word, on the
// key stream and through the read-out port, with the product T * X over
// GF(2) computed here bit by bit from the matrix definition. It checks that
// each block takes m*n + 4 cycles, and counts the mechanisms of the design
// (top-right, main and bottom-left diagonals, reversed hash words, the three
// forwarding distances, partial last key and final-key words, empty final
// key, L_k > L); a mechanism never seen counts as a failure.
module tb_pa_top;
  localparam int P = 8, L_MAX = 200, LK_MAX = 120;
  localparam int NK_MAX = (L_MAX + P - 1) / P, M_MAX = (LK_MAX + P - 1) / P;
  localparam int KAW = $clog2(NK_MAX + 3), MAW = $clog2(M_MAX), HAW = $clog2(M_MAX + NK_MAX);

  logic clk = 0, rst_n = 0;
  logic key_wr_en, hash_wr_en, start, busy, done, key_valid, key_rd_en;
  logic [KAW-1:0] key_wr_addr;
  logic [HAW-1:0] hash_wr_addr;
  logic [P-1:0] key_wr_data, hash_wr_data, key_data, key_rd_data;
  logic [$clog2(L_MAX+1)-1:0] len_l;
  logic [$clog2(LK_MAX+1)-1:0] len_lk;
  logic [MAW-1:0] key_index, key_rd_addr;
  logic [2:0] bypass_used;

  pa_top #(.P(P), .L_MAX(L_MAX), .LK_MAX(LK_MAX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_upper = 0, n_main = 0, n_lower = 0, n_rev = 0, n_fwd1 = 0, n_fwd2 = 0, n_fwd3 = 0;
  int n_final = 0, n_ltail = 0, n_lktail = 0, n_empty = 0, n_lk_gt_l = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, read from the issue stage and the status port
  always @(posedge clk) if (rst_n) begin
    if (dut.cmd.valid) begin
      if (!dut.cmd.rev) n_upper++;
      else if (dut.cmd.col == dut.cmd.row) n_main++;
      else n_lower++;
    end
    if (dut.u_rev.en && dut.u_rev.rev) n_rev++;
    if (bypass_used[0]) n_fwd1++;
    if (bypass_used[1]) n_fwd2++;
    if (bypass_used[2]) n_fwd3++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  bit tbit [1:L_MAX+LK_MAX];   // Toeplitz bits T(1) ..
  bit xbit [0:L_MAX-1];        // corrected key

  task automatic run_block(int l, int lk);
    int nk, n, m, cycles, got;
    logic [P-1:0] w, expw [M_MAX];
    bit streamed [M_MAX];
    nk = (l + P - 1) / P; n = nk + 1; m = (lk + P - 1) / P;
    for (int i = 1; i <= l + lk - 1; i++) tbit[i] = 1'($urandom);
    for (int i = 0; i < l; i++) xbit[i] = 1'($urandom);
    // reference product, row by row from the matrix definition
    for (int r = 0; r < m * P; r++) begin
      bit acc = 0;
      if (r < lk) for (int c = 0; c < l; c++) acc ^= xbit[c] & ((c >= r) ? tbit[c - r + 1] : tbit[l + r - c]);
      expw[r / P][r % P] = acc;
    end
    // load the key words; bits past L are garbage that must not matter
    for (int j = 0; j < nk; j++) begin
      for (int b = 0; b < P; b++) w[b] = (j * P + b < l) ? xbit[j * P + b] : 1'($urandom);
      @(negedge clk);
      key_wr_en = 1; key_wr_addr = KAW'(j); key_wr_data = w;
    end
    // load the hash words: first row in words 0 .. n-2, first column after
    for (int g = 0; g < nk; g++) begin
      for (int b = 0; b < P; b++) w[b] = (g * P + b + 1 <= l) ? tbit[g * P + b + 1] : 1'b0;
      @(negedge clk);
      key_wr_en = 0; hash_wr_en = 1; hash_wr_addr = HAW'(g); hash_wr_data = w;
    end
    for (int q = 0; q < m; q++) begin
      for (int b = 0; b < P; b++) w[b] = (q * P + b + 1 <= lk - 1) ? tbit[l + q * P + b + 1] : 1'b0;
      @(negedge clk);
      key_wr_en = 0; hash_wr_en = 1; hash_wr_addr = HAW'(nk + q); hash_wr_data = w;
    end
    @(negedge clk);
    key_wr_en = 0; hash_wr_en = 0;
    len_l = $bits(len_l)'(l); len_lk = $bits(len_lk)'(lk); start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1; got = 0;
    for (int i = 0; i < m; i++) streamed[i] = 0;
    while (!done && cycles < 100000) begin
      if (key_valid) begin
        check(!streamed[key_index], "key word streamed twice");
        streamed[key_index] = 1;
        check(key_data === expw[key_index],
              $sformatf("L=%0d Lk=%0d stream word %0d: %h exp %h", l, lk, key_index, key_data, expw[key_index]));
        got++; n_final++;
      end
      @(negedge clk);
      cycles++;
    end
    check(got == m, $sformatf("L=%0d Lk=%0d: %0d final words, exp %0d", l, lk, got, m));
    check(cycles == m * n + 4, $sformatf("L=%0d Lk=%0d: %0d cycles, exp %0d", l, lk, cycles, m * n + 4));
    // read the final key back out of BRAM-2
    for (int a = 0; a < m; a++) begin
      key_rd_en = 1; key_rd_addr = MAW'(a);
      @(negedge clk);
      key_rd_en = 0;
      check(key_rd_data === expw[a], $sformatf("L=%0d Lk=%0d read-out word %0d", l, lk, a));
    end
    if (l % P != 0) n_ltail++;
    if (lk % P != 0) n_lktail++;
    if (lk == 0) n_empty++;
    if (lk > l) n_lk_gt_l++;
  endtask

  initial begin
    key_wr_en = 0; hash_wr_en = 0; start = 0; key_rd_en = 0;
    key_wr_addr = '0; hash_wr_addr = '0; key_wr_data = '0; hash_wr_data = '0;
    key_rd_addr = '0; len_l = '0; len_lk = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(11, 10);     // the p = 4 example's sizes, here with p = 8
    run_block(200, 20);    // 10 % compression at full L
    run_block(37, 37);
    run_block(30, 90);     // L_k > L
    run_block(64, 0);      // empty final key
    run_block(5, 3);
    run_block(200, 120);
    for (int t = 0; t < 12; t++) run_block($urandom_range(1, L_MAX), $urandom_range(0, LK_MAX));
    $display("diagonals: top-right %0d main %0d bottom-left %0d, reversed words %0d",
             n_upper, n_main, n_lower, n_rev);
    $display("forwarding: d1 %0d d2 %0d d3 %0d; final words %0d; partial L %0d, partial Lk %0d, empty %0d, Lk>L %0d",
             n_fwd1, n_fwd2, n_fwd3, n_final, n_ltail, n_lktail, n_empty, n_lk_gt_l);
    check(n_upper > 0, "no top-right RB");
    check(n_main > 0, "no main-diagonal RB");
    check(n_lower > 0, "no bottom-left RB");
    check(n_rev > 0, "no reversed hash word");
    check(n_fwd1 > 0, "no distance-1 forwarding");
    check(n_fwd2 > 0, "no distance-2 forwarding");
    check(n_fwd3 > 0, "no distance-3 forwarding");
    check(n_final > 0, "no final key word");
    check(n_ltail > 0 && n_lktail > 0 && n_empty > 0 && n_lk_gt_l > 0, "size cases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
