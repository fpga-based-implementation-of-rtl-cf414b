// Self-checking testbench of the control unit. For several block sizes,
// including the p = 4, L = 11, L_k = 10 example (RB11 .. RB61) and L_k > L,
// it records every issued RB and checks it against the diagonal-by-diagonal
// order computed here: top-right diagonals first, then the main and the
// bottom-left ones, rows ascending along each. It also checks the hash-read,
// reverse, first-visit and last-visit flags, the group (hash word) index,
// and that start-to-done takes m*n + 4 cycles.
module tb_pa_control;
  import pa_pkg::*;
  localparam int P = 4, L_MAX = 64, LK_MAX = 80;
  logic clk = 0, rst_n = 0;
  logic start;
  logic [6:0] len_l, len_lk;
  logic busy, done;
  rb_cmd_t cmd;
  idx_t nk, m_words;
  logic [1:0] l_tail, lk_tail;
  int checks = 0, failures = 0;

  pa_control #(.P(P), .L_MAX(L_MAX), .LK_MAX(LK_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
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

  task automatic run_block(int l, int lk);
    int n, m, cnt, cycles;
    int ea[$], ej[$], eg[$];
    int seen_first[int], seen_last[int];
    int g;
    n = (l + P - 1) / P + 1;
    m = (lk + P - 1) / P;
    // expected order
    g = 0;
    for (int d = 0; d <= n - 2; d++) begin
      for (int a = 0; a < m; a++) if (a + d + 1 < n) begin ea.push_back(a); ej.push_back(a + d + 1); eg.push_back(g); end
      g++;
    end
    for (int d = -1; d >= -m; d--) begin
      for (int a = 0; a < m; a++) if (a + d + 1 >= 0 && a + d + 1 < n) begin ea.push_back(a); ej.push_back(a + d + 1); eg.push_back(g); end
      g++;
    end
    @(negedge clk);
    len_l = 7'(l); len_lk = 7'(lk); start = 1;
    @(negedge clk);
    start = 0;
    cnt = 0; cycles = 1;
    while (!done) begin
      if (cmd.valid) begin
        bit exp_first, exp_last, exp_hrd;
        if (cnt < ea.size()) begin
          check(int'(cmd.row) == ea[cnt] && int'(cmd.col) == ej[cnt],
                $sformatf("L=%0d Lk=%0d RB %0d: (%0d,%0d) exp (%0d,%0d)", l, lk, cnt,
                          cmd.row, cmd.col, ea[cnt], ej[cnt]));
          check(int'(cmd.grp) == eg[cnt], $sformatf("group of RB %0d", cnt));
          exp_hrd = (cnt == 0) || (eg[cnt] != eg[cnt-1]);
          check(cmd.hash_rd == exp_hrd, $sformatf("hash_rd of RB %0d", cnt));
          check(cmd.rev == (eg[cnt] >= n - 1), $sformatf("rev of RB %0d", cnt));
          exp_first = !seen_first.exists(ea[cnt]);
          seen_first[ea[cnt]] = 1;
          exp_last = 1;
          for (int k = cnt + 1; k < ea.size(); k++) if (ea[k] == ea[cnt]) exp_last = 0;
          check(cmd.first == exp_first, $sformatf("first of RB %0d", cnt));
          check(cmd.last == exp_last, $sformatf("last of RB %0d", cnt));
        end
        cnt++;
      end
      @(negedge clk);
      cycles++;
      if (cycles > 100000) break;
    end
    check(cnt == m * n, $sformatf("L=%0d Lk=%0d: %0d RBs, exp %0d", l, lk, cnt, m * n));
    check(cycles == m * n + 4, $sformatf("L=%0d Lk=%0d: %0d cycles, exp %0d", l, lk, cycles, m * n + 4));
    check(int'(nk) == (l + P - 1) / P && int'(m_words) == m, "nk / m");
    @(negedge clk);
    check(!busy, "busy after done");
  endtask

  initial begin
    start = 0; len_l = '0; len_lk = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(11, 10);   // the worked example: m = 3, n = 4, s = 6
    run_block(64, 6);
    run_block(40, 40);
    run_block(9, 30);    // L_k > L
    run_block(1, 1);
    run_block(0, 5);     // no key bits: only the main and bottom-left diagonals
    run_block(20, 0);    // empty final key
    for (int t = 0; t < 20; t++) run_block($urandom_range(L_MAX), $urandom_range(LK_MAX));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
