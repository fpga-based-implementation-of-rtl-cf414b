// Design-space sweep over the processing-unit size: a block at 10 %
// compression run through cores with 32-, 64-, 128- and 256-bit processing
// units, one after the other. The block is a quarter of the 1,000,000-bit
// reference block (L = 250,000, L_k = 25,000) to keep the p = 32 run short;
// the full block at p = 256 is run by tb_pa_full. Each run must take
// ceil(L_k/p) * (ceil(L/p) + 1) + 4 cycles (6,110,552 / 1,528,032 /
// 383,184 / 95,848) and produce a final key that matches the GF(2) product
// on sampled bits. Every core has its own gated clock so that only the one
// under test costs simulation time.
module tb_pa_table1;
  logic clk = 0, rst_n = 0;
  logic go [4];
  logic fin [4];
  int ck [4], fl [4];
  longint cy [4];
  longint exp_cy [4] = '{6_110_552, 1_528_032, 383_184, 95_848};
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // Only the runner in progress is clocked, so the idle cores cost no
  // simulation time. The enables change while clk is low.
  logic run_en [4];
  logic rclk [4];
  for (genvar i = 0; i < 4; i++) begin : g_clk
    assign rclk[i] = clk & run_en[i];
  end

  pa_block_runner #(.P(32), .L(250_000), .LK(25_000))  r32  (.clk(rclk[0]), .rst_n, .go(go[0]), .finished(fin[0]), .checks(ck[0]), .failures(fl[0]), .cycles(cy[0]));
  pa_block_runner #(.P(64), .L(250_000), .LK(25_000))  r64  (.clk(rclk[1]), .rst_n, .go(go[1]), .finished(fin[1]), .checks(ck[1]), .failures(fl[1]), .cycles(cy[1]));
  pa_block_runner #(.P(128), .L(250_000), .LK(25_000)) r128 (.clk(rclk[2]), .rst_n, .go(go[2]), .finished(fin[2]), .checks(ck[2]), .failures(fl[2]), .cycles(cy[2]));
  pa_block_runner #(.P(256), .L(250_000), .LK(25_000)) r256 (.clk(rclk[3]), .rst_n, .go(go[3]), .finished(fin[3]), .checks(ck[3]), .failures(fl[3]), .cycles(cy[3]));

  initial begin
    repeat (9_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin go[i] = 0; run_en[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      go[i] = 1; run_en[i] = 1;
      wait (fin[i]);
      @(negedge clk);
      run_en[i] = 0;
      checks += ck[i] + 1;
      failures += fl[i];
      if (cy[i] != exp_cy[i]) failures++;
      $display("p=%0d: %0d cycles (%0d expected), %0d checks, %0d failures",
               32 << i, cy[i], exp_cy[i], ck[i], fl[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
