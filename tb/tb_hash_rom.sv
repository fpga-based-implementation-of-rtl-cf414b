// Self-checking testbench of the hash memory: load through the single port,
// read back in random order, and check that the output holds between reads.
module tb_hash_rom;
  localparam int P = 32, DEPTH = 24, AW = $clog2(DEPTH);
  logic clk = 0;
  logic en, we;
  logic [AW-1:0] addr;
  logic [P-1:0] wdata, rdata, held;
  logic [P-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  hash_rom #(.P(P), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = '0; wdata = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      model[i] = $urandom; en = 1; we = 1; addr = AW'(i); wdata = model[i];
    end
    for (int t = 0; t < 200; t++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      @(negedge clk);
      en = 1; we = 0; addr = AW'(a);
      @(negedge clk);
      en = 0; addr = AW'($urandom_range(DEPTH - 1));
      checks++;
      if (rdata !== model[a]) begin failures++; $display("addr %0d: %h exp %h", a, rdata, model[a]); end
      held = rdata;
      @(negedge clk);
      checks++;
      if (rdata !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
