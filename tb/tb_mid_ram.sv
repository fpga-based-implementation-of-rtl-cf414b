// Self-checking testbench of BRAM-2: random writes and reads against a model,
// including a read and a write of the same word in one cycle (old value).
module tb_mid_ram;
  localparam int P = 32, DEPTH = 10, AW = $clog2(DEPTH);
  logic clk = 0;
  logic a_we, b_en;
  logic [AW-1:0] a_addr, b_addr;
  logic [P-1:0] a_wdata, b_rdata, exp_v;
  logic [P-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  mid_ram #(.P(P), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; b_en = 0; a_addr = '0; b_addr = '0; a_wdata = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      model[i] = $urandom; a_we = 1; a_addr = AW'(i); a_wdata = model[i];
    end
    @(negedge clk);
    a_we = 0;
    for (int t = 0; t < 400; t++) begin
      int ra, wa;
      ra = $urandom_range(DEPTH - 1);
      wa = (t % 5 == 0) ? ra : $urandom_range(DEPTH - 1);
      b_en = 1; b_addr = AW'(ra); exp_v = model[ra];
      a_we = 1'($urandom); a_addr = AW'(wa); a_wdata = $urandom;
      @(negedge clk);
      if (a_we) model[wa] = a_wdata;
      a_we = 0; b_en = 0;
      checks++;
      if (b_rdata !== exp_v) begin
        failures++; if (failures < 5) $display("t=%0d addr %0d: %h exp %h", t, ra, b_rdata, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
