// Self-checking testbench of BRAM-1: loads key words, then reads them through
// both ports and checks the zero word in front, the zero words after the key,
// the clearing of the bits past L in the last key word, and the one-cycle
// read latency.
module tb_key_ram;
  localparam int P = 16, DEPTH = 12, AW = $clog2(DEPTH);
  logic clk = 0;
  logic [AW-1:0] nk;
  logic [3:0] l_tail;
  logic a_en, a_we, b_en;
  logic [AW-1:0] a_addr, b_addr;
  logic [P-1:0] a_wdata, a_rdata, b_rdata;
  logic [P-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  key_ram #(.P(P), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [P-1:0] expect_word(int addr, int last, int tail);
    if (addr == 0 || addr > last) return '0;
    if (addr == last && tail != 0) return model[addr] & ~(16'hffff << tail);
    return model[addr];
  endfunction

  initial begin
    a_en = 0; a_we = 0; b_en = 0; a_addr = '0; b_addr = '0; a_wdata = '0;
    nk = 4'd5; l_tail = 4'd3;
    // load every word, the unused ones with garbage too
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = 16'($urandom) | 16'h8001;
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = model[i];
    end
    @(negedge clk);
    a_we = 0; a_en = 0;
    for (int cfg = 0; cfg < 3; cfg++) begin
      nk     = (cfg == 0) ? 4'd5 : (cfg == 1) ? 4'd9 : 4'd1;
      l_tail = (cfg == 0) ? 4'd3 : (cfg == 1) ? 4'd0 : 4'd15;
      for (int j = 0; j < DEPTH - 1; j++) begin
        @(negedge clk);
        a_en = 1; b_en = 1; a_addr = AW'(j); b_addr = AW'(j + 1);
        @(negedge clk);
        a_en = 0; b_en = 0;
        checks += 2;
        if (a_rdata !== expect_word(j, int'(nk), int'(l_tail))) begin
          failures++; $display("A cfg%0d addr %0d: %h", cfg, j, a_rdata);
        end
        if (b_rdata !== expect_word(j + 1, int'(nk), int'(l_tail))) begin
          failures++; $display("B cfg%0d addr %0d: %h", cfg, j + 1, b_rdata);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
