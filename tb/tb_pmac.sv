// Self-checking testbench of the PMAC unit: random hash, data and running-key
// words, the result compared with a bit-by-bit GF(2) sum computed here.
module tb_pmac;
  localparam int P = 32;
  logic clk = 0;
  logic en;
  logic [P-1:0] hash, d1, d2, kmid, result;
  int checks = 0, failures = 0;

  pmac #(.P(P)) dut (.clk, .en, .hash, .data1(d1), .data2(d2), .key_mid(kmid), .result);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [P-1:0] ref_model(logic [P-1:0] h, logic [P-1:0] a,
                                             logic [P-1:0] b, logic [P-1:0] k);
    logic [P-1:0] r;
    logic [2*P-1:0] w;
    w = {b, a};
    for (int i = 0; i < P; i++) begin
      r[i] = k[i];
      for (int j = 0; j < P; j++) r[i] = r[i] ^ (h[j] & w[i+j]);
    end
    return r;
  endfunction

  logic [P-1:0] exp_r;
  initial begin
    en = 0; hash = '0; d1 = '0; d2 = '0; kmid = '0;
    @(negedge clk);
    // single-bit cases: h[k] only, data bit i+k only -> out[i]
    hash = 32'h1 << 3; d1 = 32'h1 << 5; d2 = '0; kmid = '0; en = 1;
    @(negedge clk);
    checks++; if (result !== (32'h1 << 2)) begin failures++; $display("unit case: %h", result); end
    // a window bit from data2 reaching the last row
    hash = 32'h1 << (P-1); d1 = '0; d2 = 32'h1 << (P-2);
    @(negedge clk);
    checks++; if (result !== (32'h1 << (P-1))) begin failures++; $display("data2 case: %h", result); end
    for (int t = 0; t < 300; t++) begin
      hash = $urandom; d1 = $urandom; d2 = $urandom; kmid = $urandom;
      if (t % 7 == 0) hash = '1;
      exp_r = ref_model(hash, d1, d2, kmid);
      @(negedge clk);
      checks++;
      if (result !== exp_r) begin
        failures++;
        if (failures < 5) $display("mismatch t=%0d got %h exp %h", t, result, exp_r);
      end
    end
    // enable low holds the result
    exp_r = result; en = 0; hash = $urandom; d1 = $urandom;
    @(negedge clk);
    checks++; if (result !== exp_r) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
