// Self-checking testbench of the hash reversal stage: pass-through and
// bit-reversed words, enable holding the register.
module tb_hash_reverse;
  localparam int P = 16;
  logic clk = 0;
  logic en, rev;
  logic [P-1:0] hin, hout, exp_v;
  int checks = 0, failures = 0;

  hash_reverse #(.P(P)) dut (.clk, .en, .rev, .hash_in(hin), .hash_out(hout));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; rev = 0; hin = 16'h0001;
    @(negedge clk);
    checks++; if (hout !== 16'h0001) failures++;
    rev = 1; hin = 16'h0001;
    @(negedge clk);
    checks++; if (hout !== 16'h8000) failures++;
    hin = 16'h1234;
    @(negedge clk);
    checks++; if (hout !== 16'h2c48) begin failures++; $display("rev 1234 -> %h", hout); end
    for (int t = 0; t < 200; t++) begin
      hin = 16'($urandom); rev = 1'($urandom);
      for (int k = 0; k < P; k++) exp_v[k] = rev ? hin[P-1-k] : hin[k];
      @(negedge clk);
      checks++; if (hout !== exp_v) failures++;
    end
    exp_v = hout; en = 0; hin = ~hin;
    @(negedge clk);
    checks++; if (hout !== exp_v) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
