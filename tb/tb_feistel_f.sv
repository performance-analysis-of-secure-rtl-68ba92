// tb_feistel_f: loads the four S-boxes with random words through the write
// port, then checks F(x) = ((S0[a] + S1[b]) ^ S2[c]) + S3[d] for random inputs
// in the evaluation phase against the reference model. In the precharge
// phase the WDDL XOR output is 0, so F must equal S3[d]; the WDDL rails must
// be well formed in both phases.
module tb_feistel_f;
  import blowfish_pkg::*;
  import bf_model_pkg::*;
  logic clk = 1'b0, pre;
  word_t x, f;
  sbox_wr_t wr;
  logic rail_ok;
  int checks = 0, failures = 0, cycles = 0;
  bf_model m;

  feistel_f dut (.clk(clk), .pre(pre), .x(x), .sbox_wr(wr), .f(f), .rail_ok(rail_ok));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic expect_eq(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x=%h: got %h expected %h", what, x, got, exp);
    end
  endtask

  initial begin
    m = new();
    pre = 1'b1; x = '0; wr = '0;
    for (int k = 0; k < 4; k++)
      for (int j = 0; j < 256; j++) begin
        @(negedge clk);
        wr.we = 1'b1; wr.sel = 2'(k); wr.addr = 8'(j); wr.data = $urandom;
        m.S[k][j] = wr.data;
      end
    @(negedge clk);
    wr.we = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      x = $urandom;
      pre = 1'b0;
      #1 expect_eq(f, m.f(x), "evaluate");
      checks++;
      if (!rail_ok) begin failures++; $display("FAIL rails (evaluate)"); end
      pre = 1'b1;
      #1 expect_eq(f, m.S[3][x[7:0]], "precharge");
      checks++;
      if (!rail_ok) begin failures++; $display("FAIL rails (precharge)"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
