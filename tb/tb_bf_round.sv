// tb_bf_round: loads random S-boxes, then checks one round against the model,
// L' = R ^ F(L ^ P), R' = L ^ P, for random halves and subkeys in the
// evaluation phase, and that both outputs are 0 (the WDDL zero wave) in the
// precharge phase.
module tb_bf_round;
  import blowfish_pkg::*;
  import bf_model_pkg::*;
  logic clk = 1'b0, pre, rail_ok;
  word_t l_in, r_in, p_key, l_out, r_out;
  sbox_wr_t wr;
  int checks = 0, failures = 0, cycles = 0;
  bf_model m;

  bf_round dut (.clk(clk), .pre(pre), .l_in(l_in), .r_in(r_in), .p_key(p_key), .sbox_wr(wr),
                .l_out(l_out), .r_out(r_out), .rail_ok(rail_ok));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    word_t xl, el, er;
    m = new();
    pre = 1'b1; l_in = '0; r_in = '0; p_key = '0; wr = '0;
    for (int k = 0; k < 4; k++)
      for (int j = 0; j < 256; j++) begin
        @(negedge clk);
        wr.we = 1'b1; wr.sel = 2'(k); wr.addr = 8'(j); wr.data = $urandom;
        m.S[k][j] = wr.data;
      end
    @(negedge clk);
    wr.we = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      l_in = $urandom; r_in = $urandom; p_key = $urandom;
      pre = 1'b1;
      #1;
      checks++;
      if (l_out !== '0 || r_out !== '0 || !rail_ok) begin
        failures++;
        $display("FAIL precharge: l=%h r=%h rails=%b", l_out, r_out, rail_ok);
      end
      pre = 1'b0;
      #1;
      xl = l_in ^ p_key;
      er = xl;
      el = r_in ^ m.f(xl);
      checks++;
      if (l_out !== el || r_out !== er || !rail_ok) begin
        failures++;
        $display("FAIL evaluate L=%h R=%h P=%h: got %h %h expected %h %h",
                 l_in, r_in, p_key, l_out, r_out, el, er);
      end
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
