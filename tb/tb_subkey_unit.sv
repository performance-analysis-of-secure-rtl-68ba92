// tb_subkey_unit: writes random values into the P-array, applies key_xor with
// random 448-bit keys and checks P[i] ^= K[i mod 14] (K0 = key[447:416]), and
// checks that out-of-range writes are ignored and key_xor wins over a write.
module tb_subkey_unit;
  import blowfish_pkg::*;
  logic clk = 1'b0, we, key_xor;
  logic [4:0] widx;
  word_t wdata;
  key_t key;
  parray_t p;
  word_t model [P_WORDS];
  int checks = 0, failures = 0, cycles = 0;

  subkey_unit dut (.clk(clk), .we(we), .widx(widx), .wdata(wdata), .key_xor(key_xor),
                   .key(key), .p(p));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic compare(string what);
    for (int i = 0; i < P_WORDS; i++) begin
      checks++;
      if (p[i] !== model[i]) begin
        failures++;
        $display("FAIL %s P%0d: got %h expected %h", what, i, p[i], model[i]);
      end
    end
  endtask

  initial begin
    we = 1'b0; key_xor = 1'b0; widx = '0; wdata = '0; key = '0;
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < P_WORDS; i++) begin
        @(negedge clk);
        we = 1'b1; widx = 5'(i); wdata = $urandom; model[i] = wdata;
      end
      @(negedge clk);
      we = 1'b1; widx = 5'(18 + r % 14); wdata = $urandom;   // ignored
      @(negedge clk);
      we = 1'b0;
      compare("after writes");
      for (int j = 0; j < KEY_W / 32; j++) key[32 * j +: 32] = $urandom;
      key_xor = 1'b1;
      we = 1'b1; widx = 5'(r % 18); wdata = $urandom;          // loses to key_xor
      for (int i = 0; i < P_WORDS; i++) model[i] ^= key[447 - 32 * (i % 14) -: 32];
      @(negedge clk);
      key_xor = 1'b0; we = 1'b0;
      compare("after key xor");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
