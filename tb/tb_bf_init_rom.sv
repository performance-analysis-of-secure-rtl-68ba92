// tb_bf_init_rom: checks the initial-value table against published Blowfish
// constants (first and last words of the P-array and of each S-box, which are
// consecutive 32-bit groups of the hex expansion of pi), plus the XOR and the
// sum over all 1042 words, and that addresses beyond the table read 0.
module tb_bf_init_rom;
  import blowfish_pkg::*;
  logic [10:0] addr;
  word_t data;
  int checks = 0, failures = 0;

  bf_init_rom dut (.addr(addr), .data(data));

  task automatic expect_word(int a, word_t exp);
    addr = 11'(a);
    #1;
    checks++;
    if (data !== exp) begin
      failures++;
      $display("FAIL word %0d: got %h expected %h", a, data, exp);
    end
  endtask

  initial begin
    word_t x_all, s_all;
    expect_word(0,    32'h243F6A88);   // P0
    expect_word(1,    32'h85A308D3);   // P1
    expect_word(2,    32'h13198A2E);   // P2
    expect_word(17,   32'h8979FB1B);   // P17
    expect_word(18,   32'hD1310BA6);   // S0[0]
    expect_word(273,  32'h6E85076A);   // S0[255]
    expect_word(274,  32'h4B7A70E9);   // S1[0]
    expect_word(530,  32'hE93D5A68);   // S2[0]
    expect_word(786,  32'h3A39CE37);   // S3[0]
    expect_word(1041, 32'h3AC372E6);   // S3[255]
    expect_word(1042, 32'h0);
    expect_word(2047, 32'h0);
    x_all = '0; s_all = '0;
    for (int a = 0; a < INIT_WORDS; a++) begin
      addr = 11'(a);
      #1;
      x_all ^= data;
      s_all += data;
    end
    checks++;
    if (x_all !== 32'h6ffa520a || s_all !== 32'h6bbf03ac) begin
      failures++;
      $display("FAIL table xor %h sum %h", x_all, s_all);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
