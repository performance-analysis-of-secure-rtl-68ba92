// tb_mod_adder: random and corner-case sums for three moduli: the Blowfish
// case 2^32 (default parameters), 2^16 + 1 on 17 bits, and 1000 on 10 bits.
// Expected values are (x + y) mod M computed in 64-bit arithmetic.
module tb_mod_adder;
  logic [31:0] x32, y32, s32;
  logic [16:0] x17, y17, s17;
  logic [9:0]  x10, y10, s10;
  int checks = 0, failures = 0;

  mod_adder dut32 (.x(x32), .y(y32), .s(s32));
  mod_adder #(.W(17), .M(18'd65537)) dut17 (.x(x17), .y(y17), .s(s17));
  mod_adder #(.W(10), .M(11'd1000))  dut10 (.x(x10), .y(y10), .s(s10));

  task automatic check(longint unsigned got, longint unsigned a, longint unsigned b,
                       longint unsigned m);
    longint unsigned exp = (a + b) % m;
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL M=%0d %0d + %0d = %0d, expected %0d", m, a, b, got, exp);
    end
  endtask

  initial begin
    longint unsigned a, b;
    for (int i = 0; i < 3000; i++) begin
      case (i)
        0: begin a = 0; b = 0; end
        1: begin a = 64'hFFFF_FFFF; b = 1; end
        2: begin a = 64'hFFFF_FFFF; b = 64'hFFFF_FFFF; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      x32 = a[31:0]; y32 = b[31:0];
      x17 = 17'((i == 1 || i == 2) ? 65536 : a % 65537);
      y17 = 17'((i == 2) ? 65536 : b % 65537);
      x10 = 10'((i == 1 || i == 2) ? 999 : a % 1000);
      y10 = 10'((i == 2) ? 999 : b % 1000);
      #1;
      check(s32, x32, y32, 64'h1_0000_0000);
      check(s17, x17, y17, 65537);
      check(s10, x10, y10, 1000);
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
