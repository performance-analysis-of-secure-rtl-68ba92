// tb_wddl_precharge: exhaustive check of the WDDL precharge circuit (4 bits):
// both rails 0 while precharging, (x, ~x) while evaluating.
module tb_wddl_precharge;
  logic       pre;
  logic [3:0] x, t, f;
  int checks = 0, failures = 0;

  wddl_precharge #(.W(4)) dut (.pre(pre), .x(x), .t(t), .f(f));

  initial begin
    for (int p = 0; p < 2; p++)
      for (int v = 0; v < 16; v++) begin
        pre = p[0]; x = v[3:0];
        #1;
        checks++;
        if (p == 1 ? (t !== 4'h0 || f !== 4'h0) : (t !== v[3:0] || f !== ~v[3:0])) begin
          failures++;
          $display("FAIL pre=%0d x=%h t=%h f=%h", p, v[3:0], t, f);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
