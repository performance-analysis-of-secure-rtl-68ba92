// tb_wddl_and: checks the WDDL AND gate for every evaluation input (rails
// complementary: true output = a & b, false output its complement) and for the
// precharge input (all rails 0: both outputs 0).
module tb_wddl_and;
  logic a_t, a_f, b_t, b_f, y_t, y_f;
  int checks = 0, failures = 0;

  wddl_and dut (.a_t(a_t), .a_f(a_f), .b_t(b_t), .b_f(b_f), .y_t(y_t), .y_f(y_f));

  task automatic apply(logic at, logic af, logic bt, logic bf, logic et, logic ef);
    a_t = at; a_f = af; b_t = bt; b_f = bf;
    #1;
    checks++;
    if (y_t !== et || y_f !== ef) begin
      failures++;
      $display("FAIL a=(%b,%b) b=(%b,%b) y=(%b,%b) expected (%b,%b)", at, af, bt, bf, y_t, y_f, et, ef);
    end
  endtask

  initial begin
    logic a, b, e;
    for (int i = 0; i < 4; i++) begin
      a = i[1]; b = i[0];
      e = a & b;
      apply(a, ~a, b, ~b, e, ~e);     // evaluation
      apply(1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0);   // precharge between evaluations
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
