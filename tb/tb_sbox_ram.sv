// tb_sbox_ram: fills the S-box with random words, reads every entry back,
// overwrites random entries and checks that a read in the write cycle sees
// the old word and the next cycle sees the new one.
module tb_sbox_ram;
  import blowfish_pkg::*;
  logic clk = 1'b0, we;
  logic [7:0] waddr, raddr;
  word_t wdata, rdata;
  word_t model [256];
  int checks = 0, failures = 0, cycles = 0;

  sbox_ram dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic expect_eq(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 8'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 256; i++) begin
      raddr = 8'(i);
      #1 expect_eq(rdata, model[i], "readback");
    end
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we = 1'b1; waddr = 8'($urandom); wdata = $urandom; raddr = waddr;
      #1 expect_eq(rdata, model[waddr], "read during write");
      model[waddr] = wdata;
      @(negedge clk);
      we = 1'b0;
      #1 expect_eq(rdata, model[raddr], "read after write");
      raddr = 8'($urandom);
      #1 expect_eq(rdata, model[raddr], "random read");
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
