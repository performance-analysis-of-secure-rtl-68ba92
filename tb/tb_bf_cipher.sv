// tb_bf_cipher: two cipher units, one with WDDL rounds (default, two cycles
// per round) and one without (one cycle per round), share random S-boxes and a
// random P-array. Random blocks are encrypted and the results decrypted again;
// both are compared with the reference model, the start-to-done latency is
// checked (16 * (1 + WDDL) + 1 cycles), a start pulse while busy must be
// ignored, and the WDDL unit must spend exactly 16 precharge cycles per block.
module tb_bf_cipher;
  import blowfish_pkg::*;
  import bf_model_pkg::*;
  logic clk = 1'b0, rst_n;
  logic start;
  dir_e dir;
  block_t blk_in;
  parray_t p;
  sbox_wr_t wr;
  logic   busy_w, done_w, pre_w, busy_n, done_n, pre_n;
  block_t out_w, out_n;
  int checks = 0, failures = 0, cycles = 0;
  int pre_cycles = 0;
  bf_model m;

  bf_cipher u_wddl (.clk(clk), .rst_n(rst_n), .start(start), .dir(dir), .block_in(blk_in),
                    .p(p), .sbox_wr(wr), .busy(busy_w), .done(done_w), .block_out(out_w),
                    .pre(pre_w));
  bf_cipher #(.WDDL(1'b0)) u_plain (.clk(clk), .rst_n(rst_n), .start(start), .dir(dir),
                    .block_in(blk_in), .p(p), .sbox_wr(wr), .busy(busy_n), .done(done_n),
                    .block_out(out_n), .pre(pre_n));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (busy_w && pre_w) pre_cycles++;
  end

  task automatic expect_eq(block_t got, block_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Runs one block on both units and returns the WDDL unit's result.
  task automatic run(block_t b, dir_e d, output block_t res);
    int t0, t_w, t_n, pre0;
    bit   seen_w, seen_n;
    @(negedge clk);
    start = 1'b1; dir = d; blk_in = b;
    t0 = cycles; pre0 = pre_cycles;
    @(negedge clk);
    start = 1'b1; blk_in = ~b;          // must be ignored: both units are busy
    @(negedge clk);
    start = 1'b0;
    seen_w = 0; seen_n = 0;
    while (!seen_w) begin
      if (done_n && !seen_n) begin
        seen_n = 1; t_n = cycles - t0;
        expect_eq(out_n, m.crypt(b, d == DIR_DECRYPT), "plain unit result");
      end
      if (done_w) begin
        seen_w = 1; t_w = cycles - t0;
      end
      @(negedge clk);
    end
    // done_w was seen in the cycle before this negedge
    expect_eq(out_w, m.crypt(b, d == DIR_DECRYPT), "WDDL unit result");
    res = out_w;
    checks += 3;
    if (t_w != 33) begin failures++; $display("FAIL WDDL latency %0d", t_w); end
    if (t_n != 17) begin failures++; $display("FAIL plain latency %0d", t_n); end
    if (pre_cycles - pre0 != 16) begin failures++; $display("FAIL precharge cycles %0d", pre_cycles - pre0); end
  endtask

  initial begin
    block_t pt, ct, back;
    m = new();
    rst_n = 1'b0; start = 1'b0; dir = DIR_ENCRYPT; blk_in = '0; wr = '0;
    for (int i = 0; i < P_WORDS; i++) begin p[i] = $urandom; m.P[i] = p[i]; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4; k++)
      for (int j = 0; j < 256; j++) begin
        @(negedge clk);
        wr.we = 1'b1; wr.sel = 2'(k); wr.addr = 8'(j); wr.data = $urandom;
        m.S[k][j] = wr.data;
      end
    @(negedge clk);
    wr.we = 1'b0;
    for (int n = 0; n < 40; n++) begin
      pt = {$urandom, $urandom};
      run(pt, DIR_ENCRYPT, ct);
      run(ct, DIR_DECRYPT, back);
      expect_eq(back, pt, "decrypt(encrypt(x)) == x");
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
