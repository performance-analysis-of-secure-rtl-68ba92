// tb_blowfish_processor: end-to-end test of the crypto-processor at its
// default parameters (WDDL rounds, 448-bit key).
//
// For several keys it runs a full key initialization and then encrypts and
// decrypts blocks. Expected results come from
//   * the published Blowfish vector for the all-zero key
//     (plaintext 0 -> ciphertext 4EF997456198DD78),
//   * three vectors for random 56-byte keys computed with an independent
//     software implementation,
//   * the reference model in bf_model_pkg for further random blocks.
// It also checks the handshake: start is ignored while ready is low, data_out
// changes only during key initialization or in the cycle ready rises, an
// operation takes 34 cycles from start to ready and a key initialization
// 18758 cycles from key_load to ready. Each mechanism (key initialization,
// key reload, encryption, decryption, ignored start, WDDL precharge cycles,
// back-to-back operations) is counted and must occur at least once.
module tb_blowfish_processor;
  import blowfish_pkg::*;
  import bf_model_pkg::*;

  localparam int OP_CYCLES  = 34;
  localparam int KEY_CYCLES = 18758;

  logic   clk = 1'b0, rst_n;
  key_t   key;
  logic   key_load, encrypt, start, ready;
  block_t data_in, data_out;
  int checks = 0, failures = 0, cycles = 0;
  int n_keyinit = 0, n_reload = 0, n_enc = 0, n_dec = 0, n_ignored = 0;
  int n_precharge = 0, n_b2b = 0;
  bit   in_keyinit = 0, ready_d = 0;
  block_t data_out_d = '0;
  bf_model m;

  blowfish_processor dut (.clk(clk), .rst_n(rst_n), .key(key), .key_load(key_load),
                          .data_in(data_in), .encrypt(encrypt), .start(start),
                          .data_out(data_out), .ready(ready));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (dut.u_cipher.busy && dut.u_cipher.pre) n_precharge++;
    // data_out may only change during key initialization or as ready rises.
    if (rst_n && data_out !== data_out_d && !in_keyinit && !(ready && !ready_d)) begin
      failures++;
      $display("FAIL data_out changed outside key init / ready rise at cycle %0d", cycles);
    end
    data_out_d <= data_out;
    ready_d    <= ready;
  end

  task automatic expect_eq(block_t got, block_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_key(key_t k);
    int t0;
    @(negedge clk);
    if (ready) n_reload++;
    key = k; key_load = 1'b1;
    in_keyinit = 1;
    t0 = cycles;
    @(negedge clk);
    key_load = 1'b0;
    key = ~k;                               // the key is captured at key_load
    @(posedge clk);
    while (!ready) @(posedge clk);
    in_keyinit = 0;
    checks++;
    if (cycles - t0 != KEY_CYCLES) begin
      failures++;
      $display("FAIL key init took %0d cycles, expected %0d", cycles - t0, KEY_CYCLES);
    end
    n_keyinit++;
    m.key_schedule(k);
  endtask

  // One operation; if chain is set the next start follows in the ready cycle.
  task automatic op(block_t b, bit enc, output block_t res);
    int t0;
    @(negedge clk);
    if (!ready) begin failures++; $display("FAIL not ready before start"); end
    data_in = b; encrypt = enc; start = 1'b1;
    t0 = cycles;
    @(negedge clk);
    data_in = ~b; encrypt = !enc;           // start while busy: must be ignored
    n_ignored++;
    @(negedge clk);
    start = 1'b0;
    @(posedge clk);
    while (!ready) @(posedge clk);
    checks++;
    if (cycles - t0 != OP_CYCLES) begin
      failures++;
      $display("FAIL operation took %0d cycles, expected %0d", cycles - t0, OP_CYCLES);
    end
    res = data_out;
    if (enc) n_enc++; else n_dec++;
  endtask

  task automatic check_pair(block_t pt, block_t ct_exp, string what);
    block_t ct, back;
    op(pt, 1'b1, ct);
    expect_eq(ct, ct_exp, {what, " encrypt"});
    op(ct_exp, 1'b0, back);
    expect_eq(back, pt, {what, " decrypt"});
  endtask

  // Two starts in a row: the second is raised in the same cycle ready rises.
  task automatic back_to_back(block_t a, block_t b);
    int t0;
    @(negedge clk);
    data_in = a; encrypt = 1'b1; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!ready) @(negedge clk);
    expect_eq(data_out, m.crypt(a, 1'b0), "back-to-back first");
    data_in = b; encrypt = 1'b1; start = 1'b1;
    t0 = cycles;
    @(negedge clk);
    start = 1'b0;
    while (!ready) @(negedge clk);
    expect_eq(data_out, m.crypt(b, 1'b0), "back-to-back second");
    n_b2b++;
  endtask

  function automatic key_t key_from_hex(string s);
    key_t k = '0;
    for (int i = 0; i < 112; i++) begin
      byte c = s[i];
      k = {k[443:0], 4'(c >= "a" ? c - "a" + 10 : c - "0")};
    end
    return k;
  endfunction

  initial begin
    block_t r, pt;
    key_t   k;
    m = new();
    rst_n = 1'b0; key = '0; key_load = 1'b0; encrypt = 1'b1; start = 1'b0; data_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // No key yet: start is ignored and ready stays low.
    start = 1'b1;
    repeat (3) @(negedge clk);
    start = 1'b0;
    checks++;
    if (ready || data_out !== '0) begin failures++; $display("FAIL ready without a key"); end
    n_ignored++;

    load_key('0);
    check_pair(64'h0, 64'h4ef997456198dd78, "zero key");

    load_key(key_from_hex({"52f22665a60c12d289185d950ee8813609166f6b113d178d6c0fd390",
                           "1ff239a1a095f20f9395650cf9380b8edb224a6b248a1e924e8fd0ae"}));
    check_pair(64'h1a61dbe22e44158b, 64'hf6495f1146fa875f, "key 1");
    load_key(key_from_hex({"9492a3305f188cb610900f9e347fae886dc6507795ec745c4c3fcb2e",
                           "b2c73e14934c867ee057ba72499bfa121e836b2ac15726ee7d6b0af6"}));
    check_pair(64'h13deef86ab1031d0, 64'h392508e8e9faa5a6, "key 2");
    load_key(key_from_hex({"c38e92cae0d15057b159987f94cc7411d717f14579b2aa100fbbb34f",
                           "a593feaed27248b762e3ab5805f0765a2b9c1d7e0f37c44921bd3f65"}));
    check_pair(64'heab477d26415479c, 64'hb7150079184d2849, "key 3");

    // A random key, random blocks against the reference model.
    for (int j = 0; j < KEY_W / 32; j++) k[32 * j +: 32] = $urandom;
    load_key(k);
    for (int n = 0; n < 20; n++) begin
      pt = {$urandom, $urandom};
      check_pair(pt, m.crypt(pt, 1'b0), "random");
    end
    back_to_back({$urandom, $urandom}, {$urandom, $urandom});

    $display("mechanisms: key_init=%0d reload=%0d encrypt=%0d decrypt=%0d ignored_start=%0d precharge_cycles=%0d back_to_back=%0d",
             n_keyinit, n_reload, n_enc, n_dec, n_ignored, n_precharge, n_b2b);
    checks++;
    if (n_keyinit == 0 || n_reload == 0 || n_enc == 0 || n_dec == 0 || n_ignored == 0 ||
        n_precharge == 0 || n_b2b == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
