// tb_rc6c_top: end-to-end test of the RC6-Cascade core at its default
// parameters (128-bit key, 320-bit block).
//
// Sequence: an encryption request before any key (ignored); key generation for
// key A with a request during it (ignored); encryption and decryption of the
// counting block; key generation for key B; encryption of two blocks and their
// decryption; then random blocks under key B, each encrypted and decrypted back.
// Ciphertexts are compared with a software model of the cipher, plaintexts with
// the originals. Latencies checked: key_ready 122 clocks and ready 23 clocks
// after the request. Counted mechanisms, each of which must occur: key
// generation, encryption, decryption, a switch of the ENCRYPTION/DECRYPTION
// flag, a request ignored while busy, a request ignored for lack of a key, and
// F-functions of one cascade running in parallel (seen as an operation
// shorter than ten F-functions one after another).
module tb_rc6c_top;
  import rc6c_tb_vec_pkg::*;

  localparam int KEY_LATENCY = 122;
  localparam int OP_LATENCY  = 23;

  logic                  clock = 1'b0, reset = 1'b1;
  logic [127:0]          key;
  logic [4:0][63:0]      text_in, text_out;
  logic                  start_key_gen = 1'b0, start_encryption = 1'b0, start_decryption = 1'b0;
  logic                  enc_dec, key_ready, ready, busy;
  int                    checks = 0, failures = 0;

  // mechanism counters
  int n_keygen = 0, n_enc = 0, n_dec = 0, n_mode_switch = 0;
  int n_ignored_busy = 0, n_ignored_nokey = 0, n_parallel_f = 0;

  always #5 clock = ~clock;

  rc6c_top dut (
    .clock(clock), .reset(reset), .key(key), .text_in(text_in),
    .start_key_gen(start_key_gen), .start_encryption(start_encryption),
    .start_decryption(start_decryption), .text_out(text_out),
    .enc_dec(enc_dec), .key_ready(key_ready), .ready(ready), .busy(busy));

  // Ten F-functions of three clocks each would take 30 clocks one after another;
  // an operation that ends sooner ran F-functions in parallel.
  localparam int SERIAL_LATENCY = 10 * 3 + 1;

  logic enc_dec_q;
  always @(posedge clock) begin
    enc_dec_q <= enc_dec;
    if (!reset && enc_dec_q != enc_dec) n_mode_switch++;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s at %0t", msg, $time);
  endtask

  // Pulse one request; returns the clocks until done_sig (key_ready or ready).
  task automatic do_request(int kind, output int lat);
    @(negedge clock);
    case (kind)
      0: start_key_gen = 1'b1;
      1: start_encryption = 1'b1;
      default: start_decryption = 1'b1;
    endcase
    @(negedge clock);
    start_key_gen = 1'b0; start_encryption = 1'b0; start_decryption = 1'b0;
    text_in = {$urandom, $urandom, $urandom, $urandom, $urandom,
               $urandom, $urandom, $urandom, $urandom, $urandom};  // must not matter
    lat = 1;
    while (!(kind == 0 ? key_ready : ready) && lat < 1000) begin
      @(negedge clock);
      lat++;
    end
  endtask

  task automatic gen_key(logic [127:0] k, bit probe_busy);
    int lat;
    key = k;
    fork
      do_request(0, lat);
      if (probe_busy) begin
        repeat (20) @(negedge clock);
        start_encryption = 1'b1;
        @(negedge clock);
        start_encryption = 1'b0;
        if (busy) n_ignored_busy++;   // request made while busy
      end
    join
    checks++;
    if (lat != KEY_LATENCY) fail($sformatf("key latency %0d", lat));
    // an accepted encryption would have kept the core busy past key generation
    checks++;
    if (probe_busy && (busy || ready)) fail("request during key generation was not ignored");
    n_keygen++;
  endtask

  task automatic operate(bit encrypt, half_t blk [5], output half_t res [5]);
    int lat;
    text_in = {blk[4], blk[3], blk[2], blk[1], blk[0]};
    do_request(encrypt ? 1 : 2, lat);
    checks++;
    if (lat != OP_LATENCY) fail($sformatf("operation latency %0d", lat));
    if (lat < SERIAL_LATENCY) n_parallel_f++;
    checks++;
    if (enc_dec !== encrypt) fail("enc_dec flag");
    for (int i = 0; i < 5; i++) res[i] = text_out[i];
    if (encrypt) n_enc++; else n_dec++;
  endtask

  task automatic compare(half_t got [5], half_t exp [5], string name);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (got[i] !== exp[i]) fail($sformatf("%s part %0d: %h expected %h", name, i + 1, got[i], exp[i]));
    end
  endtask

  initial begin
    half_t c [5], p [5], r [5];
    key = '0;
    text_in = '0;
    repeat (3) @(negedge clock);
    reset = 1'b0;

    // request before a key exists
    @(negedge clock);
    start_encryption = 1'b1;
    @(negedge clock);
    start_encryption = 1'b0;
    @(negedge clock);
    checks++;
    if (busy) fail("encryption started without key");
    else n_ignored_nokey++;
    repeat (30) @(negedge clock);
    checks++;
    if (ready) fail("an operation completed without key");

    gen_key(KEY_A, 1'b1);
    operate(1'b1, P_SEQ, c);
    compare(c, C_SEQ_KEY_A, "enc seq keyA");
    operate(1'b0, c, p);
    compare(p, P_SEQ, "dec seq keyA");

    gen_key(KEY_B, 1'b0);
    operate(1'b1, P_RND, c);
    compare(c, C_RND_KEY_B, "enc rnd keyB");
    operate(1'b1, P_SEQ, c);
    compare(c, C_SEQ_KEY_B, "enc seq keyB");
    operate(1'b0, c, p);
    compare(p, P_SEQ, "dec seq keyB");
    operate(1'b0, C_RND_KEY_B, p);
    compare(p, P_RND, "dec rnd keyB");

    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 5; i++) r[i] = {$urandom, $urandom};
      operate(1'b1, r, c);
      checks++;
      if (c == r) fail("ciphertext equals plaintext");
      operate(1'b0, c, p);
      compare(p, r, "random round trip");
    end

    checks += 7;
    if (n_keygen == 0)        fail("no key generation");
    if (n_enc == 0)           fail("no encryption");
    if (n_dec == 0)           fail("no decryption");
    if (n_mode_switch == 0)   fail("no mode switch");
    if (n_ignored_busy == 0)  fail("no request ignored while busy");
    if (n_ignored_nokey == 0) fail("no request ignored without key");
    if (n_parallel_f == 0)    fail("no parallel F-functions");
    $display("mechanisms: keygen=%0d enc=%0d dec=%0d mode_switch=%0d ignored_busy=%0d ignored_nokey=%0d parallel_f_ops=%0d",
             n_keygen, n_enc, n_dec, n_mode_switch, n_ignored_busy, n_ignored_nokey, n_parallel_f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
