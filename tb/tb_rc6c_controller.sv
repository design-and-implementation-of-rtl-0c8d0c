// tb_rc6c_controller: drives the controller with the three requests and with
// engine models whose ready levels rise a fixed number of clocks after their
// start pulse. Checks start pulses, the ENCRYPTION/DECRYPTION flag, key_ready,
// ready and busy, request priority, and that requests are ignored while busy or
// (for encryption and decryption) before any key has been generated.
module tb_rc6c_controller;

  logic clock = 1'b0, reset = 1'b1;
  logic start_key_gen = 1'b0, start_encryption = 1'b0, start_decryption = 1'b0;
  logic ks_ready = 1'b0, enc_ready = 1'b0, dec_ready = 1'b0;
  logic ks_start, enc_start, dec_start, enc_dec, key_ready, ready, busy;
  int   checks = 0, failures = 0;
  int   n_ks = 0, n_enc = 0, n_dec = 0;

  always #5 clock = ~clock;

  rc6c_controller dut (.*);

  // Engine models: ready drops on start and rises DELAY clocks later.
  int ks_cnt = -1, enc_cnt = -1, dec_cnt = -1;
  always_ff @(posedge clock) begin
    if (ks_start)  begin ks_ready  <= 1'b0; ks_cnt  <= 7; n_ks++;  end
    else if (ks_cnt == 0)  begin ks_ready  <= 1'b1; ks_cnt  <= -1; end
    else if (ks_cnt > 0)   ks_cnt  <= ks_cnt - 1;
    if (enc_start) begin enc_ready <= 1'b0; enc_cnt <= 4; n_enc++; end
    else if (enc_cnt == 0) begin enc_ready <= 1'b1; enc_cnt <= -1; end
    else if (enc_cnt > 0)  enc_cnt <= enc_cnt - 1;
    if (dec_start) begin dec_ready <= 1'b0; dec_cnt <= 5; n_dec++; end
    else if (dec_cnt == 0) begin dec_ready <= 1'b1; dec_cnt <= -1; end
    else if (dec_cnt > 0)  dec_cnt <= dec_cnt - 1;
  end

  task automatic expect_bit(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic expect_int(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Apply requests for one clock; sample the start pulses they cause.
  task automatic request(logic kg, logic en, logic de, output logic [2:0] starts);
    @(negedge clock);
    start_key_gen = kg; start_encryption = en; start_decryption = de;
    #1;
    starts = {ks_start, enc_start, dec_start};
    @(negedge clock);
    start_key_gen = 1'b0; start_encryption = 1'b0; start_decryption = 1'b0;
  endtask

  task automatic wait_idle();
    int n = 0;
    while (busy && n < 100) begin
      @(negedge clock);
      n++;
    end
  endtask

  initial begin
    logic [2:0] s;
    repeat (3) @(negedge clock);
    reset = 1'b0;
    expect_bit(key_ready, 1'b0, "no key after reset");
    // encryption before a key exists is ignored
    request(0, 1, 0, s);
    expect_int(int'(s), int'(3'b000), "enc before key ignored");
    expect_bit(busy, 1'b0, "idle after ignored request");
    // key generation
    request(1, 0, 0, s);
    expect_int(int'(s), int'(3'b100), "ks_start");
    expect_bit(busy, 1'b1, "busy in keygen");
    request(0, 1, 0, s);              // while busy: ignored
    expect_int(int'(s), int'(3'b000), "enc while busy ignored");
    wait_idle();
    expect_bit(key_ready, 1'b1, "key_ready after keygen");
    // encryption
    request(0, 1, 0, s);
    expect_int(int'(s), int'(3'b010), "enc_start");
    expect_bit(ready, 1'b0, "ready cleared by enc");
    expect_bit(enc_dec, 1'b1, "enc_dec=1 for encryption");
    request(0, 0, 1, s);              // while busy: ignored
    expect_int(int'(s), int'(3'b000), "dec while busy ignored");
    wait_idle();
    expect_bit(ready, 1'b1, "ready after enc");
    // decryption
    request(0, 0, 1, s);
    expect_int(int'(s), int'(3'b001), "dec_start");
    expect_bit(enc_dec, 1'b0, "enc_dec=0 for decryption");
    wait_idle();
    expect_bit(ready, 1'b1, "ready after dec");
    // priority: all three at once -> key generation only
    request(1, 1, 1, s);
    expect_int(int'(s), int'(3'b100), "keygen has priority");
    expect_bit(key_ready, 1'b0, "key_ready cleared by keygen");
    expect_bit(ready, 1'b1, "ready unaffected by keygen");
    wait_idle();
    // encryption wins over decryption
    request(0, 1, 1, s);
    expect_int(int'(s), int'(3'b010), "enc wins over dec");
    wait_idle();
    expect_int(n_ks, 2, "key generations");
    expect_int(n_enc, 2, "encryptions");
    expect_int(n_dec, 1, "decryptions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
