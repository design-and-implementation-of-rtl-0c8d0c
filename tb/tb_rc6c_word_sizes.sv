// tb_rc6c_word_sizes: the core with W = 32 (640-bit block) and W = 64 (1280-bit
// block), the other word sizes RC6 defines. For each, key B (16 bytes) is
// expanded, a known block is encrypted and compared with a software model, and
// the ciphertext is decrypted back. The known block repeats the 64-bit parts of
// the counting block across each wider part. Latencies must be the same as at
// W = 16 (key_ready 122 clocks, ready 23 clocks after the request).
module tb_rc6c_word_sizes;
  import rc6c_tb_vec_pkg::KEY_B, rc6c_tb_vec_pkg::P_SEQ;

  localparam logic [4:0][127:0] C32 = {
    128'h230FD936C343B2F3C2D9E726E48ACBA2, 128'h570DB54781BCFAD85E24EEEB585521A5,
    128'h7FC431F16722B94F021E149B2083AC1F, 128'h27CAB9EB3ECE4F4A8CC0EDA149F3DB97,
    128'h5CDAE8C550105456C0D6F3BF6002DB61};
  localparam logic [4:0][255:0] C64 = {
    256'h75A19C7C2026C3AB24D77C40EA0A399225CC134AF5F727DC5BF5ED33AE8C8181,
    256'hF7F7FC54C04CDC7C7F7A24915F5971F85023E173DEC3831FC0D62A022B71BC6B,
    256'h3C89F204723D8FC655E2BD183290492E89295E2583000902F3B277E1922EEECB,
    256'h03734DA8366D5B49D91F08927E114F4BD69FB0E6263232A3F8C0BC12AB8AA990,
    256'h49396E6A52084C69732389922ED00698ACF44D7D76E42EDA6676A17E4F2FAA35};

  logic clock = 1'b0, reset = 1'b1;
  logic start_key_gen = 1'b0, start_encryption = 1'b0, start_decryption = 1'b0;
  logic [4:0][127:0] in32, out32;
  logic [4:0][255:0] in64, out64;
  logic enc_dec32, key_ready32, ready32, busy32;
  logic enc_dec64, key_ready64, ready64, busy64;
  int   checks = 0, failures = 0;

  always #5 clock = ~clock;

  rc6c_top #(.W(32), .KEY_BYTES(16)) dut32 (
    .clock(clock), .reset(reset), .key(KEY_B), .text_in(in32),
    .start_key_gen(start_key_gen), .start_encryption(start_encryption),
    .start_decryption(start_decryption), .text_out(out32),
    .enc_dec(enc_dec32), .key_ready(key_ready32), .ready(ready32), .busy(busy32));

  rc6c_top #(.W(64), .KEY_BYTES(16)) dut64 (
    .clock(clock), .reset(reset), .key(KEY_B), .text_in(in64),
    .start_key_gen(start_key_gen), .start_encryption(start_encryption),
    .start_decryption(start_decryption), .text_out(out64),
    .enc_dec(enc_dec64), .key_ready(key_ready64), .ready(ready64), .busy(busy64));

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Pulse one request to both cores and count clocks until both report done.
  task automatic request(int kind, output int lat);
    @(negedge clock);
    case (kind)
      0: start_key_gen = 1'b1;
      1: start_encryption = 1'b1;
      default: start_decryption = 1'b1;
    endcase
    @(negedge clock);
    start_key_gen = 1'b0; start_encryption = 1'b0; start_decryption = 1'b0;
    lat = 1;
    while (!(kind == 0 ? (key_ready32 && key_ready64) : (ready32 && ready64)) && lat < 1000) begin
      @(negedge clock);
      lat++;
    end
  endtask

  initial begin
    int lat;
    logic [4:0][127:0] p32;
    logic [4:0][255:0] p64;
    for (int i = 0; i < 5; i++) begin
      p32[i] = {2{P_SEQ[i]}};
      p64[i] = {4{P_SEQ[i]}};
    end
    in32 = p32; in64 = p64;
    repeat (3) @(negedge clock);
    reset = 1'b0;

    request(0, lat);
    checks++;
    if (lat != 122) fail($sformatf("key latency %0d", lat));

    request(1, lat);
    checks++;
    if (lat != 23) fail($sformatf("encryption latency %0d", lat));
    checks += 2;
    if (out32 !== C32) fail($sformatf("W=32 ciphertext %h", out32));
    if (out64 !== C64) fail($sformatf("W=64 ciphertext %h", out64));

    in32 = out32; in64 = out64;
    request(2, lat);
    checks++;
    if (lat != 23) fail($sformatf("decryption latency %0d", lat));
    checks += 2;
    if (out32 !== p32) fail("W=32 decryption");
    if (out64 !== p64) fail("W=64 decryption");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
