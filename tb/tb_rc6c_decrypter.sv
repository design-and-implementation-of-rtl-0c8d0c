// tb_rc6c_decrypter: decrypts three 320-bit ciphertexts under two subkey sets and
// compares P1..P5 with the plaintexts of a software model. Checks the 22-clock start-to-ready
// latency, that c11..c55 are needed only in the start cycle, and that ready and
// the plaintext hold until the next start.
module tb_rc6c_decrypter;
  import rc6c_tb_vec_pkg::*;

  localparam int LATENCY = 22;

  logic     clock = 1'b0, reset = 1'b1, start = 1'b0;
  word_t    subkeys [40];
  half_t p [5];
  half_t c [5];
  logic     ready;
  int       checks = 0, failures = 0;

  always #5 clock = ~clock;

  rc6c_decrypter dut (
    .clock(clock), .reset(reset), .start(start), .subkeys(subkeys),
    .c11(p[0]), .c22(p[1]), .c33(p[2]), .c44(p[3]), .c55(p[4]),
    .p11(c[0]), .p22(c[1]), .p33(c[2]), .p44(c[3]), .p55(c[4]),
    .ready(ready));

  task automatic block(word_t s [40], half_t pt [5],
                       half_t exp [5], string name);
    int lat;
    foreach (s[i]) subkeys[i] = s[i];
    @(negedge clock);
    p = pt; start = 1'b1;
    @(negedge clock);
    start = 1'b0;
    foreach (p[i]) p[i] = {$urandom, $urandom};   // must not matter
    lat = 1;
    while (!ready && lat < 200) begin
      @(negedge clock);
      lat++;
    end
    checks++;
    if (lat != LATENCY) begin
      failures++;
      $display("FAIL %s latency %0d, expected %0d", name, lat, LATENCY);
    end
    repeat (3) @(negedge clock);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (c[i] !== exp[i]) begin
        failures++;
        $display("FAIL %s P%0d=%h expected %h", name, i + 1, c[i], exp[i]);
      end
    end
    checks++;
    if (!ready) begin
      failures++;
      $display("FAIL %s ready did not hold", name);
    end
  endtask

  initial begin
    foreach (subkeys[i]) subkeys[i] = '0;
    foreach (p[i]) p[i] = '0;
    repeat (3) @(negedge clock);
    reset = 1'b0;
    block(S_KEY_A, C_SEQ_KEY_A, P_SEQ, "seq/keyA");
    block(S_KEY_B, C_SEQ_KEY_B, P_SEQ, "seq/keyB");
    block(S_KEY_B, C_RND_KEY_B, P_RND, "rnd/keyB");
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
