// tb_rc6c_encrypter: encrypts three 320-bit blocks under two subkey sets and
// compares C1..C5 with a software model. Checks the 22-clock start-to-ready
// latency, that p1..p5 are needed only in the start cycle, and that ready and
// the ciphertext hold until the next start.
module tb_rc6c_encrypter;
  import rc6c_tb_vec_pkg::*;

  localparam int LATENCY = 22;

  logic     clock = 1'b0, reset = 1'b1, start = 1'b0;
  word_t    subkeys [40];
  half_t p [5];
  half_t c [5];
  logic     ready;
  int       checks = 0, failures = 0;

  always #5 clock = ~clock;

  rc6c_encrypter dut (
    .clock(clock), .reset(reset), .start(start), .subkeys(subkeys),
    .p1(p[0]), .p2(p[1]), .p3(p[2]), .p4(p[3]), .p5(p[4]),
    .c1(c[0]), .c2(c[1]), .c3(c[2]), .c4(c[3]), .c5(c[4]),
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
        $display("FAIL %s C%0d=%h expected %h", name, i + 1, c[i], exp[i]);
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
    block(S_KEY_A, P_SEQ, C_SEQ_KEY_A, "seq/keyA");
    block(S_KEY_B, P_SEQ, C_SEQ_KEY_B, "seq/keyB");
    block(S_KEY_B, P_RND, C_RND_KEY_B, "rnd/keyB");
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
