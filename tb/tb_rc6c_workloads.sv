// tb_rc6c_workloads: runs the kinds of evaluation the cipher was assessed with,
// on the core configured for a 256-bit (32-byte) key.
//   1. Known answer: the all-ones 320-bit block under key 000102...1F, compared
//      with a software model.
//   2. Key avalanche: the same block encrypted under 15 keys that each differ
//      from the first key in one bit. Each ciphertext must differ from the
//      reference in 35%..65% of its 320 bits and the average must lie in
//      45%..55%.
//   3. Plaintext/ciphertext independence: for 20 pseudo-random blocks (a fixed
//      xorshift64 sequence), IN = P xor C is put through three tests of the NIST
//      SP 800-22 suite at significance 0.01: frequency (monobit), runs and
//      cumulative sums (forward). The 320 bits of IN are taken bit 0 of P1 xor
//      C1 first. At most one of the 20 blocks may fail each test.
//   4. Bulk encryption: 10,000 bytes (250 blocks) encrypted one after another;
//      the total clock count must be 250 times the per-block time.
module tb_rc6c_workloads;

  localparam int KEY_BYTES  = 32;
  localparam int OP_LATENCY = 23;

  localparam logic [255:0] KEY = 256'h000102030405060708090A0B0C0D0E0F101112131415161718191A1B1C1D1E1F;
  localparam logic [4:0][63:0] C_ONES = {
    64'h45C0B9F42C6678FF, 64'h12F628E99AD14ED7, 64'hFEE68B7199E4FDCD,
    64'h720C689A020C0DF2, 64'h44D9959F4A7DFE09};

  logic                  clock = 1'b0, reset = 1'b1;
  logic [8*KEY_BYTES-1:0] key;
  logic [4:0][63:0]      text_in, text_out;
  logic                  start_key_gen = 1'b0, start_encryption = 1'b0, start_decryption = 1'b0;
  logic                  enc_dec, key_ready, ready, busy;
  int                    checks = 0, failures = 0;

  always #5 clock = ~clock;

  rc6c_top #(.KEY_BYTES(KEY_BYTES)) dut (
    .clock(clock), .reset(reset), .key(key), .text_in(text_in),
    .start_key_gen(start_key_gen), .start_encryption(start_encryption),
    .start_decryption(start_decryption), .text_out(text_out),
    .enc_dec(enc_dec), .key_ready(key_ready), .ready(ready), .busy(busy));

  // erfc by the Chebyshev fit of Numerical Recipes (error below 1.2e-7).
  function automatic real erfc_nr(real x);
    real z, t, r;
    z = (x < 0.0) ? -x : x;
    t = 1.0 / (1.0 + 0.5 * z);
    r = t * $exp(-z * z - 1.26551223 + t * (1.00002368 + t * (0.37409196 + t * (0.09678418 +
        t * (-0.18628806 + t * (0.27886807 + t * (-1.13520398 + t * (1.48851587 +
        t * (-0.82215223 + t * 0.17087277)))))))));
    return (x >= 0.0) ? r : 2.0 - r;
  endfunction

  function automatic real phi(real x);   // standard normal CDF
    return 0.5 * erfc_nr(-x / $sqrt(2.0));
  endfunction

  function automatic real p_monobit(logic [319:0] s);
    real sobs;
    sobs = (real'($countones(s)) * 2.0 - 320.0) / $sqrt(320.0);
    if (sobs < 0.0) sobs = -sobs;
    return erfc_nr(sobs / $sqrt(2.0));
  endfunction

  function automatic real p_runs(logic [319:0] s);
    real n, pi, v, d;
    n  = 320.0;
    pi = real'($countones(s)) / n;
    d  = pi - 0.5;
    if (d < 0.0) d = -d;
    if (d >= 2.0 / $sqrt(n)) return 0.0;   // frequency prerequisite fails
    v = 1.0;
    for (int i = 1; i < 320; i++) if (s[i] != s[i-1]) v += 1.0;
    d = v - 2.0 * n * pi * (1.0 - pi);
    if (d < 0.0) d = -d;
    return erfc_nr(d / (2.0 * $sqrt(2.0 * n) * pi * (1.0 - pi)));
  endfunction

  function automatic real p_cusum(logic [319:0] s);
    real n, z, sq, sum1, sum2;
    int  acc, zmax;
    n = 320.0;
    acc = 0; zmax = 0;
    for (int i = 0; i < 320; i++) begin
      acc += s[i] ? 1 : -1;
      if (acc > zmax) zmax = acc;
      if (-acc > zmax) zmax = -acc;
    end
    z = real'(zmax);
    sq = $sqrt(n);
    sum1 = 0.0; sum2 = 0.0;
    for (int k = $rtoi((-n / z + 1.0) / 4.0); k <= $rtoi((n / z - 1.0) / 4.0); k++)
      sum1 += phi((4.0 * k + 1.0) * z / sq) - phi((4.0 * k - 1.0) * z / sq);
    for (int k = $rtoi((-n / z - 3.0) / 4.0); k <= $rtoi((n / z - 1.0) / 4.0); k++)
      sum2 += phi((4.0 * k + 3.0) * z / sq) - phi((4.0 * k + 1.0) * z / sq);
    return 1.0 - sum1 + sum2;
  endfunction

  logic [63:0] rng = 64'h0123456789ABCDEF;
  function automatic logic [63:0] xorshift64(ref logic [63:0] st);
    st ^= st << 13;
    st ^= st >> 7;
    st ^= st << 17;
    return st;
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic gen_key(logic [8*KEY_BYTES-1:0] k);
    int n = 0;
    @(negedge clock);
    key = k; start_key_gen = 1'b1;
    @(negedge clock);
    start_key_gen = 1'b0;
    while (!key_ready && n < 1000) begin
      @(negedge clock);
      n++;
    end
    checks++;
    if (!key_ready) fail("key generation did not finish");
  endtask

  // Encrypt one block; returns the ciphertext and the clocks from request to ready.
  task automatic encrypt(logic [4:0][63:0] p, output logic [4:0][63:0] c, output int lat);
    @(negedge clock);
    text_in = p; start_encryption = 1'b1;
    @(negedge clock);
    start_encryption = 1'b0;
    lat = 1;
    while (!ready && lat < 1000) begin
      @(negedge clock);
      lat++;
    end
    c = text_out;
  endtask

  initial begin
    logic [4:0][63:0] ones, c_ref, c, p;
    int lat, d, sum_d, n_fail [3];
    longint unsigned t0, t1;
    real pv [3];
    logic [319:0] in_seq;
    key = '0; text_in = '0;
    ones = '1;
    repeat (3) @(negedge clock);
    reset = 1'b0;

    // 1. known answer
    gen_key(KEY);
    encrypt(ones, c_ref, lat);
    checks++;
    if (c_ref !== C_ONES) fail($sformatf("known answer %h", c_ref));

    // 2. key avalanche
    sum_d = 0;
    for (int i = 0; i < 15; i++) begin
      logic [255:0] k2;
      k2 = KEY;
      k2[i * 17] = ~k2[i * 17];
      gen_key(k2);
      encrypt(ones, c, lat);
      d = $countones(c ^ c_ref);
      sum_d += d;
      $display("avalanche block %0d: key bit %0d flipped, %0d of 320 bits changed (%0.2f)",
               i + 1, i * 17, d, real'(d) / 320.0);
      checks++;
      if (d < 112 || d > 208) fail($sformatf("avalanche %0d bits", d));
    end
    $display("avalanche average %0.2f bits (%0.3f)", real'(sum_d) / 15.0, real'(sum_d) / 15.0 / 320.0);
    checks++;
    if (sum_d < 15 * 144 || sum_d > 15 * 176) fail("avalanche average out of range");

    // 3. independence of P and C: NIST tests on IN = P ^ C
    gen_key(KEY);
    n_fail = '{0, 0, 0};
    for (int i = 0; i < 20; i++) begin
      for (int w = 0; w < 5; w++) p[w] = xorshift64(rng);
      encrypt(p, c, lat);
      in_seq = p ^ c;
      pv[0] = p_monobit(in_seq);
      pv[1] = p_runs(in_seq);
      pv[2] = p_cusum(in_seq);
      $display("IN block %2d: monobit p=%0.4f runs p=%0.4f cusum p=%0.4f", i + 1, pv[0], pv[1], pv[2]);
      for (int k = 0; k < 3; k++) if (pv[k] < 0.01) n_fail[k]++;
    end
    $display("blocks failing at 0.01: monobit %0d, runs %0d, cusum %0d", n_fail[0], n_fail[1], n_fail[2]);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (n_fail[k] > 1) fail($sformatf("NIST test %0d failed on %0d blocks", k, n_fail[k]));
    end

    // 4. bulk: 10,000 bytes = 250 blocks of 40 bytes
    t0 = 0;
    for (int i = 0; i < 250; i++) begin
      for (int w = 0; w < 5; w++) p[w] = {$urandom, $urandom};
      encrypt(p, c, lat);
      checks++;
      if (lat != OP_LATENCY) fail($sformatf("block %0d latency %0d", i, lat));
      t0 += longint'(lat) + 1;   // plus the request clock
    end
    t1 = 250 * (OP_LATENCY + 1);
    $display("10000 bytes encrypted in %0d clocks (%0.3f bytes per clock)", t0, 10000.0 / real'(t0));
    checks++;
    if (t0 != t1) fail("bulk clock count");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
