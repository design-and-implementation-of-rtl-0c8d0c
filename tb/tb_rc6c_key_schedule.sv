// tb_rc6c_key_schedule: runs the key schedule for two 128-bit keys and compares
// all 40 subkeys with values from a software model of the RC6 schedule. Checks
// that ready drops at start and rises 3*max(c,t)+1 = 121 clocks later, and that
// a reset in the middle of a run clears ready. Two more instances cover the
// shortest and longest keys: 2 bytes (the 16-bit key port of the published block
// symbols, value 0) and 255 bytes (key byte k = k), which needs
// 3*max(128, 40) + 1 = 385 clocks.
module tb_rc6c_key_schedule;
  import rc6c_tb_vec_pkg::word_t;
  import rc6c_tb_vec_pkg::KEY_A, rc6c_tb_vec_pkg::KEY_B;
  import rc6c_tb_vec_pkg::S_KEY_A, rc6c_tb_vec_pkg::S_KEY_B;

  localparam int LATENCY = 121;

  logic         clock = 1'b0, reset = 1'b1, start = 1'b0;
  logic [127:0] key;
  word_t        subkeys [40];
  logic         ready;
  int           checks = 0, failures = 0;

  localparam word_t S_KEY2_ZERO [40] = '{
    16'h8C22, 16'h8C49, 16'hDF3C, 16'h77B5, 16'hBD14, 16'h5C88, 16'hCE88, 16'hC6FA,
    16'h1B01, 16'h44C5, 16'h9FB4, 16'hABE5, 16'hA806, 16'h58F3, 16'hDEA5, 16'hF80D,
    16'h22BE, 16'h176E, 16'hEA61, 16'hB10A, 16'h26B9, 16'h8412, 16'h47D5, 16'h20B9,
    16'h5D84, 16'h517C, 16'h5CC9, 16'hE9E7, 16'hC72E, 16'hD32F, 16'h46A5, 16'h726D,
    16'hC089, 16'hC1F4, 16'h41A6, 16'h5A30, 16'hBA80, 16'h26DE, 16'h6F6D, 16'h0F7A};

  localparam word_t S_KEY255 [40] = '{
    16'h0D67, 16'h39B7, 16'h8172, 16'hBE35, 16'h92E7, 16'h3845, 16'hBDBF, 16'h7F5D,
    16'h39D7, 16'h295F, 16'h4000, 16'hD613, 16'h7BAA, 16'h37B0, 16'h0BDA, 16'h0289,
    16'h5118, 16'hADB6, 16'hC767, 16'hC139, 16'h6FD6, 16'hFC32, 16'hD440, 16'hDDCC,
    16'h7561, 16'h4104, 16'hABD5, 16'hA1A0, 16'h860F, 16'h4B38, 16'hAE95, 16'h26E7,
    16'hDB46, 16'hF3B9, 16'hFDDC, 16'hB2D7, 16'hED83, 16'h82D6, 16'h222C, 16'h3A7D};

  logic          start_x = 1'b0;
  logic [2039:0] key255;
  word_t         subkeys2 [40];
  word_t         subkeys255 [40];
  logic          ready2, ready255;

  rc6c_key_schedule #(.KEY_BYTES(2)) dut2 (
    .clock(clock), .reset(reset), .start(start_x), .key(16'h0000), .subkeys(subkeys2), .ready(ready2));

  rc6c_key_schedule #(.KEY_BYTES(255)) dut255 (
    .clock(clock), .reset(reset), .start(start_x), .key(key255), .subkeys(subkeys255), .ready(ready255));

  always #5 clock = ~clock;

  rc6c_key_schedule #(.KEY_BYTES(16)) dut (
    .clock(clock), .reset(reset), .start(start), .key(key), .subkeys(subkeys), .ready(ready));

  task automatic gen(logic [127:0] k, output int lat);
    @(negedge clock);
    key = k; start = 1'b1;
    @(negedge clock);
    start = 1'b0; key = ~k;   // key need only be valid at start
    lat = 1;
    checks++;
    if (ready) begin
      failures++;
      $display("FAIL ready still high after start");
    end
    while (!ready && lat < 1000) begin
      @(negedge clock);
      lat++;
    end
    checks++;
    if (lat != LATENCY) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, LATENCY);
    end
  endtask

  task automatic compare(word_t exp [40], string name);
    for (int i = 0; i < 40; i++) begin
      checks++;
      if (subkeys[i] !== exp[i]) begin
        failures++;
        $display("FAIL %s S[%0d]=%h expected %h", name, i, subkeys[i], exp[i]);
      end
    end
  endtask

  initial begin
    int lat;
    key = '0;
    repeat (3) @(negedge clock);
    reset = 1'b0;
    gen(KEY_A, lat);
    compare(S_KEY_A, "key A");
    gen(KEY_B, lat);
    compare(S_KEY_B, "key B");
    repeat (5) @(negedge clock);
    compare(S_KEY_B, "key B held");
    // restart, then reset halfway
    @(negedge clock);
    key = KEY_A; start = 1'b1;
    @(negedge clock);
    start = 1'b0;
    repeat (50) @(negedge clock);
    reset = 1'b1;
    @(negedge clock);
    reset = 1'b0;
    repeat (100) @(negedge clock);
    checks++;
    if (ready) begin
      failures++;
      $display("FAIL ready high after reset");
    end
    gen(KEY_A, lat);
    compare(S_KEY_A, "key A after reset");
    // shortest and longest keys
    for (int k = 0; k < 255; k++) key255[8*k +: 8] = 8'(k);
    @(negedge clock);
    start_x = 1'b1;
    @(negedge clock);
    start_x = 1'b0;
    lat = 1;
    while (!ready255 && lat < 1000) begin
      @(negedge clock);
      lat++;
    end
    checks++;
    if (lat != 385) begin
      failures++;
      $display("FAIL 255-byte key latency %0d", lat);
    end
    checks++;
    if (!ready2) begin
      failures++;
      $display("FAIL 2-byte key not ready");
    end
    for (int i = 0; i < 40; i++) begin
      checks += 2;
      if (subkeys2[i] !== S_KEY2_ZERO[i]) begin
        failures++;
        $display("FAIL 2-byte key S[%0d]=%h expected %h", i, subkeys2[i], S_KEY2_ZERO[i]);
      end
      if (subkeys255[i] !== S_KEY255[i]) begin
        failures++;
        $display("FAIL 255-byte key S[%0d]=%h expected %h", i, subkeys255[i], S_KEY255[i]);
      end
    end
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
