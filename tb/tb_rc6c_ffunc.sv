// tb_rc6c_ffunc: checks the iterative F-function. A forward instance is compared
// with reference vectors from a software model; an inverse instance (INVERSE=1)
// must return the forward instance's inputs from its outputs, for the vectors
// and for random data. The start-to-ready latency must be 3 clocks, and the
// outputs must hold while ready stays high.
module tb_rc6c_ffunc;
  localparam int LATENCY = 3;

  typedef logic [63:0] half_t;

  logic   clock = 1'b0, reset = 1'b1;
  logic   start_f = 1'b0, start_i = 1'b0;
  logic [15:0] sk [4];
  half_t  in1, in2, f_out1, f_out2, i_out1, i_out2;
  logic   f_ready, i_ready;
  int     checks = 0, failures = 0;

  always #5 clock = ~clock;

  rc6c_ffunc #(.INVERSE(1'b0)) dut_f (
    .clock(clock), .reset(reset), .start(start_f), .sk(sk), .in1(in1), .in2(in2),
    .out1(f_out1), .out2(f_out2), .ready(f_ready));

  rc6c_ffunc #(.INVERSE(1'b1)) dut_i (
    .clock(clock), .reset(reset), .start(start_i), .sk(sk), .in1(f_out1), .in2(f_out2),
    .out1(i_out1), .out2(i_out2), .ready(i_ready));

  typedef struct packed {
    logic [63:0] in1, in2;
    logic [15:0] k0, k1, k2, k3;
    logic [63:0] out1, out2;
  } vec_t;

  localparam vec_t VECS [6] = '{
    '{64'h953F48F1A09F76B5, 64'h0FD630F1F29D0DA9, 16'h93BD, 16'h95E6, 16'h658C, 16'h0CB1, 64'hA2F0C5AF66BBF7F4, 64'hA5CEAD26AD369426},
    '{64'h3898D190F9EBDACC, 64'h8E81973E0BECD7B0, 16'hDBC4, 16'h2217, 16'h4A23, 16'h6B4C, 64'h359C1E21E79268C4, 64'hAFA6BB1D2E5BEC7E},
    '{64'h8A6A63EC24EDE6A4, 64'h922766581E27A1C0, 16'h4EF8, 16'h8F6D, 16'hD0ED, 16'hAE97, 64'hBE3C0ABB1271AD69, 64'hEC322C1B852D0C56},
    '{64'h1A61DBE22E44158B, 64'h923A736994E3BF91, 16'hA38F, 16'h3018, 16'h5F55, 16'h18F1, 64'h509443DEB9C2462A, 64'h6908C2AE91D52D21},
    '{64'hB64CE4228C38FB29, 64'h907A70C31012F037, 16'h0F42, 16'h9E77, 16'h34B9, 16'h7F15, 64'h187F92A00A89F92F, 64'hC68F88057C0F1A9B},
    '{64'h881ED162AE2EB154, 64'hC6F877186D76B07E, 16'h506B, 16'h7731, 16'h95E7, 16'hEC66, 64'hD6F03494EA4AE258, 64'hFF0610081E50873C}};

  task automatic expect_eq(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Pulse start on one instance and return the number of clocks until ready.
  task automatic run(bit inverse, output int lat);
    @(negedge clock);
    if (inverse) start_i = 1'b1; else start_f = 1'b1;
    @(negedge clock);
    start_i = 1'b0; start_f = 1'b0;
    lat = 1;
    while (!(inverse ? i_ready : f_ready) && lat < 20) begin
      @(negedge clock);
      lat++;
    end
  endtask

  task automatic one(logic [63:0] a, logic [63:0] b, logic [63:0] e1, logic [63:0] e2, bit known);
    int lat;
    logic [63:0] h1, h2;
    in1 = a; in2 = b;
    run(1'b0, lat);
    checks++;
    if (lat != LATENCY) begin
      failures++;
      $display("FAIL forward latency %0d", lat);
    end
    if (known) begin
      expect_eq(f_out1, e1, "forward out1");
      expect_eq(f_out2, e2, "forward out2");
    end
    in1 = ~a; in2 = ~b;                 // inputs change: outputs must hold
    h1 = f_out1; h2 = f_out2;
    repeat (2) @(negedge clock);
    expect_eq(f_out1, h1, "held out1");
    checks++;
    if (!f_ready) begin
      failures++;
      $display("FAIL ready did not stay high");
    end
    run(1'b1, lat);
    checks++;
    if (lat != LATENCY) begin
      failures++;
      $display("FAIL inverse latency %0d", lat);
    end
    expect_eq(i_out1, a, "inverse out1");
    expect_eq(i_out2, b, "inverse out2");
  endtask

  initial begin
    sk = '{default: '0};
    in1 = '0; in2 = '0;
    repeat (3) @(negedge clock);
    reset = 1'b0;
    foreach (VECS[i]) begin
      sk = '{VECS[i].k0, VECS[i].k1, VECS[i].k2, VECS[i].k3};
      one(VECS[i].in1, VECS[i].in2, VECS[i].out1, VECS[i].out2, 1'b1);
    end
    for (int i = 0; i < 100; i++) begin
      sk = '{16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom)};
      one({$urandom, $urandom}, {$urandom, $urandom}, '0, '0, 1'b0);
    end
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
