// tb_rc6c_round: checks the combinational RC6 round against reference vectors
// from a software model and, for random inputs, against a behavioural model
// written here with 32-bit arithmetic and explicit rotations.
module tb_rc6c_round;

  logic [63:0] x, y;
  logic [15:0] s_a, s_c;
  int checks = 0, failures = 0;

  rc6c_round dut (.x(x), .s_a(s_a), .s_c(s_c), .y(y));

  typedef struct packed {
    logic [63:0] x;
    logic [15:0] sa, sc;
    logic [63:0] y;
  } vec_t;

  localparam vec_t VECS [8] = '{
    '{64'hF2A74DE452E6B438, 16'h269E, 16'h6513, 64'h4DE43027B43854E9},
    '{64'h0C5C7FD0A6A3A450, 16'h128B, 16'hD23F, 64'h7FD02FC6A450B4B5},
    '{64'h1818E811892F902B, 16'h5D9D, 16'h9531, 64'hE8118F91902B01B4},
    '{64'hE8E25D940ED90475, 16'h81E7, 16'h36F6, 64'h5D94283B04759D04},
    '{64'h1600A35A099950D8, 16'h6F03, 16'h6B0D, 64'hA35A233250D87CE4},
    '{64'h3D9C172411E20B8F, 16'h1738, 16'h8D11, 64'h172456F40B8F6621},
    '{64'h0F21DDB66CAD4A26, 16'hD3AC, 16'h90C1, 64'hDDB6D9E84A265FF4},
    '{64'hF28C105D1FB17C23, 16'h3926, 16'hA170, 64'h105D69F97C23C7DF}};

  function automatic logic [15:0] rot(logic [15:0] v, int n);
    int k;
    k = n % 16;
    if (k == 0) return v;
    return 16'((32'(v) << k) | (32'(v) >> (16 - k)));
  endfunction

  function automatic logic [63:0] ref_round(logic [63:0] xi, logic [15:0] sa, logic [15:0] sc);
    logic [15:0] a, b, c, d, t, u;
    logic [31:0] pb, pd;
    a = xi[63:48]; b = xi[47:32]; c = xi[31:16]; d = xi[15:0];
    pb = 32'(b) * (32'(b) * 2 + 1);
    pd = 32'(d) * (32'(d) * 2 + 1);
    t = rot(pb[15:0], 4);
    u = rot(pd[15:0], 4);
    a = 16'(32'(rot(a ^ t, int'(u & 16'hF))) + 32'(sa));
    c = 16'(32'(rot(c ^ u, int'(t & 16'hF))) + 32'(sc));
    return {b, c, d, a};
  endfunction

  task automatic check(logic [63:0] exp, string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: x=%h sa=%h sc=%h y=%h expected %h", what, x, s_a, s_c, y, exp);
    end
  endtask

  initial begin
    foreach (VECS[i]) begin
      x = VECS[i].x; s_a = VECS[i].sa; s_c = VECS[i].sc;
      #1;
      check(VECS[i].y, "vector");
    end
    for (int i = 0; i < 2000; i++) begin
      x = {$urandom, $urandom}; s_a = 16'($urandom); s_c = 16'($urandom);
      if (i < 16) x[47:32] = 16'(i);   // include small and zero B values
      #1;
      check(ref_round(x, s_a, s_c), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
