// rc6c_round: one RC6 round on four W-bit words, the round function of every
// F-function.
//
// The 4W-bit input is the RC6 state A|B|C|D (A in the top word). As in RC6, with
// lg w = log2(W):
//   t = (B*(2B+1)) <<< lg w,  u = (D*(2D+1)) <<< lg w
//   A = ((A ^ t) <<< u) + s_a,  C = ((C ^ u) <<< t) + s_c
//   (A,B,C,D) = (B,C,D,A)
// with all arithmetic modulo 2^W and data-dependent rotations by the low lg w
// bits. The F-function uses only this middle part of the RC6 round structure,
// without the pre- and post-whitening additions, so none are done here. B and D
// leave the round unchanged (as C and A of the output), which is RC6's own
// structure. The word order in the vector and XOR for the circled-plus nodes
// are this design's choices.
//
// Purely combinational: two WxW multipliers, four rotators, two adders.
module rc6c_round #(
  parameter int unsigned W = 16   // word size: 16, 32 or 64
) (
  input  logic [4*W-1:0] x,
  input  logic [W-1:0]   s_a,
  input  logic [W-1:0]   s_c,
  output logic [4*W-1:0] y
);

  localparam int unsigned LGW = $clog2(W);

  typedef logic [W-1:0] word_t;

  function automatic word_t rotl(word_t v, logic [LGW-1:0] amt);
    return (v << amt) | (v >> (W - int'(amt)));
  endfunction

  word_t a, b, c, d;
  word_t t, u;
  word_t a_new, c_new;

  assign {a, b, c, d} = x;

  always_comb begin
    t     = rotl(word_t'(b * ((b << 1) + word_t'(1))), LGW'(LGW));
    u     = rotl(word_t'(d * ((d << 1) + word_t'(1))), LGW'(LGW));
    a_new = rotl(a ^ t, u[LGW-1:0]) + s_a;
    c_new = rotl(c ^ u, t[LGW-1:0]) + s_c;
  end

  assign y = {b, c_new, d, a_new};

endmodule
