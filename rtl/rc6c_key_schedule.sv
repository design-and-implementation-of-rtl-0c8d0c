// rc6c_key_schedule: RC6 key expansion for word size W (16 by default),
// producing the 40 subkeys S[0..39] shared by the encrypter and the decrypter
// (4 per F-function).
//
// The algorithm is the RC6 key schedule with t = 40 words:
//   L[0..c-1] = key as W-bit words, c = max(1, ceil(KEY_BYTES/(W/8)))
//   S[i] = Pw + i*Qw
//   A = B = i = j = 0; repeat 3*max(c, t) times:
//     A = S[i] = (S[i] + A + B) <<< 3
//     B = L[j] = (L[j] + A + B) <<< (A + B)
//     i = (i+1) mod t, j = (j+1) mod c
// Key byte k is key[8k+7:8k], so L[j] = key[W*j+W-1:W*j] (RC6 loads key bytes
// little-endian into words).
//
// Timing: start loads S with the P/Q progression and L with the key; then one
// mixing step runs per clock, 3*max(c,t) = 120 steps for the 128-bit key, and
// ready rises 121 clocks after start. ready stays high until the next start; S is
// held in registers and read in parallel by both cascades.
//
// The subkey count, the 16-bit default word and the 128-bit key follow the cipher's
// description; the description only says the schedule is RC6's with some
// modifications without naming them, so the plain RC6 schedule at t = 40 is used.
// The one-step-per-clock sequencing and the key byte order are this design's
// choices.
module rc6c_key_schedule
  import rc6c_pkg::NUM_SUBKEYS, rc6c_pkg::magic_p, rc6c_pkg::magic_q;
#(
  parameter int unsigned W         = 16,  // RC6 word size: 16, 32 or 64
  parameter int unsigned KEY_BYTES = 16   // key length b in bytes, at least 1
) (
  input  logic                   clock,
  input  logic                   reset,   // synchronous, active high
  input  logic                   start,   // one-cycle pulse: begin key generation
  input  logic [8*KEY_BYTES-1:0] key,
  output logic [W-1:0]           subkeys [NUM_SUBKEYS],
  output logic                   ready
);

  typedef logic [W-1:0] word_t;

  localparam int unsigned LGW   = $clog2(W);
  localparam int unsigned U     = W / 8;   // bytes per word
  localparam int unsigned C     = (KEY_BYTES + U - 1) / U > 0 ? (KEY_BYTES + U - 1) / U : 1;
  localparam word_t       PW    = word_t'(magic_p(W));
  localparam word_t       QW    = word_t'(magic_q(W));
  localparam int unsigned STEPS = 3 * (C > NUM_SUBKEYS ? C : NUM_SUBKEYS);
  localparam int unsigned IW    = $clog2(NUM_SUBKEYS);
  localparam int unsigned JW    = C > 1 ? $clog2(C) : 1;
  localparam int unsigned NW    = $clog2(STEPS + 1);

  // Key padded to a whole number of words.
  localparam int unsigned KEY_PAD = W * C;

  word_t           s [NUM_SUBKEYS];
  word_t           l [C];
  word_t           a_reg, b_reg;
  logic [IW-1:0]   i_idx;
  logic [JW-1:0]   j_idx;
  logic [NW-1:0]   steps_left;
  logic            busy;
  logic [KEY_PAD-1:0] key_pad;

  function automatic word_t rotl(word_t v, logic [LGW-1:0] amt);
    return (v << amt) | (v >> (W - int'(amt)));
  endfunction

  word_t a_next, b_next, ab_sum;

  assign key_pad = KEY_PAD'(key);

  always_comb begin
    a_next = rotl(s[i_idx] + a_reg + b_reg, LGW'(3));
    ab_sum = a_next + b_reg;
    b_next = rotl(l[j_idx] + ab_sum, ab_sum[LGW-1:0]);
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      busy       <= 1'b0;
      ready      <= 1'b0;
      a_reg      <= '0;
      b_reg      <= '0;
      i_idx      <= '0;
      j_idx      <= '0;
      steps_left <= '0;
      for (int k = 0; k < NUM_SUBKEYS; k++) s[k] <= '0;
      for (int k = 0; k < C; k++)           l[k] <= '0;
    end else if (start) begin
      busy       <= 1'b1;
      ready      <= 1'b0;
      a_reg      <= '0;
      b_reg      <= '0;
      i_idx      <= '0;
      j_idx      <= '0;
      steps_left <= NW'(STEPS);
      for (int k = 0; k < NUM_SUBKEYS; k++) s[k] <= PW + word_t'(k) * QW;
      for (int k = 0; k < C; k++)           l[k] <= key_pad[W*k +: W];
    end else if (busy) begin
      s[i_idx]   <= a_next;
      l[j_idx]   <= b_next;
      a_reg      <= a_next;
      b_reg      <= b_next;
      i_idx      <= (i_idx == IW'(NUM_SUBKEYS - 1)) ? '0 : i_idx + 1'b1;
      j_idx      <= (j_idx == JW'(C - 1)) ? '0 : j_idx + 1'b1;
      steps_left <= steps_left - 1'b1;
      if (steps_left == NW'(1)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
    end
  end

  assign subkeys = s;

endmodule
