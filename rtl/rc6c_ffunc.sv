// rc6c_ffunc: one F-function of the cascade, built as a compact iterative unit.
//
// The F-function is a two-round Feistel network on two 4W-bit halves (64 bits at
// the default W = 16). With
// L = in1, R = in2 and G(x, s0, s1) one RC6 round (rc6c_round):
//   X = L ^ G(R, S[4n],   S[4n+1])        first round, then the halves swap
//   Y = R ^ G(X, S[4n+2], S[4n+3])        second round
//   out1 = Y, out2 = X
// The two rounds share one rc6c_round instance: the unit spends one cycle
// loading the halves and one cycle per round, so ready rises three clocks after
// start and stays high, with out1/out2 held, until the next start.
//
// INVERSE = 1 gives the decrypting F-function. Because the network is Feistel, the
// same datapath inverts it when the two subkey pairs are used in the opposite
// order: given in1 = Y and in2 = X it returns out1 = L and out2 = R.
//
// The two-round Feistel structure, the 16-bit default word size and the
// start/ready pins follow the cipher's description; the mapping of In1/In2/Out1/Out2 onto the
// left and right halves, the load cycle and the ready protocol are this design's
// choices. A start while a computation is running restarts it.
module rc6c_ffunc #(
  parameter int unsigned W       = 16,    // RC6 word size; a half is 4*W bits
  parameter bit          INVERSE = 1'b0   // 1: decrypting F-function
) (
  input  logic           clock,
  input  logic           reset,   // synchronous, active high
  input  logic           start,   // one-cycle pulse: load in1/in2
  input  logic [W-1:0]   sk [4],  // S[4n..4n+3] of this cell
  input  logic [4*W-1:0] in1,
  input  logic [4*W-1:0] in2,
  output logic [4*W-1:0] out1,
  output logic [4*W-1:0] out2,
  output logic           ready
);

  typedef logic [W-1:0]   word_t;
  typedef logic [4*W-1:0] half_t;

  typedef enum logic [1:0] {IDLE, ROUND1, ROUND2} state_e;

  state_e state;
  half_t  a, b;          // a: half updated in round 1, b: half updated in round 2
  half_t  g_in, g_out;
  word_t  k_a, k_c;

  // Round 1 uses the first subkey pair when encrypting, the second when decrypting.
  always_comb begin
    if ((state == ROUND1) ^ INVERSE) begin
      k_a = sk[0];
      k_c = sk[1];
    end else begin
      k_a = sk[2];
      k_c = sk[3];
    end
    g_in = (state == ROUND1) ? b : a;
  end

  rc6c_round #(.W(W)) u_round (
    .x  (g_in),
    .s_a(k_a),
    .s_c(k_c),
    .y  (g_out)
  );

  always_ff @(posedge clock) begin
    if (reset) begin
      state <= IDLE;
      a     <= '0;
      b     <= '0;
      ready <= 1'b0;
    end else if (start) begin
      state <= ROUND1;
      a     <= in1;
      b     <= in2;
      ready <= 1'b0;
    end else begin
      unique case (state)
        ROUND1: begin
          a     <= a ^ g_out;
          state <= ROUND2;
        end
        ROUND2: begin
          b     <= b ^ g_out;
          state <= IDLE;
          ready <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign out1 = b;
  assign out2 = a;

endmodule
