// rc6c_top: the RC6-Cascade encryption/decryption core.
//
// A 320-bit block (five 64-bit parts at the default word size W = 16; 20*W bits
// in general) is encrypted by a triangle of ten
// two-round Feistel F-functions whose round function is a 16-bit-word RC6 round.
// The core holds:
//   rc6c_key_schedule  expands the 128-bit key into the subkeys S[0..39]
//   rc6c_encrypter     ten F-functions, P1..P5 -> C1..C5
//   rc6c_decrypter     ten inverse F-functions, C1..C5 -> P1..P5
//   rc6c_controller    sequences the three and drives enc_dec
// Both cascades read the one subkey array.
//
// Use: pulse start_key_gen with key valid; key_ready rises 121 clocks later.
// Then pulse start_encryption or start_decryption with text_in (text_in[0] is
// P1 or C1) valid in that cycle; ready rises 22 clocks later and text_out holds
// the result (ciphertext when enc_dec = 1, plaintext when enc_dec = 0) until the
// next operation. Requests made while busy, or before key_ready, are ignored.
// Reset is synchronous and active high.
//
// W selects the RC6 word size (16, 32 or 64): it scales the block to 20*W bits
// and the subkeys to W bits, and changes the magic constants and rotation
// widths; the cascade structure and all latencies stay the same.
//
// The block split, the four control signals, the 320-bit text and 128-bit key
// follow the cipher's description; the shared text ports, the output mux and all
// timing are this design's choices.
module rc6c_top
  import rc6c_pkg::*;
#(
  parameter int unsigned W         = 16,  // RC6 word size: 16, 32 or 64
  parameter int unsigned KEY_BYTES = 16   // key length in bytes
) (
  input  logic                         clock,
  input  logic                         reset,
  input  logic [8*KEY_BYTES-1:0]       key,
  input  logic [NUM_PARTS-1:0][4*W-1:0] text_in,
  input  logic                         start_key_gen,
  input  logic                         start_encryption,
  input  logic                         start_decryption,
  output logic [NUM_PARTS-1:0][4*W-1:0] text_out,
  output logic                         enc_dec,
  output logic                         key_ready,
  output logic                         ready,
  output logic                         busy
);

  typedef logic [4*W-1:0] half_t;

  logic [W-1:0] subkeys [NUM_SUBKEYS];
  logic     ks_start, enc_start, dec_start;
  logic     ks_ready, enc_ready, dec_ready;
  half_t    c_out [NUM_PARTS];
  half_t    p_out [NUM_PARTS];

  rc6c_controller u_ctrl (
    .clock           (clock),
    .reset           (reset),
    .start_key_gen   (start_key_gen),
    .start_encryption(start_encryption),
    .start_decryption(start_decryption),
    .ks_ready        (ks_ready),
    .enc_ready       (enc_ready),
    .dec_ready       (dec_ready),
    .ks_start        (ks_start),
    .enc_start       (enc_start),
    .dec_start       (dec_start),
    .enc_dec         (enc_dec),
    .key_ready       (key_ready),
    .ready           (ready),
    .busy            (busy)
  );

  rc6c_key_schedule #(.W(W), .KEY_BYTES(KEY_BYTES)) u_ks (
    .clock  (clock),
    .reset  (reset),
    .start  (ks_start),
    .key    (key),
    .subkeys(subkeys),
    .ready  (ks_ready)
  );

  rc6c_encrypter #(.W(W)) u_enc (
    .clock  (clock),
    .reset  (reset),
    .start  (enc_start),
    .subkeys(subkeys),
    .p1(text_in[0]), .p2(text_in[1]), .p3(text_in[2]), .p4(text_in[3]), .p5(text_in[4]),
    .c1(c_out[0]),   .c2(c_out[1]),   .c3(c_out[2]),   .c4(c_out[3]),   .c5(c_out[4]),
    .ready  (enc_ready)
  );

  rc6c_decrypter #(.W(W)) u_dec (
    .clock  (clock),
    .reset  (reset),
    .start  (dec_start),
    .subkeys(subkeys),
    .c11(text_in[0]), .c22(text_in[1]), .c33(text_in[2]), .c44(text_in[3]), .c55(text_in[4]),
    .p11(p_out[0]),   .p22(p_out[1]),   .p33(p_out[2]),   .p44(p_out[3]),   .p55(p_out[4]),
    .ready  (dec_ready)
  );

  initial assert (W == 16 || W == 32 || W == 64)
    else $error("rc6c_top: W must be 16, 32 or 64");

  always_comb begin
    for (int k = 0; k < NUM_PARTS; k++)
      text_out[k] = enc_dec ? c_out[k] : p_out[k];
  end

endmodule
