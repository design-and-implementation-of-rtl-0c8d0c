// rc6c_controller: sequences key generation, encryption and decryption.
//
// The core is driven by three requests, START KEY GENERATION, START ENCRYPTION
// and START DECRYPTION, and reports ENCRYPTION/DECRYPTION (enc_dec), the mode of
// the result on the text output. The controller is a four-state FSM:
//   IDLE    accepts one request; key generation wins over encryption, which wins
//           over decryption. Encryption and decryption are accepted only once
//           the subkeys are valid (key_ready).
//   KEYGEN  waits for the key schedule's ready, then sets key_ready.
//   ENC/DEC waits for the cascade's ready, then sets ready.
// Engine start pulses (ks_start, enc_start, dec_start) are combinational, issued
// in the cycle a request is accepted. Requests that arrive while an operation
// runs, or an encryption/decryption before the subkeys exist, are ignored.
// key_ready drops when a new key generation starts; ready drops when a new
// encryption or decryption starts.
//
// The four control signals follow the cipher's I/O description; the states,
// priorities and ignore rules are this design's choices.
module rc6c_controller (
  input  logic clock,
  input  logic reset,            // synchronous, active high
  input  logic start_key_gen,
  input  logic start_encryption,
  input  logic start_decryption,
  input  logic ks_ready,         // key schedule done (level)
  input  logic enc_ready,        // encrypter done (level)
  input  logic dec_ready,        // decrypter done (level)
  output logic ks_start,
  output logic enc_start,
  output logic dec_start,
  output logic enc_dec,          // 1: last operation was an encryption
  output logic key_ready,
  output logic ready,
  output logic busy
);

  typedef enum logic [1:0] {IDLE, KEYGEN, ENC, DEC} state_e;

  state_e state;

  always_comb begin
    ks_start  = (state == IDLE) && start_key_gen;
    enc_start = (state == IDLE) && !start_key_gen && start_encryption && key_ready;
    dec_start = (state == IDLE) && !start_key_gen && !start_encryption &&
                start_decryption && key_ready;
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      state     <= IDLE;
      enc_dec   <= 1'b1;
      key_ready <= 1'b0;
      ready     <= 1'b0;
    end else begin
      unique case (state)
        IDLE: begin
          if (ks_start) begin
            state     <= KEYGEN;
            key_ready <= 1'b0;
          end else if (enc_start) begin
            state   <= ENC;
            enc_dec <= 1'b1;
            ready   <= 1'b0;
          end else if (dec_start) begin
            state   <= DEC;
            enc_dec <= 1'b0;
            ready   <= 1'b0;
          end
        end
        KEYGEN: if (ks_ready) begin
          state     <= IDLE;
          key_ready <= 1'b1;
        end
        ENC: if (enc_ready) begin
          state <= IDLE;
          ready <= 1'b1;
        end
        DEC: if (dec_ready) begin
          state <= IDLE;
          ready <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // At most one engine is started at a time, and only from IDLE.
  a_one_start: assert property (@(posedge clock) disable iff (reset)
    $onehot0({ks_start, enc_start, dec_start}));
  a_idle_start: assert property (@(posedge clock) disable iff (reset)
    (ks_start || enc_start || dec_start) |-> (state == IDLE));

endmodule
