// rc6c_decrypter: the 320-bit RC6-Cascade decrypter, the encrypter's triangle
// run backwards with inverse F-functions.
//
// Cell (c, r) here undoes encrypter cell (c, r): it is an rc6c_ffunc with
// INVERSE = 1 that takes that cell's outputs (Out1, Out2) and returns its inputs
// (In1, In2), using the same subkeys S[4n..4n+3]. Its inputs therefore come from
// the cells that consumed the forward outputs:
//   Out1 = Cc for row 4, else the recovered In1 of cell (c, r+1)
//   Out2 = C5 for cell (4,4); for a diagonal cell the recovered In1 of cell
//          (c+1, r+1), else the recovered In2 of cell (c+1, r)
//   P1 = recovered In1 of cell (1,1), P(r+1) = recovered In2 of cell (1, r)
// F10 runs first and the first column last.
//
// Sequencing and timing are those of rc6c_encrypter: start latches c11..c55,
// each cell starts once the cells feeding it are done, and ready (held until the
// next start) rises 22 clocks after start. Port names follow the decrypter's
// symbol: ciphertext c11..c55 in, plaintext p11..p55 out.
//
// The decrypter's existence, ports and its reuse of the encrypter's subkey array
// follow the cipher's description; its internal structure is derived here from
// the encrypter because the description does not draw it.
module rc6c_decrypter
  import rc6c_pkg::*;
#(
  parameter int unsigned W = 16   // RC6 word size; each part is 4*W bits
) (
  input  logic     clock,
  input  logic     reset,    // synchronous, active high
  input  logic     start,    // one-cycle pulse: latch c11..c55 and run
  input  logic [W-1:0] subkeys [NUM_SUBKEYS],  // S[0..39]
  input  logic [4*W-1:0] c11, c22, c33, c44, c55,
  output logic [4*W-1:0] p11, p22, p33, p44, p55,
  output logic     ready
);

  typedef logic [4*W-1:0] half_t;

  half_t             c_q [NUM_PARTS];
  logic              running;
  logic [NUM_F-1:0]  launched, f_ready, done, go;
  half_t             o1 [NUM_F];    // forward Out1 of the cell, input here
  half_t             o2 [NUM_F];    // forward Out2 of the cell, input here
  half_t             rin1 [NUM_F];  // recovered forward In1
  half_t             rin2 [NUM_F];  // recovered forward In2
  logic [NUM_F-1:0]  o1_ok, o2_ok;

  assign done = launched & f_ready;

  for (genvar c = 1; c <= 4; c++) begin : g_col
    for (genvar r = c; r <= 4; r++) begin : g_row
      localparam int unsigned N = cell_idx(c, r);

      if (r == 4) begin : g_o1_c
        assign o1[N]    = c_q[c-1];
        assign o1_ok[N] = 1'b1;
      end else begin : g_o1_below
        assign o1[N]    = rin1[cell_idx(c, r + 1)];
        assign o1_ok[N] = done[cell_idx(c, r + 1)];
      end

      if (c == 4) begin : g_o2_c
        assign o2[N]    = c_q[4];
        assign o2_ok[N] = 1'b1;
      end else if (r == c) begin : g_o2_diag
        assign o2[N]    = rin1[cell_idx(c + 1, r + 1)];
        assign o2_ok[N] = done[cell_idx(c + 1, r + 1)];
      end else begin : g_o2_right
        assign o2[N]    = rin2[cell_idx(c + 1, r)];
        assign o2_ok[N] = done[cell_idx(c + 1, r)];
      end

      assign go[N] = running & o1_ok[N] & o2_ok[N] & ~launched[N];

      rc6c_ffunc #(.W(W), .INVERSE(1'b1)) u_f (
        .clock(clock),
        .reset(reset),
        .start(go[N]),
        .sk   ('{subkeys[4*N], subkeys[4*N+1], subkeys[4*N+2], subkeys[4*N+3]}),
        .in1  (o1[N]),
        .in2  (o2[N]),
        .out1 (rin1[N]),
        .out2 (rin2[N]),
        .ready(f_ready[N])
      );
    end
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      running  <= 1'b0;
      launched <= '0;
      for (int k = 0; k < NUM_PARTS; k++) c_q[k] <= '0;
    end else if (start) begin
      running  <= 1'b1;
      launched <= '0;
      c_q      <= '{c11, c22, c33, c44, c55};
    end else begin
      launched <= launched | go;
      if (&done) running <= 1'b0;
    end
  end

  assign p11   = rin1[cell_idx(1, 1)];
  assign p22   = rin2[cell_idx(1, 1)];
  assign p33   = rin2[cell_idx(1, 2)];
  assign p44   = rin2[cell_idx(1, 3)];
  assign p55   = rin2[cell_idx(1, 4)];
  assign ready = &done;

endmodule
