// rc6c_encrypter: the 320-bit RC6-Cascade encrypter, a triangle of ten F-functions.
//
// The plaintext is five 64-bit parts P1..P5. Cells sit in columns c = 1..4 and
// rows r = c..4; each takes In1 from above and In2 from the left, and passes Out1
// down and Out2 right:
//   column 1:  In1 = P1 (row 1) or Out1 of the cell above;  In2 = P(r+1)
//   column c>1: In1 = Out2 of cell (c-1, r-1) on the diagonal, else Out1 of the
//               cell above;  In2 = Out2 of cell (c-1, r)
//   Cc = Out1 of cell (c, 4), C5 = Out2 of cell (4, 4)
// Cells are numbered F1..F10 column by column; cell Fn+1 uses S[4n..4n+3].
//
// Each cell is an iterative rc6c_ffunc with start/ready. A cell is started as
// soon as both cells feeding it have finished, so cells on the same
// anti-diagonal run in parallel and the seven levels of the triangle take three
// clocks each: start latches P1..P5, and ready (a level, held until the next
// start) rises 1 + 3*7 = 22 clocks after start. p1..p5 need only be valid in the
// start cycle; subkeys must stay stable while the cascade runs.
//
// The triangle and its connections follow the cipher's structure drawing; the
// cell numbering (the drawing's labels repeat one number), the start-when-inputs-
// ready sequencing and the latency are this design's choices.
module rc6c_encrypter
  import rc6c_pkg::*;
#(
  parameter int unsigned W = 16   // RC6 word size; each part is 4*W bits
) (
  input  logic     clock,
  input  logic     reset,    // synchronous, active high
  input  logic     start,    // one-cycle pulse: latch p1..p5 and run
  input  logic [W-1:0] subkeys [NUM_SUBKEYS],  // S[0..39]
  input  logic [4*W-1:0] p1, p2, p3, p4, p5,
  output logic [4*W-1:0] c1, c2, c3, c4, c5,
  output logic     ready
);

  typedef logic [4*W-1:0] half_t;

  half_t             p_q [NUM_PARTS];
  logic              running;
  logic [NUM_F-1:0]  launched, f_ready, done, go;
  half_t             in1 [NUM_F];
  half_t             in2 [NUM_F];
  half_t             out1 [NUM_F];
  half_t             out2 [NUM_F];
  logic [NUM_F-1:0]  in1_ok, in2_ok;

  assign done = launched & f_ready;

  for (genvar c = 1; c <= 4; c++) begin : g_col
    for (genvar r = c; r <= 4; r++) begin : g_row
      localparam int unsigned N = cell_idx(c, r);

      if (c == 1 && r == 1) begin : g_in1_p
        assign in1[N]    = p_q[0];
        assign in1_ok[N] = 1'b1;
      end else if (r == c) begin : g_in1_diag
        assign in1[N]    = out2[cell_idx(c - 1, r - 1)];
        assign in1_ok[N] = done[cell_idx(c - 1, r - 1)];
      end else begin : g_in1_up
        assign in1[N]    = out1[cell_idx(c, r - 1)];
        assign in1_ok[N] = done[cell_idx(c, r - 1)];
      end

      if (c == 1) begin : g_in2_p
        assign in2[N]    = p_q[r];
        assign in2_ok[N] = 1'b1;
      end else begin : g_in2_left
        assign in2[N]    = out2[cell_idx(c - 1, r)];
        assign in2_ok[N] = done[cell_idx(c - 1, r)];
      end

      assign go[N] = running & in1_ok[N] & in2_ok[N] & ~launched[N];

      rc6c_ffunc #(.W(W), .INVERSE(1'b0)) u_f (
        .clock(clock),
        .reset(reset),
        .start(go[N]),
        .sk   ('{subkeys[4*N], subkeys[4*N+1], subkeys[4*N+2], subkeys[4*N+3]}),
        .in1  (in1[N]),
        .in2  (in2[N]),
        .out1 (out1[N]),
        .out2 (out2[N]),
        .ready(f_ready[N])
      );
    end
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      running  <= 1'b0;
      launched <= '0;
      for (int k = 0; k < NUM_PARTS; k++) p_q[k] <= '0;
    end else if (start) begin
      running  <= 1'b1;
      launched <= '0;
      p_q      <= '{p1, p2, p3, p4, p5};
    end else begin
      launched <= launched | go;
      if (&done) running <= 1'b0;
    end
  end

  assign c1    = out1[cell_idx(1, 4)];
  assign c2    = out1[cell_idx(2, 4)];
  assign c3    = out1[cell_idx(3, 4)];
  assign c4    = out1[cell_idx(4, 4)];
  assign c5    = out2[cell_idx(4, 4)];
  assign ready = &done;

endmodule
