// rc6c_pkg: constants and helper functions shared by the RC6-Cascade modules.
//
// RC6-Cascade is a block cipher built from ten cascaded F-functions. Each
// F-function is a two-round Feistel network whose round function is one RC6
// round on four w-bit words, so a Feistel half is 4w bits and the block is five
// halves (20w bits: 320 bits at the default w = 16). Four w-bit subkeys feed
// each F-function, 40 in all.
//
// The cascade is a triangle of F cells indexed by column c (1..4) and row
// r (c..4); cell_idx() numbers them column by column, F1..F10, and that number
// selects the subkeys S[4n..4n+3] of the cell.
//
// The word size w is a parameter (W) of every module; RC6 defines its magic
// constants for w = 16, 32 and 64, which are the supported values.
package rc6c_pkg;

  localparam int unsigned NUM_PARTS   = 5;          // P1..P5 / C1..C5
  localparam int unsigned NUM_F       = 10;         // F-functions in the cascade
  localparam int unsigned NUM_SUBKEYS = 4 * NUM_F;  // S[0..39]

  // RC6 magic constants Pw = Odd((e-2)*2^w) and Qw = Odd((phi-1)*2^w), returned
  // in the low w bits.
  function automatic logic [63:0] magic_p(int unsigned w);
    case (w)
      16:      return 64'hB7E1;
      32:      return 64'hB7E15163;
      default: return 64'hB7E151628AED2A6B;
    endcase
  endfunction

  function automatic logic [63:0] magic_q(int unsigned w);
    case (w)
      16:      return 64'h9E37;
      32:      return 64'h9E3779B9;
      default: return 64'h9E3779B97F4A7C15;
    endcase
  endfunction

  // Number of an F cell (0..9) from its column c and row r (1-based, r >= c).
  function automatic int unsigned cell_idx(int unsigned c, int unsigned r);
    int unsigned base;
    base = 0;
    for (int unsigned k = 1; k < c; k++) base += (NUM_PARTS - k);
    return base + (r - c);
  endfunction

endpackage
