// rc6c_tb_vec_pkg: reference values for the RC6-Cascade testbenches.
//
// They were computed with a separate software model of the cipher (RC6 key
// schedule at w = 16 and t = 40, 16-bit-word RC6 round without whitening,
// two-round Feistel F-function, triangular cascade), not with this RTL.
// KEY_B is the 128-bit key 0123456789ABCDEF0011223344556677; key byte k is
// key[8k+7:8k]. P_SEQ is the counting plaintext 0001 0002 ... 0014 (16-bit
// words) used as the example block; P_RND is an arbitrary second block.
package rc6c_tb_vec_pkg;

  typedef logic [15:0] word_t;
  typedef logic [63:0] half_t;

  localparam logic [127:0] KEY_A = 128'h0;
  localparam logic [127:0] KEY_B = 128'h0123456789ABCDEF0011223344556677;

  localparam word_t S_KEY_A [40] = '{
    16'h290D, 16'h5F62, 16'hDFE3, 16'h73C4, 16'h328C, 16'h1C76, 16'h6989, 16'h32DF,
    16'h04B1, 16'hD915, 16'h1523, 16'h1774, 16'h4037, 16'h5B2E, 16'hADBA, 16'h49CF,
    16'hD0FB, 16'hD16C, 16'h40FD, 16'h016B, 16'h879C, 16'hA57A, 16'h1850, 16'hA0BE,
    16'hE817, 16'hBFDB, 16'hDC49, 16'h9C04, 16'h029A, 16'hF8F5, 16'h12E6, 16'hD1A1,
    16'h7239, 16'h2C7E, 16'hD8C4, 16'h46FA, 16'hC1D5, 16'h7CC7, 16'h8709, 16'hA143};

  localparam word_t S_KEY_B [40] = '{
    16'h6B22, 16'h9A97, 16'hE1A9, 16'h9561, 16'h40D8, 16'hAF76, 16'hD56E, 16'h9FC5,
    16'h491C, 16'hB60F, 16'hF0AB, 16'h1D20, 16'hFF44, 16'h4A39, 16'h37CA, 16'hB454,
    16'hFDB7, 16'h2B9F, 16'h82D8, 16'hECB3, 16'h21F9, 16'h8F3B, 16'hCB03, 16'h3E12,
    16'h18CB, 16'h7B7C, 16'h09FA, 16'h03E3, 16'hCD10, 16'hCB24, 16'h2590, 16'hF252,
    16'h0675, 16'hEF72, 16'h5684, 16'h010B, 16'h3D37, 16'h36AD, 16'hB13A, 16'h665A};

  localparam half_t P_SEQ [5] = '{
    64'h0001000200030004, 64'h0005000600070008, 64'h0009000A000B000C,
    64'h000D000E000F0010, 64'h0011001200130014};

  localparam half_t C_SEQ_KEY_A [5] = '{
    64'hB1D3EA3D830D37DF, 64'h6707F3B61DA13515, 64'h98D36E344DA7F8ED,
    64'hC1D1DC34165769CE, 64'h29119E77CEA97FCC};

  localparam half_t C_SEQ_KEY_B [5] = '{
    64'h46874970DA9ADB74, 64'h43852BE9944421F6, 64'hAF69F22B832AEC3F,
    64'h9648E026FF49603E, 64'hE9FF96E359B33155};

  localparam half_t P_RND [5] = '{
    64'h5C90A9587403E430, 64'h3F98E2774CBD87AD, 64'h2E05319ACB5C7427,
    64'hC7A2EA20B2F14C94, 64'h14F4733F3E7D1BFB};

  localparam half_t C_RND_KEY_B [5] = '{
    64'hE3236669026E5BF0, 64'h3A729894C60B155C, 64'hCB024848E28DF0E9,
    64'h8F74C91C4B839F0D, 64'h46179A50AAF88305};

endpackage
