// des_pkg: constants and bit-permutation functions shared by the DES
// superpipeline.
//
// The tables are those of the Data Encryption Standard (FIPS 46-3). Each table
// entry is a 1-based bit number counted from the most significant bit, as the
// standard writes them, so that DES bit n of a W-bit vector v is v[W-n]. Every
// function below therefore maps output bit i (counted from the MSB) to input
// bit TAB[i] (counted from the MSB). All functions are pure wiring.
//
// The pipeline depth constants describe the schedule of the core: one input
// register stage (initial permutation / parity drop), a first round of 10
// register stages, fifteen rounds of 7 register stages, and 3 output stages
// (swap, final permutation, output register), 119 stages in all. The stage
// counts and the 119-cycle total follow the document; the tables are the
// standard's, which the document uses but does not print.
package des_pkg;

  typedef logic [63:0] block_t;   // plaintext, key or ciphertext block
  typedef logic [31:0] half_t;    // left or right half of a block
  typedef logic [55:0] cd_t;      // key after parity drop: C (55:28), D (27:0)
  typedef logic [47:0] subkey_t;  // round sub-key / expanded right half

  localparam int unsigned ROUNDS        = 16;
  localparam int unsigned ROUND_STAGES  = 7;   // register stages in rounds 2..16
  localparam int unsigned ROUND1_STAGES = 10;  // register stages in round 1
  localparam int unsigned LATENCY       = 1 + ROUND1_STAGES
                                          + (ROUNDS - 1) * ROUND_STAGES + 3;  // 119

  // Left rotations of C and D in round r (index r-1).
  localparam int unsigned SHIFTS [16] = '{1, 1, 2, 2, 2, 2, 2, 2, 1, 2, 2, 2, 2, 2, 2, 1};

  localparam byte unsigned IP_TAB [64] = '{
    58, 50, 42, 34, 26, 18, 10, 2,  60, 52, 44, 36, 28, 20, 12, 4,
    62, 54, 46, 38, 30, 22, 14, 6,  64, 56, 48, 40, 32, 24, 16, 8,
    57, 49, 41, 33, 25, 17,  9, 1,  59, 51, 43, 35, 27, 19, 11, 3,
    61, 53, 45, 37, 29, 21, 13, 5,  63, 55, 47, 39, 31, 23, 15, 7};

  localparam byte unsigned FP_TAB [64] = '{
    40, 8, 48, 16, 56, 24, 64, 32,  39, 7, 47, 15, 55, 23, 63, 31,
    38, 6, 46, 14, 54, 22, 62, 30,  37, 5, 45, 13, 53, 21, 61, 29,
    36, 4, 44, 12, 52, 20, 60, 28,  35, 3, 43, 11, 51, 19, 59, 27,
    34, 2, 42, 10, 50, 18, 58, 26,  33, 1, 41,  9, 49, 17, 57, 25};

  localparam byte unsigned E_TAB [48] = '{
    32,  1,  2,  3,  4,  5,   4,  5,  6,  7,  8,  9,
     8,  9, 10, 11, 12, 13,  12, 13, 14, 15, 16, 17,
    16, 17, 18, 19, 20, 21,  20, 21, 22, 23, 24, 25,
    24, 25, 26, 27, 28, 29,  28, 29, 30, 31, 32,  1};

  localparam byte unsigned P_TAB [32] = '{
    16,  7, 20, 21, 29, 12, 28, 17,   1, 15, 23, 26,  5, 18, 31, 10,
     2,  8, 24, 14, 32, 27,  3,  9,  19, 13, 30,  6, 22, 11,  4, 25};

  localparam byte unsigned PC1_TAB [56] = '{
    57, 49, 41, 33, 25, 17,  9,   1, 58, 50, 42, 34, 26, 18,
    10,  2, 59, 51, 43, 35, 27,  19, 11,  3, 60, 52, 44, 36,
    63, 55, 47, 39, 31, 23, 15,   7, 62, 54, 46, 38, 30, 22,
    14,  6, 61, 53, 45, 37, 29,  21, 13,  5, 28, 20, 12,  4};

  localparam byte unsigned PC2_TAB [48] = '{
    14, 17, 11, 24,  1,  5,   3, 28, 15,  6, 21, 10,
    23, 19, 12,  4, 26,  8,  16,  7, 27, 20, 13,  2,
    41, 52, 31, 37, 47, 55,  30, 40, 51, 45, 33, 48,
    44, 49, 39, 56, 34, 53,  46, 42, 50, 36, 29, 32};

  // S-boxes S1..S8 (index 0..7), each 4 rows x 16 columns, row-major.
  localparam logic [3:0] SBOX [8][64] = '{
    '{14, 4,13, 1, 2,15,11, 8, 3,10, 6,12, 5, 9, 0, 7,
       0,15, 7, 4,14, 2,13, 1,10, 6,12,11, 9, 5, 3, 8,
       4, 1,14, 8,13, 6, 2,11,15,12, 9, 7, 3,10, 5, 0,
      15,12, 8, 2, 4, 9, 1, 7, 5,11, 3,14,10, 0, 6,13},
    '{15, 1, 8,14, 6,11, 3, 4, 9, 7, 2,13,12, 0, 5,10,
       3,13, 4, 7,15, 2, 8,14,12, 0, 1,10, 6, 9,11, 5,
       0,14, 7,11,10, 4,13, 1, 5, 8,12, 6, 9, 3, 2,15,
      13, 8,10, 1, 3,15, 4, 2,11, 6, 7,12, 0, 5,14, 9},
    '{10, 0, 9,14, 6, 3,15, 5, 1,13,12, 7,11, 4, 2, 8,
      13, 7, 0, 9, 3, 4, 6,10, 2, 8, 5,14,12,11,15, 1,
      13, 6, 4, 9, 8,15, 3, 0,11, 1, 2,12, 5,10,14, 7,
       1,10,13, 0, 6, 9, 8, 7, 4,15,14, 3,11, 5, 2,12},
    '{ 7,13,14, 3, 0, 6, 9,10, 1, 2, 8, 5,11,12, 4,15,
      13, 8,11, 5, 6,15, 0, 3, 4, 7, 2,12, 1,10,14, 9,
      10, 6, 9, 0,12,11, 7,13,15, 1, 3,14, 5, 2, 8, 4,
       3,15, 0, 6,10, 1,13, 8, 9, 4, 5,11,12, 7, 2,14},
    '{ 2,12, 4, 1, 7,10,11, 6, 8, 5, 3,15,13, 0,14, 9,
      14,11, 2,12, 4, 7,13, 1, 5, 0,15,10, 3, 9, 8, 6,
       4, 2, 1,11,10,13, 7, 8,15, 9,12, 5, 6, 3, 0,14,
      11, 8,12, 7, 1,14, 2,13, 6,15, 0, 9,10, 4, 5, 3},
    '{12, 1,10,15, 9, 2, 6, 8, 0,13, 3, 4,14, 7, 5,11,
      10,15, 4, 2, 7,12, 9, 5, 6, 1,13,14, 0,11, 3, 8,
       9,14,15, 5, 2, 8,12, 3, 7, 0, 4,10, 1,13,11, 6,
       4, 3, 2,12, 9, 5,15,10,11,14, 1, 7, 6, 0, 8,13},
    '{ 4,11, 2,14,15, 0, 8,13, 3,12, 9, 7, 5,10, 6, 1,
      13, 0,11, 7, 4, 9, 1,10,14, 3, 5,12, 2,15, 8, 6,
       1, 4,11,13,12, 3, 7,14,10,15, 6, 8, 0, 5, 9, 2,
       6,11,13, 8, 1, 4,10, 7, 9, 5, 0,15,14, 2, 3,12},
    '{13, 2, 8, 4, 6,15,11, 1,10, 9, 3,14, 5, 0,12, 7,
       1,15,13, 8,10, 3, 7, 4,12, 5, 6,11, 0,14, 9, 2,
       7,11, 4, 1, 9,12,14, 2, 0, 6,10,13,15, 3, 5, 8,
       2, 1,14, 7, 4,10, 8,13,15,12, 9, 0, 3, 5, 6,11}};

  function automatic block_t perm_ip(block_t x);
    for (int i = 0; i < 64; i++) perm_ip[63 - i] = x[64 - int'(IP_TAB[i])];
  endfunction

  function automatic block_t perm_fp(block_t x);
    for (int i = 0; i < 64; i++) perm_fp[63 - i] = x[64 - int'(FP_TAB[i])];
  endfunction

  function automatic subkey_t perm_e(half_t x);
    for (int i = 0; i < 48; i++) perm_e[47 - i] = x[32 - int'(E_TAB[i])];
  endfunction

  function automatic half_t perm_p(half_t x);
    for (int i = 0; i < 32; i++) perm_p[31 - i] = x[32 - int'(P_TAB[i])];
  endfunction

  function automatic cd_t perm_pc1(block_t x);
    for (int i = 0; i < 56; i++) perm_pc1[55 - i] = x[64 - int'(PC1_TAB[i])];
  endfunction

  function automatic subkey_t perm_pc2(cd_t x);
    for (int i = 0; i < 48; i++) perm_pc2[47 - i] = x[56 - int'(PC2_TAB[i])];
  endfunction

  // S-box lookup: row = outer bits {b1,b6}, column = inner bits b2..b5.
  function automatic logic [3:0] sbox_lookup(logic [2:0] box, logic [5:0] x);
    return SBOX[box][{x[5], x[0], x[4:1]}];
  endfunction

endpackage
