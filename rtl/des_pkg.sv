// des_pkg: constants and pure functions of the DES algorithm (FIPS 46-3),
// shared by the round function, the key generator and the two loop cores.
//
// All permutation tables are written the way the standard prints them: entry
// i names the (1-based, MSB-first) input bit that becomes output bit i. The
// functions ip, fp, pc1, pc2 and f_func apply them, so the tables can be checked
// against the standard line by line. The S-boxes are stored as 64-entry
// arrays indexed by {row, column} = {b1 b6, b2 b3 b4 b5} of the 6-bit input.
//
// The round counts (16 for DES, 48 for Triple-DES) and block/key widths are
// the numbers the cipher library uses; the table contents are the standard's.
package des_pkg;

  localparam int unsigned DES_ROUNDS  = 16;
  localparam int unsigned TDES_ROUNDS = 48;

  typedef logic [63:0] block_t;
  typedef logic [47:0] subkey_t;
  typedef logic [27:0] half_key_t;

  // Algorithm identifiers of the cipher library (also the first byte of a
  // configuration image, see crypto_fpga).
  typedef enum logic [1:0] {
    ALG_NONE = 2'd0,
    ALG_DES  = 2'd1,
    ALG_TDES = 2'd2
  } alg_e;

  localparam byte unsigned IP_T [64] = '{
    58, 50, 42, 34, 26, 18, 10, 2,
    60, 52, 44, 36, 28, 20, 12, 4,
    62, 54, 46, 38, 30, 22, 14, 6,
    64, 56, 48, 40, 32, 24, 16, 8,
    57, 49, 41, 33, 25, 17,  9, 1,
    59, 51, 43, 35, 27, 19, 11, 3,
    61, 53, 45, 37, 29, 21, 13, 5,
    63, 55, 47, 39, 31, 23, 15, 7
  };

  localparam byte unsigned FP_T [64] = '{
    40, 8, 48, 16, 56, 24, 64, 32,
    39, 7, 47, 15, 55, 23, 63, 31,
    38, 6, 46, 14, 54, 22, 62, 30,
    37, 5, 45, 13, 53, 21, 61, 29,
    36, 4, 44, 12, 52, 20, 60, 28,
    35, 3, 43, 11, 51, 19, 59, 27,
    34, 2, 42, 10, 50, 18, 58, 26,
    33, 1, 41,  9, 49, 17, 57, 25
  };

  localparam byte unsigned E_T [48] = '{
    32,  1,  2,  3,  4,  5,
     4,  5,  6,  7,  8,  9,
     8,  9, 10, 11, 12, 13,
    12, 13, 14, 15, 16, 17,
    16, 17, 18, 19, 20, 21,
    20, 21, 22, 23, 24, 25,
    24, 25, 26, 27, 28, 29,
    28, 29, 30, 31, 32,  1
  };

  localparam byte unsigned P_T [32] = '{
    16,  7, 20, 21, 29, 12, 28, 17,
     1, 15, 23, 26,  5, 18, 31, 10,
     2,  8, 24, 14, 32, 27,  3,  9,
    19, 13, 30,  6, 22, 11,  4, 25
  };

  localparam byte unsigned PC1_T [56] = '{
    57, 49, 41, 33, 25, 17,  9,
     1, 58, 50, 42, 34, 26, 18,
    10,  2, 59, 51, 43, 35, 27,
    19, 11,  3, 60, 52, 44, 36,
    63, 55, 47, 39, 31, 23, 15,
     7, 62, 54, 46, 38, 30, 22,
    14,  6, 61, 53, 45, 37, 29,
    21, 13,  5, 28, 20, 12,  4
  };

  localparam byte unsigned PC2_T [48] = '{
    14, 17, 11, 24,  1,  5,
     3, 28, 15,  6, 21, 10,
    23, 19, 12,  4, 26,  8,
    16,  7, 27, 20, 13,  2,
    41, 52, 31, 37, 47, 55,
    30, 40, 51, 45, 33, 48,
    44, 49, 39, 56, 34, 53,
    46, 42, 50, 36, 29, 32
  };

  // Left-rotation amount of C and D before round i (index 0 = round 1).
  localparam byte unsigned SHIFT_T [16] = '{
    1, 1, 2, 2, 2, 2, 2, 2, 1, 2, 2, 2, 2, 2, 2, 1
  };

  localparam logic [3:0] SBOX_T [8][64] = '{
    '{14,  4, 13,  1,  2, 15, 11,  8,  3, 10,  6, 12,  5,  9,  0,  7,
       0, 15,  7,  4, 14,  2, 13,  1, 10,  6, 12, 11,  9,  5,  3,  8,
       4,  1, 14,  8, 13,  6,  2, 11, 15, 12,  9,  7,  3, 10,  5,  0,
      15, 12,  8,  2,  4,  9,  1,  7,  5, 11,  3, 14, 10,  0,  6, 13},
    '{15,  1,  8, 14,  6, 11,  3,  4,  9,  7,  2, 13, 12,  0,  5, 10,
       3, 13,  4,  7, 15,  2,  8, 14, 12,  0,  1, 10,  6,  9, 11,  5,
       0, 14,  7, 11, 10,  4, 13,  1,  5,  8, 12,  6,  9,  3,  2, 15,
      13,  8, 10,  1,  3, 15,  4,  2, 11,  6,  7, 12,  0,  5, 14,  9},
    '{10,  0,  9, 14,  6,  3, 15,  5,  1, 13, 12,  7, 11,  4,  2,  8,
      13,  7,  0,  9,  3,  4,  6, 10,  2,  8,  5, 14, 12, 11, 15,  1,
      13,  6,  4,  9,  8, 15,  3,  0, 11,  1,  2, 12,  5, 10, 14,  7,
       1, 10, 13,  0,  6,  9,  8,  7,  4, 15, 14,  3, 11,  5,  2, 12},
    '{ 7, 13, 14,  3,  0,  6,  9, 10,  1,  2,  8,  5, 11, 12,  4, 15,
      13,  8, 11,  5,  6, 15,  0,  3,  4,  7,  2, 12,  1, 10, 14,  9,
      10,  6,  9,  0, 12, 11,  7, 13, 15,  1,  3, 14,  5,  2,  8,  4,
       3, 15,  0,  6, 10,  1, 13,  8,  9,  4,  5, 11, 12,  7,  2, 14},
    '{ 2, 12,  4,  1,  7, 10, 11,  6,  8,  5,  3, 15, 13,  0, 14,  9,
      14, 11,  2, 12,  4,  7, 13,  1,  5,  0, 15, 10,  3,  9,  8,  6,
       4,  2,  1, 11, 10, 13,  7,  8, 15,  9, 12,  5,  6,  3,  0, 14,
      11,  8, 12,  7,  1, 14,  2, 13,  6, 15,  0,  9, 10,  4,  5,  3},
    '{12,  1, 10, 15,  9,  2,  6,  8,  0, 13,  3,  4, 14,  7,  5, 11,
      10, 15,  4,  2,  7, 12,  9,  5,  6,  1, 13, 14,  0, 11,  3,  8,
       9, 14, 15,  5,  2,  8, 12,  3,  7,  0,  4, 10,  1, 13, 11,  6,
       4,  3,  2, 12,  9,  5, 15, 10, 11, 14,  1,  7,  6,  0,  8, 13},
    '{ 4, 11,  2, 14, 15,  0,  8, 13,  3, 12,  9,  7,  5, 10,  6,  1,
      13,  0, 11,  7,  4,  9,  1, 10, 14,  3,  5, 12,  2, 15,  8,  6,
       1,  4, 11, 13, 12,  3,  7, 14, 10, 15,  6,  8,  0,  5,  9,  2,
       6, 11, 13,  8,  1,  4, 10,  7,  9,  5,  0, 15, 14,  2,  3, 12},
    '{13,  2,  8,  4,  6, 15, 11,  1, 10,  9,  3, 14,  5,  0, 12,  7,
       1, 15, 13,  8, 10,  3,  7,  4, 12,  5,  6, 11,  0, 14,  9,  2,
       7, 11,  4,  1,  9, 12, 14,  2,  0,  6, 10, 13, 15,  3,  5,  8,
       2,  1, 14,  7,  4, 10,  8, 13, 15, 12,  9,  0,  3,  5,  6, 11}
  };

  // Initial permutation of a 64-bit block.
  function automatic block_t ip(input block_t x);
    block_t y;
    for (int i = 0; i < 64; i++) y[63-i] = x[64-int'(IP_T[i])];
    return y;
  endfunction

  // Final permutation (inverse of ip).
  function automatic block_t fp(input block_t x);
    block_t y;
    for (int i = 0; i < 64; i++) y[63-i] = x[64-int'(FP_T[i])];
    return y;
  endfunction

  // Permuted choice 1: 64-bit key (with parity) to the 56-bit {C0, D0}.
  function automatic logic [55:0] pc1(input logic [63:0] k);
    logic [55:0] y;
    for (int i = 0; i < 56; i++) y[55-i] = k[64-int'(PC1_T[i])];
    return y;
  endfunction

  // Permuted choice 2: 56-bit {C, D} to the 48-bit round key.
  function automatic subkey_t pc2(input logic [55:0] cd);
    subkey_t y;
    for (int i = 0; i < 48; i++) y[47-i] = cd[56-int'(PC2_T[i])];
    return y;
  endfunction

  // Rotation of one 28-bit key half by 0, 1 or 2 places.
  function automatic half_key_t rotl28(input half_key_t x, input int unsigned n);
    return (n == 2) ? {x[25:0], x[27:26]} : (n == 1) ? {x[26:0], x[27]} : x;
  endfunction

  function automatic half_key_t rotr28(input half_key_t x, input int unsigned n);
    return (n == 2) ? {x[1:0], x[27:2]} : (n == 1) ? {x[0], x[27:1]} : x;
  endfunction

  // The cipher function f(R, K): expansion, key mixing, S-boxes, permutation.
  function automatic logic [31:0] f_func(input logic [31:0] r, input subkey_t k);
    logic [47:0] e;
    logic [31:0] s;
    logic [31:0] p;
    logic [5:0]  six;
    for (int i = 0; i < 48; i++) e[47-i] = r[32-int'(E_T[i])];
    e = e ^ k;
    for (int b = 0; b < 8; b++) begin
      six = e[47-6*b -: 6];
      s[31-4*b -: 4] = SBOX_T[b][{six[5], six[0], six[4:1]}];
    end
    for (int i = 0; i < 32; i++) p[31-i] = s[32-int'(P_T[i])];
    return p;
  endfunction

endpackage
