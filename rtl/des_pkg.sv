// des_pkg: types, constants and permutation functions shared by the DES
// datapath and the key generation unit.
//
// Bit numbering follows the DES standard: DES bit 1 is the most significant
// bit of every vector, so a 64-bit block is logic [63:0] with DES bit n at
// index 64-n and a hex value reads the same as in the standard. The tables
// below are the standard DES tables (FIPS 46-3): IP and its inverse, the
// expansion E, the permutation P, the key permutations PC-1 and PC-2, the
// left-shift schedule and the eight S-boxes, each S-box stored row-major
// (entry = row*16 + column). A table entry t at output position i means
// output bit i (1-based, from the MSB) is input bit t.
//
// The key-source encoding of the select input s (00 direct, 01 LFSR,
// 10 chaotic, 11 two's complement) is the one used by the enhanced key
// generation unit.
package des_pkg;

  typedef logic [63:0] block_t;   // 64-bit data block or 64-bit key
  typedef logic [47:0] subkey_t;  // 48-bit round key
  typedef logic [27:0] half_key_t; // C or D half of the key schedule

  typedef enum logic [1:0] {
    KEY_DIRECT = 2'b00,
    KEY_LFSR   = 2'b01,
    KEY_CHAOS  = 2'b10,
    KEY_TWOS   = 2'b11
  } key_src_e;

  localparam int unsigned NUM_ROUNDS = 16;

  localparam int unsigned IP_TBL [64] = '{
    58, 50, 42, 34, 26, 18, 10,  2,
    60, 52, 44, 36, 28, 20, 12,  4,
    62, 54, 46, 38, 30, 22, 14,  6,
    64, 56, 48, 40, 32, 24, 16,  8,
    57, 49, 41, 33, 25, 17,  9,  1,
    59, 51, 43, 35, 27, 19, 11,  3,
    61, 53, 45, 37, 29, 21, 13,  5,
    63, 55, 47, 39, 31, 23, 15,  7
  };

  localparam int unsigned FP_TBL [64] = '{
    40,  8, 48, 16, 56, 24, 64, 32,
    39,  7, 47, 15, 55, 23, 63, 31,
    38,  6, 46, 14, 54, 22, 62, 30,
    37,  5, 45, 13, 53, 21, 61, 29,
    36,  4, 44, 12, 52, 20, 60, 28,
    35,  3, 43, 11, 51, 19, 59, 27,
    34,  2, 42, 10, 50, 18, 58, 26,
    33,  1, 41,  9, 49, 17, 57, 25
  };

  localparam int unsigned E_TBL [48] = '{
    32,  1,  2,  3,  4,  5,
     4,  5,  6,  7,  8,  9,
     8,  9, 10, 11, 12, 13,
    12, 13, 14, 15, 16, 17,
    16, 17, 18, 19, 20, 21,
    20, 21, 22, 23, 24, 25,
    24, 25, 26, 27, 28, 29,
    28, 29, 30, 31, 32,  1
  };

  localparam int unsigned P_TBL [32] = '{
    16,  7, 20, 21, 29, 12, 28, 17,
     1, 15, 23, 26,  5, 18, 31, 10,
     2,  8, 24, 14, 32, 27,  3,  9,
    19, 13, 30,  6, 22, 11,  4, 25
  };

  localparam int unsigned PC1_TBL [56] = '{
    57, 49, 41, 33, 25, 17,  9,
     1, 58, 50, 42, 34, 26, 18,
    10,  2, 59, 51, 43, 35, 27,
    19, 11,  3, 60, 52, 44, 36,
    63, 55, 47, 39, 31, 23, 15,
     7, 62, 54, 46, 38, 30, 22,
    14,  6, 61, 53, 45, 37, 29,
    21, 13,  5, 28, 20, 12,  4
  };

  localparam int unsigned PC2_TBL [48] = '{
    14, 17, 11, 24,  1,  5,
     3, 28, 15,  6, 21, 10,
    23, 19, 12,  4, 26,  8,
    16,  7, 27, 20, 13,  2,
    41, 52, 31, 37, 47, 55,
    30, 40, 51, 45, 33, 48,
    44, 49, 39, 56, 34, 53,
    46, 42, 50, 36, 29, 32
  };

  localparam int unsigned SHIFT_TBL [16] = '{
     1,  1,  2,  2,  2,  2,  2,  2,  1,  2,  2,  2,  2,  2,  2,  1
  };

  localparam logic [3:0] SBOX_TBL [8][64] = '{
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

  // Output bit i (counted from the MSB, 1-based) takes input bit tbl[i-1].
  function automatic block_t ip(input block_t x);
    for (int i = 0; i < 64; i++) ip[63-i] = x[64-IP_TBL[i]];
  endfunction

  function automatic block_t ip_inv(input block_t x);
    for (int i = 0; i < 64; i++) ip_inv[63-i] = x[64-FP_TBL[i]];
  endfunction

  function automatic logic [47:0] expand(input logic [31:0] r);
    for (int i = 0; i < 48; i++) expand[47-i] = r[32-E_TBL[i]];
  endfunction

  function automatic logic [31:0] pbox(input logic [31:0] x);
    for (int i = 0; i < 32; i++) pbox[31-i] = x[32-P_TBL[i]];
  endfunction

  function automatic logic [55:0] pc1(input block_t k);
    for (int i = 0; i < 56; i++) pc1[55-i] = k[64-PC1_TBL[i]];
  endfunction

  function automatic subkey_t pc2(input logic [55:0] cd);
    for (int i = 0; i < 48; i++) pc2[47-i] = cd[56-PC2_TBL[i]];
  endfunction

  // Rotations of a 28-bit key half by 1 or 2 places.
  function automatic half_key_t rotl(input half_key_t v, input int unsigned n);
    rotl = (n == 2) ? {v[25:0], v[27:26]} : {v[26:0], v[27]};
  endfunction

  function automatic half_key_t rotr(input half_key_t v, input int unsigned n);
    rotr = (n == 2) ? {v[1:0], v[27:2]} : {v[0], v[27:1]};
  endfunction

endpackage
