// des_pkg: types, constants and bit tables shared by the pipelined DES design.
//
// The permutation tables (IP, IP^-1, E, P, PC-1, PC-2), the key-schedule rotation
// amounts and the eight S-boxes are those of the Data Encryption Standard (FIPS 46).
// Tables are written exactly as the standard prints them: bit 1 is the most
// significant bit, and entry j of a table names the input bit that becomes output
// bit j+1. The helper functions below turn that 1-based MSB-first numbering into
// SystemVerilog [N-1:0] vectors, so bit n of the standard is vector index N-n.
//
// The package also holds the state word that travels along the pipeline and the
// register map of the 16-bit ISA I/O window, which is this design's own choice.
package des_pkg;

  localparam int unsigned ROUNDS = 16;   // DES rounds per block

  typedef logic [63:0] block_t;          // plaintext, ciphertext or key
  typedef logic [47:0] subkey_t;         // one round key

  // Left and right halves between rounds (L is the more significant half).
  typedef struct packed {
    logic [31:0] l;
    logic [31:0] r;
  } des_state_t;

  // Word held by one pipeline segment register: the halves plus the number of the
  // round this block performs next (0..15; 16 means all rounds are done).
  typedef struct packed {
    logic       valid;
    logic [4:0] round;
    des_state_t st;
  } pipe_word_t;

  // ISA I/O window: 16 word registers at BASE_ADDR + 2*index.
  typedef enum logic [3:0] {
    REG_DATA0  = 4'd0,   // W: input word 0 (bits 63:48)  R: output word 0
    REG_DATA1  = 4'd1,   // W: input word 1               R: output word 1
    REG_DATA2  = 4'd2,   // W: input word 2               R: output word 2
    REG_DATA3  = 4'd3,   // W: input word 3 (bits 15:0)   R: output word 3 (frees the output)
    REG_KEY0   = 4'd4,   // W: key word 0 (bits 63:48)
    REG_KEY1   = 4'd5,
    REG_KEY2   = 4'd6,
    REG_KEY3   = 4'd7,   // W: key word 3 (bits 15:0)
    REG_CTRL   = 4'd8    // W: bit 0 = decrypt          R: status word
  } isa_reg_e;

  // Status word bit positions (read at REG_CTRL).
  localparam int unsigned ST_IN_READY  = 0;  // input registers may be written
  localparam int unsigned ST_OUT_VALID = 1;  // a finished block waits in the output logic
  localparam int unsigned ST_DECRYPT   = 2;  // mode of the batch in progress
  localparam int unsigned ST_BUSY      = 3;  // a batch is in progress
  localparam int unsigned ST_KEY_VALID = 4;  // all four key words have been written
  localparam int unsigned ST_STEP_LSB  = 8;  // bits 12:8: pipeline steps taken in this batch

  localparam logic [6:0] IP_TAB [64] = '{
    58, 50, 42, 34, 26, 18, 10, 2, 60, 52, 44, 36, 28, 20, 12, 4,
    62, 54, 46, 38, 30, 22, 14, 6, 64, 56, 48, 40, 32, 24, 16, 8,
    57, 49, 41, 33, 25, 17, 9, 1, 59, 51, 43, 35, 27, 19, 11, 3,
    61, 53, 45, 37, 29, 21, 13, 5, 63, 55, 47, 39, 31, 23, 15, 7
  };
  localparam logic [6:0] FP_TAB [64] = '{
    40, 8, 48, 16, 56, 24, 64, 32, 39, 7, 47, 15, 55, 23, 63, 31,
    38, 6, 46, 14, 54, 22, 62, 30, 37, 5, 45, 13, 53, 21, 61, 29,
    36, 4, 44, 12, 52, 20, 60, 28, 35, 3, 43, 11, 51, 19, 59, 27,
    34, 2, 42, 10, 50, 18, 58, 26, 33, 1, 41, 9, 49, 17, 57, 25
  };
  localparam logic [6:0] E_TAB [48] = '{
    32, 1, 2, 3, 4, 5, 4, 5, 6, 7, 8, 9, 8, 9, 10, 11,
    12, 13, 12, 13, 14, 15, 16, 17, 16, 17, 18, 19, 20, 21, 20, 21,
    22, 23, 24, 25, 24, 25, 26, 27, 28, 29, 28, 29, 30, 31, 32, 1
  };
  localparam logic [6:0] P_TAB [32] = '{
    16, 7, 20, 21, 29, 12, 28, 17, 1, 15, 23, 26, 5, 18, 31, 10,
    2, 8, 24, 14, 32, 27, 3, 9, 19, 13, 30, 6, 22, 11, 4, 25
  };
  localparam logic [6:0] PC1_TAB [56] = '{
    57, 49, 41, 33, 25, 17, 9, 1, 58, 50, 42, 34, 26, 18, 10, 2,
    59, 51, 43, 35, 27, 19, 11, 3, 60, 52, 44, 36, 63, 55, 47, 39,
    31, 23, 15, 7, 62, 54, 46, 38, 30, 22, 14, 6, 61, 53, 45, 37,
    29, 21, 13, 5, 28, 20, 12, 4
  };
  localparam logic [6:0] PC2_TAB [48] = '{
    14, 17, 11, 24, 1, 5, 3, 28, 15, 6, 21, 10, 23, 19, 12, 4,
    26, 8, 16, 7, 27, 20, 13, 2, 41, 52, 31, 37, 47, 55, 30, 40,
    51, 45, 33, 48, 44, 49, 39, 56, 34, 53, 46, 42, 50, 36, 29, 32
  };
  localparam logic [1:0] SHIFT_TAB [16] = '{
    1, 1, 2, 2, 2, 2, 2, 2, 1, 2, 2, 2, 2, 2, 2, 1
  };
  localparam logic [3:0] SBOX_TAB [8][64] = '{
    '{14, 4, 13, 1, 2, 15, 11, 8, 3, 10, 6, 12, 5, 9, 0, 7, 0, 15, 7, 4, 14, 2, 13, 1, 10, 6, 12, 11, 9, 5, 3, 8, 4, 1, 14, 8, 13, 6, 2, 11, 15, 12, 9, 7, 3, 10, 5, 0, 15, 12, 8, 2, 4, 9, 1, 7, 5, 11, 3, 14, 10, 0, 6, 13},
    '{15, 1, 8, 14, 6, 11, 3, 4, 9, 7, 2, 13, 12, 0, 5, 10, 3, 13, 4, 7, 15, 2, 8, 14, 12, 0, 1, 10, 6, 9, 11, 5, 0, 14, 7, 11, 10, 4, 13, 1, 5, 8, 12, 6, 9, 3, 2, 15, 13, 8, 10, 1, 3, 15, 4, 2, 11, 6, 7, 12, 0, 5, 14, 9},
    '{10, 0, 9, 14, 6, 3, 15, 5, 1, 13, 12, 7, 11, 4, 2, 8, 13, 7, 0, 9, 3, 4, 6, 10, 2, 8, 5, 14, 12, 11, 15, 1, 13, 6, 4, 9, 8, 15, 3, 0, 11, 1, 2, 12, 5, 10, 14, 7, 1, 10, 13, 0, 6, 9, 8, 7, 4, 15, 14, 3, 11, 5, 2, 12},
    '{7, 13, 14, 3, 0, 6, 9, 10, 1, 2, 8, 5, 11, 12, 4, 15, 13, 8, 11, 5, 6, 15, 0, 3, 4, 7, 2, 12, 1, 10, 14, 9, 10, 6, 9, 0, 12, 11, 7, 13, 15, 1, 3, 14, 5, 2, 8, 4, 3, 15, 0, 6, 10, 1, 13, 8, 9, 4, 5, 11, 12, 7, 2, 14},
    '{2, 12, 4, 1, 7, 10, 11, 6, 8, 5, 3, 15, 13, 0, 14, 9, 14, 11, 2, 12, 4, 7, 13, 1, 5, 0, 15, 10, 3, 9, 8, 6, 4, 2, 1, 11, 10, 13, 7, 8, 15, 9, 12, 5, 6, 3, 0, 14, 11, 8, 12, 7, 1, 14, 2, 13, 6, 15, 0, 9, 10, 4, 5, 3},
    '{12, 1, 10, 15, 9, 2, 6, 8, 0, 13, 3, 4, 14, 7, 5, 11, 10, 15, 4, 2, 7, 12, 9, 5, 6, 1, 13, 14, 0, 11, 3, 8, 9, 14, 15, 5, 2, 8, 12, 3, 7, 0, 4, 10, 1, 13, 11, 6, 4, 3, 2, 12, 9, 5, 15, 10, 11, 14, 1, 7, 6, 0, 8, 13},
    '{4, 11, 2, 14, 15, 0, 8, 13, 3, 12, 9, 7, 5, 10, 6, 1, 13, 0, 11, 7, 4, 9, 1, 10, 14, 3, 5, 12, 2, 15, 8, 6, 1, 4, 11, 13, 12, 3, 7, 14, 10, 15, 6, 8, 0, 5, 9, 2, 6, 11, 13, 8, 1, 4, 10, 7, 9, 5, 0, 15, 14, 2, 3, 12},
    '{13, 2, 8, 4, 6, 15, 11, 1, 10, 9, 3, 14, 5, 0, 12, 7, 1, 15, 13, 8, 10, 3, 7, 4, 12, 5, 6, 11, 0, 14, 9, 2, 7, 11, 4, 1, 9, 12, 14, 2, 0, 6, 10, 13, 15, 3, 5, 8, 2, 1, 14, 7, 4, 10, 8, 13, 15, 12, 9, 0, 3, 5, 6, 11}
  };

  // Generic permutation: output bit j+1 (MSB first) is input bit TAB[j].
  function automatic block_t des_ip(input block_t x);
    for (int j = 0; j < 64; j++) des_ip[63-j] = x[64-int'(IP_TAB[j])];
  endfunction

  function automatic block_t des_fp(input block_t x);
    for (int j = 0; j < 64; j++) des_fp[63-j] = x[64-int'(FP_TAB[j])];
  endfunction

  function automatic logic [47:0] des_expand(input logic [31:0] r);
    for (int j = 0; j < 48; j++) des_expand[47-j] = r[32-int'(E_TAB[j])];
  endfunction

  function automatic logic [31:0] des_pperm(input logic [31:0] s);
    for (int j = 0; j < 32; j++) des_pperm[31-j] = s[32-int'(P_TAB[j])];
  endfunction

  function automatic logic [55:0] des_pc1(input block_t k);
    for (int j = 0; j < 56; j++) des_pc1[55-j] = k[64-int'(PC1_TAB[j])];
  endfunction

  function automatic subkey_t des_pc2(input logic [55:0] cd);
    for (int j = 0; j < 48; j++) des_pc2[47-j] = cd[56-int'(PC2_TAB[j])];
  endfunction

  // S-box i (0..7) on a 6-bit group b1..b6: row = b1 b6, column = b2..b5.
  function automatic logic [3:0] des_sbox(input logic [2:0] i, input logic [5:0] b);
    return SBOX_TAB[i][{b[5], b[0], b[4:1]}];
  endfunction

  // 28-bit rotate left by 1 or 2 (key schedule).
  function automatic logic [27:0] rol28(input logic [27:0] x, input logic [1:0] s);
    return (s == 2'd2) ? {x[25:0], x[27:26]} : {x[26:0], x[27]};
  endfunction

endpackage
