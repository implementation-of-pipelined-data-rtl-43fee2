// des_ref_pkg: a bit-serial reference model of DES for the testbenches.
//
// Written independently of the RTL's structure: every permutation is done by
// walking the standard's 1-based table entries one bit at a time, the key
// schedule rotates one place at a time, and the cipher runs the 16 rounds in a
// plain loop. The tables themselves are shared with the RTL package; the
// known-answer vectors in the testbenches guard them.
package des_ref_pkg;
  import des_pkg::*;

  // Bit n (1-based, MSB first) of a W-bit value.
  function automatic logic getbit(input logic [63:0] v, input int w, input int n);
    return v[w-n];
  endfunction

  function automatic logic [63:0] ref_perm64(input logic [63:0] v, input bit inverse);
    logic [63:0] o = '0;
    for (int j = 1; j <= 64; j++)
      o[64-j] = getbit(v, 64, inverse ? int'(FP_TAB[j-1]) : int'(IP_TAB[j-1]));
    return o;
  endfunction

  function automatic logic [47:0] ref_subkey(input logic [63:0] key, input int round);
    logic [27:0] c, d;
    logic [55:0] cd;
    logic [47:0] k = '0;
    for (int j = 1; j <= 28; j++) c[28-j] = getbit(key, 64, int'(PC1_TAB[j-1]));
    for (int j = 29; j <= 56; j++) d[56-j] = getbit(key, 64, int'(PC1_TAB[j-1]));
    for (int i = 0; i <= round; i++)
      for (int s = 0; s < int'(SHIFT_TAB[i]); s++) begin
        c = {c[26:0], c[27]};
        d = {d[26:0], d[27]};
      end
    cd = {c, d};
    for (int j = 1; j <= 48; j++) k[48-j] = getbit({8'h0, cd}, 56, int'(PC2_TAB[j-1]));
    return k;
  endfunction

  function automatic logic [31:0] ref_f(input logic [31:0] r, input logic [47:0] k);
    logic [47:0] e;
    logic [31:0] s, o;
    for (int j = 1; j <= 48; j++) e[48-j] = getbit({32'h0, r}, 32, int'(E_TAB[j-1]));
    e = e ^ k;
    for (int b = 0; b < 8; b++) begin
      int six, row, col;
      six = int'(e[47-6*b -: 6]);
      row = ((six >> 4) & 2) | (six & 1);
      col = (six >> 1) & 15;
      s[31-4*b -: 4] = SBOX_TAB[b][row*16 + col];
    end
    for (int j = 1; j <= 32; j++) o[32-j] = getbit({32'h0, s}, 32, int'(P_TAB[j-1]));
    return o;
  endfunction

  function automatic logic [63:0] ref_des(input logic [63:0] blk, input logic [63:0] key,
                                          input bit decrypt);
    logic [63:0] x;
    logic [31:0] l, r, t;
    x = ref_perm64(blk, 1'b0);
    l = x[63:32];
    r = x[31:0];
    for (int i = 0; i < 16; i++) begin
      t = r;
      r = l ^ ref_f(r, ref_subkey(key, decrypt ? 15 - i : i));
      l = t;
    end
    return ref_perm64({r, l}, 1'b1);
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

endpackage
