// des_f: the DES round function F(R, K).
//
// The 32-bit right half is expanded to 48 bits (table E), mixed with the 48-bit
// round key by XOR, cut into eight 6-bit groups that address the eight S-boxes,
// and the eight 4-bit results are permuted by table P. Purely combinational.
// The function follows the Data Encryption Standard; the design treats it as the
// key-dependent part of one basic building block.
module des_f
  import des_pkg::*;
(
  input  logic [31:0] r,     // right half entering the round
  input  subkey_t     k,     // round key
  output logic [31:0] f      // F(R, K)
);

  logic [47:0] x;
  logic [31:0] s;

  always_comb begin
    x = des_expand(r) ^ k;
    for (int unsigned i = 0; i < 8; i++)
      s[31-4*i -: 4] = des_sbox(3'(i), x[47-6*i -: 6]);
    f = des_pperm(s);
  end

endmodule
