// des_round: one basic building block of DES, i.e. one Feistel round.
//
// The right half becomes the next left half; the right half also goes through
// F with the round key and is XORed into the left half to form the next right
// half:  L' = R,  R' = L xor F(R, K).  Combinational; one instance forms the logic
// of one pipeline segment.
module des_round
  import des_pkg::*;
(
  input  des_state_t din,    // L(i), R(i)
  input  subkey_t    k,      // round key K(i)
  output des_state_t dout    // L(i+1), R(i+1)
);

  logic [31:0] f;

  des_f u_f (.r(din.r), .k(k), .f(f));

  always_comb begin
    dout.l = din.r;
    dout.r = din.l ^ f;
  end

endmodule
