// des_ip_perm: the DES initial permutation ("Matrix IP") or, with INVERSE = 1, its
// inverse ("Matrix IP^-1"), which closes the algorithm.
//
// Pure bit wiring from the tables of the standard (see des_pkg); no logic gates and
// no clock. din and dout are 64-bit blocks, bit 63 being bit 1 of the standard.
// IP is applied once as a block enters the pipeline and IP^-1 once as it leaves,
// so neither sits inside the recirculating round loop.
module des_ip_perm
  import des_pkg::*;
#(
  parameter bit INVERSE = 1'b0   // 0: IP, 1: IP^-1
) (
  input  block_t din,
  output block_t dout
);

  always_comb dout = INVERSE ? des_fp(din) : des_ip(din);

endmodule
