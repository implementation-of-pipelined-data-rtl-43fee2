// des_key_schedule: derives the 16 DES round keys from the 64-bit key.
//
// PC-1 drops the eight parity bits and splits the remaining 56 bits into two
// 28-bit halves C and D. For round i both halves are rotated left by the
// cumulative amount of the standard's shift table (1 or 2 places per round) and
// PC-2 selects 48 of the 56 bits as K(i). All sixteen keys are produced at once
// by wiring, with no clock, so every pipeline segment can pick the key of the
// round it is performing. The key must be held stable while a batch is encrypted.
// The schedule is that of the Data Encryption Standard; producing all keys in
// parallel from a key register is this design's choice.
module des_key_schedule
  import des_pkg::*;
(
  input  block_t  key,               // 64-bit key, parity bits ignored
  output subkey_t subkeys [ROUNDS]   // K(0) .. K(15) in encryption order
);

  always_comb begin
    logic [55:0] cd;
    logic [27:0] c, d;
    cd = des_pc1(key);
    c  = cd[55:28];
    d  = cd[27:0];
    for (int i = 0; i < int'(ROUNDS); i++) begin
      c = rol28(c, SHIFT_TAB[i]);
      d = rol28(d, SHIFT_TAB[i]);
      subkeys[i] = des_pc2({c, d});
    end
  end

endmodule
