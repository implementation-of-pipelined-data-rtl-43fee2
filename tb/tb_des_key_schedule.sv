// tb_des_key_schedule: checks all sixteen round keys of the standard's worked
// example key and of random keys against the one-place-at-a-time reference.
module tb_des_key_schedule;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0, failures = 0;
  block_t  key;
  subkey_t subkeys [ROUNDS];

  des_key_schedule dut (.key(key), .subkeys(subkeys));

  localparam subkey_t KNOWN [16] = '{
    48'h1B02EFFC7072, 48'h79AED9DBC9E5, 48'h55FC8A42CF99, 48'h72ADD6DB351D,
    48'h7CEC07EB53A8, 48'h63A53E507B2F, 48'hEC84B7F618BC, 48'hF78A3AC13BFB,
    48'hE0DBEBEDE781, 48'hB1F347BA464F, 48'h215FD3DED386, 48'h7571F59467E9,
    48'h97C5D1FABA41, 48'h5F43B7F2E73A, 48'hBF918D3D3F0A, 48'hCB3D8B0E17F5};

  task automatic check(input int i, input subkey_t exp, input string what);
    checks++;
    if (subkeys[i] !== exp) begin
      failures++;
      $display("FAIL %s: key %h K%0d got %h expected %h", what, key, i + 1, subkeys[i], exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key = 64'h133457799BBCDFF1;
    #1 for (int i = 0; i < 16; i++) check(i, KNOWN[i], "worked example");
    // Parity bits (bit 8, 16, ... of each byte) must not matter.
    key = 64'h133457799BBCDFF1 ^ 64'h0101010101010101;
    #1 for (int i = 0; i < 16; i++) check(i, KNOWN[i], "parity ignored");
    for (int n = 0; n < 50; n++) begin
      key = rand64();
      #1 for (int i = 0; i < 16; i++) check(i, ref_subkey(key, i), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
