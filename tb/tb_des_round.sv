// tb_des_round: checks one basic building block (L' = R, R' = L xor F(R, K))
// against the standard's worked example and the reference on random inputs.
module tb_des_round;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0, failures = 0;
  des_state_t din, dout;
  subkey_t    k;

  des_round dut (.din(din), .k(k), .dout(dout));

  task automatic check(input logic [63:0] exp, input string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, dout, exp);
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
    din = 64'hCC00CCFF_F0AAF0AA; k = 48'h1B02EFFC7072;
    #1 check(64'hF0AAF0AA_EF4A6544, "round 1 of worked example");
    for (int i = 0; i < 500; i++) begin
      din = rand64();
      k   = {$urandom(), $urandom()};
      #1 check({din.r, din.l ^ ref_f(din.r, k)}, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
