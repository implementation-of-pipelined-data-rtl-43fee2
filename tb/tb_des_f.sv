// tb_des_f: checks F(R, K) against the first two rounds of the standard's
// worked example and against the bit-serial reference on random inputs.
module tb_des_f;
  import des_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] r, f;
  logic [47:0] k;

  des_f dut (.r(r), .k(k), .f(f));

  task automatic check(input logic [31:0] exp, input string what);
    checks++;
    if (f !== exp) begin
      failures++;
      $display("FAIL %s: r=%h k=%h got %h expected %h", what, r, k, f, exp);
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
    r = 32'hF0AAF0AA; k = 48'h1B02EFFC7072;
    #1 check(32'h234AA9BB, "round 1 of worked example");
    r = 32'hEF4A6544; k = 48'h79AED9DBC9E5;
    #1 check(32'h3CAB87A3, "round 2 of worked example");
    for (int i = 0; i < 500; i++) begin
      r = $urandom();
      k = {$urandom(), $urandom()};
      #1 check(ref_f(r, k), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
