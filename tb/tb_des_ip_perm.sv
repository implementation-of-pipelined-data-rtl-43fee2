// tb_des_ip_perm: checks IP and IP^-1 against a known value of the standard's
// worked example, against the bit-serial reference, and that IP^-1 undoes IP.
module tb_des_ip_perm;
  import des_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [63:0] x, y, z, w;

  des_ip_perm #(.INVERSE(1'b0)) u_ip (.din(x), .dout(y));
  des_ip_perm #(.INVERSE(1'b1)) u_fp (.din(y), .dout(z));
  des_ip_perm #(.INVERSE(1'b1)) u_fp2 (.din(x), .dout(w));

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    x = 64'h0123456789ABCDEF;
    #1 check(y, 64'hCC00CCFFF0AAF0AA, "IP known value");
    check(z, x, "IP^-1(IP(x))");
    // Bit 58 of the input becomes bit 1 of IP's output.
    x = 64'h1 << (64 - 58);
    #1 check(y, 64'h8000_0000_0000_0000, "IP single bit");
    // Bit 40 of the input becomes bit 1 of IP^-1's output.
    x = 64'h1 << (64 - 40);
    #1 check(w, 64'h8000_0000_0000_0000, "IP^-1 single bit");
    for (int i = 0; i < 200; i++) begin
      x = rand64();
      #1;
      check(y, ref_perm64(x, 1'b0), "IP random");
      check(w, ref_perm64(x, 1'b1), "IP^-1 random");
      check(z, x, "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
