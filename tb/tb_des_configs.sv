// tb_des_configs: compares the three pipeline depths the design can be built
// with, on the throughput workloads of the design: 4 and 16 encryptions.
// SEGMENTS = 1 is the iterative DES with one round circuit, 4 the default
// recirculating pipeline, 16 the fully unrolled pipeline. The round times
// (pipeline steps) each needs are checked against 16 per block for the
// iterative form, 16 + 3 = 19 per four blocks for four segments and
// 16 + 15 = 31 for sixteen blocks in sixteen segments. All results are checked
// against the reference DES.
module tb_des_configs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic d1, d4a, d4b, d16;
  int   c1, c4a, c4b, c16, f1, f4a, f4b, f16, s1, s4a, s4b, s16;

  des_card_run #(.SEGMENTS(1),  .NBLOCKS(4))  r1   (.clk, .rst_n, .done(d1),  .checks(c1),  .failures(f1),  .steps(s1));
  des_card_run #(.SEGMENTS(4),  .NBLOCKS(4))  r4a  (.clk, .rst_n, .done(d4a), .checks(c4a), .failures(f4a), .steps(s4a));
  des_card_run #(.SEGMENTS(4),  .NBLOCKS(16)) r4b  (.clk, .rst_n, .done(d4b), .checks(c4b), .failures(f4b), .steps(s4b));
  des_card_run #(.SEGMENTS(16), .NBLOCKS(16)) r16  (.clk, .rst_n, .done(d16), .checks(c16), .failures(f16), .steps(s16));

  always #5 clk = ~clk;

  task automatic check(input int got, input int e, input string what);
    checks++;
    if (got != e) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, e);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d1 && d4a && d4b && d16);
    checks   += c1 + c4a + c4b + c16;
    failures += f1 + f4a + f4b + f16;
    $display("round times: iterative 4 blocks %0d, 4 segments 4 blocks %0d, 4 segments 16 blocks %0d, 16 segments 16 blocks %0d",
             s1, s4a, s4b, s16);
    check(s1,  64, "iterative DES, 4 encryptions");
    check(s4a, 19, "4-segment pipeline, 4 encryptions");
    check(s4b, 76, "4-segment pipeline, 16 encryptions");
    check(s16, 31, "16-segment pipeline, 16 encryptions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
