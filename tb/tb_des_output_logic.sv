// tb_des_output_logic: captures blocks, reads them back as four 16-bit words
// (word 0 most significant) and checks the valid flag set by capture and
// cleared by pop.
module tb_des_output_logic;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0, capture = 0, pop = 0, valid;
  logic [63:0] din = 0;
  logic [1:0]  rd_idx = 0;
  logic [15:0] rd_data;

  des_output_logic dut (.clk, .rst_n, .capture, .din, .rd_idx, .rd_data, .pop, .valid);

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] got, input logic [63:0] e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] blk;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(valid, 0, "reset valid");
    for (int n = 0; n < 100; n++) begin
      blk = {$urandom(), $urandom()};
      din = blk; capture = 1;
      @(negedge clk);
      capture = 0;
      din = ~blk;
      check(valid, 1, "valid after capture");
      for (int i = 0; i < 4; i++) begin
        rd_idx = 2'(i);
        #1 check(rd_data, blk[63-16*i -: 16], "word");
      end
      pop = 1;
      @(negedge clk);
      pop = 0;
      check(valid, 0, "cleared by pop");
      rd_idx = 0;
      #1 check(rd_data, blk[63:48], "data held after pop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
