// tb_des_word_regs: writes 16-bit words in random order and checks the
// assembled 64-bit value (word 0 most significant) and the full/take flag.
module tb_des_word_regs;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0, wr_en = 0, take = 0, full;
  logic [1:0]  wr_idx = 0;
  logic [15:0] wr_data = 0;
  logic [63:0] value, exp;

  des_word_regs dut (.clk, .rst_n, .wr_en, .wr_idx, .wr_data, .take, .value, .full);

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] got, input logic [63:0] e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, e);
    end
  endtask

  task automatic write(input int idx, input logic [15:0] d);
    wr_en = 1; wr_idx = 2'(idx); wr_data = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(value, 0, "reset value");
    check(full, 0, "reset full");
    exp = 0;
    for (int n = 0; n < 100; n++) begin
      logic [15:0] w [4];
      for (int i = 0; i < 4; i++) w[i] = 16'($urandom());
      exp = {w[0], w[1], w[2], w[3]};
      // Words 0..2 in random order, word 3 last.
      for (int i = 2; i >= 0; i--) begin
        int j;
        j = (n + i) % 3;
        write(j, w[j]);
        check(full, 0, "not full before last word");
      end
      write(3, w[3]);
      check(value, exp, "assembled block");
      check(full, 1, "full after last word");
      take = 1;
      @(negedge clk);
      take = 0;
      check(full, 0, "cleared by take");
      check(value, exp, "value kept after take");
    end
    // take in the same cycle as a write of the last word: the new block wins.
    wr_en = 1; wr_idx = 3; wr_data = 16'h1234; take = 1;
    @(negedge clk);
    wr_en = 0; take = 0;
    check(full, 1, "write beats take");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
