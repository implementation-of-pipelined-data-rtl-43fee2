// tb_des_segment: checks one pipeline segment (segment 1 of 4): the register
// loads only on advance, the round uses the key of the travelling round number
// (reversed in decryption), and the round number is incremented on the way out.
module tb_des_segment;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0, advance = 0, decrypt = 0;
  subkey_t    subkeys [ROUNDS];
  pipe_word_t din, dout, held;
  logic [63:0] key;

  des_segment #(.SEG(1), .SEGMENTS(4)) dut (
    .clk, .rst_n, .advance, .decrypt, .subkeys, .din, .dout);

  always #5 clk = ~clk;

  task automatic check(input logic [69:0] got, input logic [69:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic pipe_word_t expected(input pipe_word_t w, input bit dec);
    int idx = dec ? 15 - int'(w.round) : int'(w.round);
    return {w.valid, w.round + 5'd1, w.st.r, w.st.l ^ ref_f(w.st.r, subkeys[idx])};
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key = rand64();
    for (int i = 0; i < 16; i++) subkeys[i] = ref_subkey(key, i);
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(dout.valid, 0, "empty after reset");
    for (int n = 0; n < 200; n++) begin
      decrypt = 1'($urandom());
      din = {1'b1, 5'(1 + 4 * ($urandom() % 4)), rand64()};
      held = din;
      advance = 1;
      @(negedge clk);
      check(dout, expected(held, decrypt), decrypt ? "decrypt round" : "encrypt round");
      // Without advance the register holds whatever arrives at din.
      advance = 0;
      din = {1'b1, 5'd5, rand64()};
      @(negedge clk);
      check(dout, expected(held, decrypt), "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
