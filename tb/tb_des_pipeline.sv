// tb_des_pipeline: drives the four-segment ring directly. Four blocks are loaded
// with idle (stalled) cycles between them, the ring recirculates, and the four
// results must appear at the mux output after exactly 16, 17, 18 and 19
// advances, equal to the reference DES of each block, in encryption and
// decryption. result_done must stay low before advance 16.
module tb_des_pipeline;
  import des_pkg::*;
  import des_ref_pkg::*;

  localparam int S = 4;

  int checks = 0, failures = 0;
  logic    clk = 0, rst_n = 0, advance = 0, load = 0, decrypt = 0;
  subkey_t subkeys [ROUNDS];
  block_t  new_block = 0, result;
  logic    result_done;

  des_pipeline #(.SEGMENTS(S)) dut (
    .clk, .rst_n, .advance, .load, .decrypt, .subkeys, .new_block, .result, .result_done);

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] got, input logic [63:0] e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, e);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t key, blk [S];
    int steps, early_done;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int batch = 0; batch < 12; batch++) begin
      key = (batch == 0) ? 64'h133457799BBCDFF1 : rand64();
      for (int i = 0; i < 16; i++) subkeys[i] = ref_subkey(key, i);
      decrypt = batch[0];
      steps = 0;
      early_done = 0;
      for (int b = 0; b < S; b++) begin
        blk[b] = (batch == 0 && b == 0) ? 64'h0123456789ABCDEF : rand64();
        new_block = blk[b]; load = 1; advance = 1;
        @(negedge clk);
        steps++;
        load = 0; advance = 0;
        new_block = rand64();
        repeat ($urandom() % 4) @(negedge clk);   // pipeline stalls waiting for input
      end
      while (steps < 16) begin
        early_done += int'(result_done);
        advance = 1;
        @(negedge clk);
        steps++;
      end
      advance = 0;
      for (int b = 0; b < S; b++) begin
        check(steps, 16 + b, "advance count of result");
        check(result_done, 1, "result_done");
        check(result, ref_des(blk[b], key, decrypt), decrypt ? "decryption" : "encryption");
        if (batch == 0 && b == 0) check(result, 64'h85E813540F0AB405, "known answer");
        repeat ($urandom() % 3) @(negedge clk);    // host reading: ring holds
        check(result, ref_des(blk[b], key, decrypt), "result held");
        if (b < S - 1) begin
          advance = 1;
          @(negedge clk);
          advance = 0;
          steps++;
        end
      end
      check(early_done, 0, "no result before advance 16");
      // Drain the ring so the next batch starts from an empty-looking state.
      advance = 1;
      repeat (S) @(negedge clk);
      advance = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
