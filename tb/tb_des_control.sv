// tb_des_control: exercises the control unit with a model of its surroundings.
// The testbench supplies blocks after random delays (so the pipeline stalls
// while filling), counts advances itself, reports a finished block once its own
// count says so, and reads outputs after random delays. It checks that exactly
// SEGMENTS blocks are loaded, that the outputs are captured after 16, 17, 18 and
// 19 advances, that the ring never advances while waiting for the host, and
// that the mode is latched with the first block.
module tb_des_control;
  localparam int S = 4;

  int checks = 0, failures = 0;
  logic       clk = 0, rst_n = 0;
  logic       in_full = 0, out_pop = 0, result_done, decrypt_req = 0;
  logic       in_take, load, advance, capture, decrypt, busy;
  logic [4:0] step_count;

  des_control #(.SEGMENTS(S)) dut (
    .clk, .rst_n, .in_full, .out_pop, .result_done, .decrypt_req,
    .in_take, .load, .advance, .capture, .decrypt, .busy, .step_count);

  always #5 clk = ~clk;

  int adv = 0, loads = 0, caps = 0, stall_fill = 0, stall_out = 0, reload = 0;
  int cap_at [S];
  logic waiting_out = 0;
  logic give = 0;

  // Input registers: filled by the testbench, emptied by the control unit.
  always @(posedge clk)
    if (give)         in_full <= 1'b1;
    else if (in_take) in_full <= 1'b0;

  // A block finishes 16 advances after it was loaded; blocks were loaded on
  // advances 1..S, so after the 16th advance one is at the output each time.
  assign result_done = (adv >= 16) && (adv <= 15 + S);

  always @(posedge clk) if (rst_n) begin
    if (advance) adv++;
    if (load) loads++;
    if (advance && !load) reload++;
    if (capture) begin
      if (caps < S) cap_at[caps] = adv;
      caps++;
      waiting_out <= 1'b1;
    end
    if (out_pop) waiting_out <= 1'b0;
    if (waiting_out && advance && !out_pop) stall_out++;   // must never happen
    if (busy && !in_full && loads < S && !advance) stall_fill++;
  end

  task automatic check(input int got, input int e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, e);
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
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int batch = 0; batch < 6; batch++) begin
      adv = 0; loads = 0; caps = 0; reload = 0;
      decrypt_req = batch[0];
      for (int b = 0; b < S; b++) begin
        repeat (1 + $urandom() % 5) @(negedge clk);
        give = 1;
        @(negedge clk);
        give = 0;
        while (in_full) @(negedge clk);
        if (b == 0) check(decrypt, batch[0], "mode latched with first block");
        decrypt_req = ~decrypt_req;                // must not disturb the batch
      end
      for (int b = 0; b < S; b++) begin
        while (caps <= b) @(negedge clk);
        repeat ($urandom() % 6) @(negedge clk);
        out_pop = 1;
        @(negedge clk);
        out_pop = 0;
      end
      @(negedge clk);
      check(loads, S, "blocks loaded per batch");
      for (int b = 0; b < S; b++) check(cap_at[b], 16 + b, "advances at capture");
      check(adv, 15 + S, "advances per batch");
      check(reload, 15, "advances with feedback");
      check(decrypt, batch[0], "mode held to the end");
      check(busy, 0, "idle after batch");
      check(step_count, 0, "counter cleared");
    end
    check(stall_out, 0, "no advance while output waits");
    checks++;
    if (stall_fill == 0) begin
      failures++;
      $display("FAIL fill stall never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
