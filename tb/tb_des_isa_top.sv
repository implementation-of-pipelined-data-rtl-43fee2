// tb_des_isa_top: end-to-end test of the pipelined DES card at its default size
// (four segments), driven only through ISA I/O cycles.
//
// Each batch writes a key and a mode, writes four blocks (waiting for in_ready
// before each), then reads four results (waiting for out_valid before each) and
// compares them with the reference DES. Batch 0 uses the standard's worked
// example. Encrypt and decrypt batches alternate, and each decrypt batch takes
// the previous batch's ciphertexts back to the plaintexts. The testbench checks
// the paper's timing: results leave after pipeline steps 16, 17, 18 and 19
// (read from the status word), the fourth block finishes 16 steps after it
// entered, and once the pipeline is full the ring advances every clock.
// It counts and requires each mechanism at least once: fill stalls (ring waiting
// for the host to deliver a block), feedback reloads, output stalls (ring held
// until the host has read a result), mode switches and key changes.
module tb_des_isa_top;
  import des_pkg::*;
  import des_ref_pkg::*;

  localparam int S = 4;            // the card's default number of segments

  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic [9:0]  sa;
  logic        aen, iow_n, ior_n, sd_oe, iocs16_n;
  logic [15:0] sd_host, sd_card;

  des_isa_top dut (
    .clk, .rst_n,
    .isa_sa(sa), .isa_aen(aen), .isa_iow_n(iow_n), .isa_ior_n(ior_n),
    .isa_sd_in(sd_host), .isa_sd_out(sd_card), .isa_sd_oe(sd_oe), .isa_iocs16_n(iocs16_n));

  isa_host #(.BASE_ADDR(10'h300)) host (
    .clk, .sa, .aen, .iow_n, .ior_n, .sd(sd_host), .sd_card, .sd_oe);

  always #5 clk = ~clk;

  // Mechanism counters, from the card's internal control signals.
  int fill_stalls = 0, reloads = 0, out_stalls = 0, mode_switches = 0, key_changes = 0;
  int run_gaps = 0, clk_cnt = 0, last_load_clk = 0, first_cap_clk = -1;
  int advances_in_batch = 0;

  always @(posedge clk) if (rst_n) begin
    clk_cnt++;
    if (dut.busy && !dut.in_full && !dut.advance && !dut.out_valid && !dut.capture &&
        dut.step_count < 5'(S))
      fill_stalls++;
    if (dut.advance && !dut.load) reloads++;
    if (dut.out_valid && !dut.advance) out_stalls++;
    if (dut.advance) advances_in_batch++;
    if (dut.load) last_load_clk = clk_cnt;
    if (dut.capture && first_cap_clk < 0) first_cap_clk = clk_cnt;
    // Between the last load and the first capture the ring must never pause.
    if (dut.busy && dut.step_count >= 5'(S) && dut.step_count < 5'd16 && !dut.advance)
      run_gaps++;
  end

  task automatic check(input logic [63:0] got, input logic [63:0] e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, e);
    end
  endtask

  task automatic read_status(output logic [15:0] st);
    logic oe;
    host.io_read(REG_CTRL, st, oe);
  endtask

  task automatic write_key(input block_t key);
    for (int i = 0; i < 4; i++) host.io_write(4'(REG_KEY0) + 4'(i), key[63-16*i -: 16]);
  endtask

  task automatic run_batch(input block_t key, input bit decrypt,
                           input block_t blk [S], output block_t res [S]);
    logic [15:0] st, w;
    logic        oe;
    host.io_write(REG_CTRL, {15'd0, decrypt});
    first_cap_clk = -1;
    advances_in_batch = 0;
    for (int b = 0; b < S; b++) begin
      do read_status(st); while (!st[ST_IN_READY]);
      for (int i = 0; i < 4; i++) host.io_write(4'(REG_DATA0) + 4'(i), blk[b][63-16*i -: 16]);
    end
    for (int b = 0; b < S; b++) begin
      do read_status(st); while (!st[ST_OUT_VALID]);
      if (b == 0) check(64'(first_cap_clk - last_load_clk), 64'(16 - S + 1),
                        "clocks from last load to first result");
      check(64'(st[ST_STEP_LSB +: 5]), 64'(16 + b), "pipeline step of result");
      check(st[ST_DECRYPT], decrypt, "mode of batch");
      check(st[ST_BUSY], 1, "busy during batch");
      for (int i = 0; i < 4; i++) begin
        host.io_read(4'(REG_DATA0) + 4'(i), w, oe);
        check(oe, 1, "data driver enabled");
        res[b][63-16*i -: 16] = w;
      end
      check(res[b], ref_des(blk[b], key, decrypt), decrypt ? "decryption" : "encryption");
    end
    read_status(st);
    check(st[ST_BUSY], 0, "idle after batch");
    check(advances_in_batch, 64'(16 + S - 1), "pipeline steps for the batch");
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t key, pt [S], ct [S], back [S];
    logic [15:0] st;
    bit prev_mode;
    repeat (3) @(negedge clk);
    rst_n = 1;
    read_status(st);
    check(st[ST_KEY_VALID], 0, "no key after reset");
    check(st[ST_IN_READY], 1, "ready after reset");
    prev_mode = 0;
    for (int batch = 0; batch < 8; batch++) begin
      if (batch % 4 == 0) begin
        key = (batch == 0) ? 64'h133457799BBCDFF1 : rand64();
        write_key(key);
        key_changes++;
        read_status(st);
        check(st[ST_KEY_VALID], 1, "key valid");
      end
      if (batch % 2 == 0) begin
        for (int b = 0; b < S; b++) pt[b] = (batch == 0 && b == 0) ? 64'h0123456789ABCDEF : rand64();
        run_batch(key, 1'b0, pt, ct);
        if (batch == 0) check(ct[0], 64'h85E813540F0AB405, "known answer");
        if (prev_mode) mode_switches++;
        prev_mode = 0;
      end else begin
        run_batch(key, 1'b1, ct, back);
        for (int b = 0; b < S; b++) check(back[b], pt[b], "decrypt restores plaintext");
        if (!prev_mode) mode_switches++;
        prev_mode = 1;
      end
    end
    check(run_gaps, 0, "ring runs every clock once full");
    $display("mechanisms: fill stalls %0d, reloads %0d, output stalls %0d, mode switches %0d, key changes %0d",
             fill_stalls, reloads, out_stalls, mode_switches, key_changes);
    checks += 5;
    if (fill_stalls == 0)   begin failures++; $display("FAIL no fill stall"); end
    if (reloads == 0)       begin failures++; $display("FAIL no feedback reload"); end
    if (out_stalls == 0)    begin failures++; $display("FAIL no output stall"); end
    if (mode_switches == 0) begin failures++; $display("FAIL no mode switch"); end
    if (key_changes < 2)    begin failures++; $display("FAIL no key change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
