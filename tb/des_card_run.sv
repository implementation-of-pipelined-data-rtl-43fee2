// des_card_run: testbench helper that builds a card with SEGMENTS segments,
// encrypts NBLOCKS random blocks through the ISA bus in batches of SEGMENTS,
// checks every result against the reference DES, and reports the total number
// of pipeline steps (round times) the card spent, for throughput comparisons.
module des_card_run
  import des_pkg::*;
  import des_ref_pkg::*;
#(
  parameter int unsigned SEGMENTS = 4,
  parameter int unsigned NBLOCKS  = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   steps          // advances of the ring over all blocks
);

  logic [9:0]  sa;
  logic        aen, iow_n, ior_n, sd_oe, iocs16_n;
  logic [15:0] sd_host, sd_card;

  des_isa_top #(.SEGMENTS(SEGMENTS)) dut (
    .clk, .rst_n,
    .isa_sa(sa), .isa_aen(aen), .isa_iow_n(iow_n), .isa_ior_n(ior_n),
    .isa_sd_in(sd_host), .isa_sd_out(sd_card), .isa_sd_oe(sd_oe), .isa_iocs16_n(iocs16_n));

  isa_host #(.BASE_ADDR(10'h300)) host (
    .clk, .sa, .aen, .iow_n, .ior_n, .sd(sd_host), .sd_card, .sd_oe);

  always @(posedge clk) if (rst_n && dut.advance) steps++;

  initial begin
    block_t key, blk [SEGMENTS], res;
    logic [15:0] st;
    logic oe;
    done = 0; checks = 0; failures = 0; steps = 0;
    @(posedge rst_n);
    key = rand64();
    for (int i = 0; i < 4; i++) host.io_write(4'(REG_KEY0) + 4'(i), key[63-16*i -: 16]);
    host.io_write(REG_CTRL, 16'd0);
    for (int n = 0; n < int'(NBLOCKS / SEGMENTS); n++) begin
      for (int b = 0; b < int'(SEGMENTS); b++) begin
        blk[b] = rand64();
        do host.io_read(REG_CTRL, st, oe); while (!st[ST_IN_READY]);
        for (int i = 0; i < 4; i++) host.io_write(4'(REG_DATA0) + 4'(i), blk[b][63-16*i -: 16]);
      end
      for (int b = 0; b < int'(SEGMENTS); b++) begin
        do host.io_read(REG_CTRL, st, oe); while (!st[ST_OUT_VALID]);
        checks++;
        if (int'(st[ST_STEP_LSB +: 5]) != 16 + b) begin
          failures++;
          $display("FAIL S=%0d: result %0d left at step %0d", SEGMENTS, b, st[ST_STEP_LSB +: 5]);
        end
        for (int i = 0; i < 4; i++) begin
          host.io_read(4'(REG_DATA0) + 4'(i), st, oe);
          res[63-16*i -: 16] = st;
        end
        checks++;
        if (res !== ref_des(blk[b], key, 1'b0)) begin
          failures++;
          $display("FAIL S=%0d: got %h expected %h", SEGMENTS, res, ref_des(blk[b], key, 1'b0));
        end
      end
    end
    done = 1;
  end

endmodule
