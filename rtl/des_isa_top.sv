// des_isa_top: pipelined DES encryption card for the 16-bit PC ISA bus.
//
// A four-segment DES pipeline that recirculates: four blocks are loaded one after
// another, then circulate four times round a ring of four round circuits, so four
// encryptions take 16 + 3 = 19 round times instead of 4 x 16. Blocks, key and
// results cross the 16-bit bus as four words each.
//
// Data path: ISA input logic -> input registers (4 x 16 bit) -> IP -> feedback
// mux -> segments 1..4 -> back to the mux; the mux output also feeds the output
// logic (swap, IP^-1, 16-bit word select). A second set of 4 x 16-bit registers
// holds the key, from which all 16 round keys are wired. The control unit loads,
// recirculates and releases results (see des_control).
//
// Host protocol, registers at BASE_ADDR + 2*index (see des_pkg::isa_reg_e):
//   1. write the key words (index 4..7) and the mode (index 8, bit 0 = decrypt);
//   2. for each of SEGMENTS blocks: wait for status.in_ready, write data words
//      0..3 (word 3 last);
//   3. for each block, in input order: wait for status.out_valid, read data words
//      0..3 (reading word 3 releases it).
// A batch always holds SEGMENTS blocks. rst_n is the inverted ISA RESET DRV line.
// The pipeline structure, the 16-bit registers, the feedback and the control
// flow follow the document; the register map and handshakes are this design's.
module des_isa_top
  import des_pkg::*;
#(
  parameter int unsigned SEGMENTS  = 4,         // pipeline segments
  parameter logic [9:0]  BASE_ADDR = 10'h300    // ISA I/O base address
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [9:0]  isa_sa,
  input  logic        isa_aen,
  input  logic        isa_iow_n,
  input  logic        isa_ior_n,
  input  logic [15:0] isa_sd_in,
  output logic [15:0] isa_sd_out,
  output logic        isa_sd_oe,
  output logic        isa_iocs16_n
);

  logic        wr_stb, rd_done;
  logic [3:0]  wr_idx, rd_idx, rd_done_idx;
  logic [15:0] wr_data, rd_data;

  isa_bus_if #(.BASE_ADDR(BASE_ADDR)) u_isa (
    .clk, .rst_n,
    .isa_sa, .isa_aen, .isa_iow_n, .isa_ior_n, .isa_sd_in,
    .isa_sd_out, .isa_sd_oe, .isa_iocs16_n,
    .wr_stb, .wr_idx, .wr_data, .rd_idx, .rd_data, .rd_done, .rd_done_idx
  );

  // Input registers (data) and key registers.
  logic   in_full, in_take, key_full, key_valid;
  block_t in_block, key;

  des_word_regs u_in_regs (
    .clk, .rst_n,
    .wr_en   (wr_stb && wr_idx[3:2] == 2'b00),
    .wr_idx  (wr_idx[1:0]),
    .wr_data (wr_data),
    .take    (in_take),
    .value   (in_block),
    .full    (in_full)
  );

  des_word_regs u_key_regs (
    .clk, .rst_n,
    .wr_en   (wr_stb && wr_idx[3:2] == 2'b01),
    .wr_idx  (wr_idx[1:0]),
    .wr_data (wr_data),
    .take    (1'b0),
    .value   (key),
    .full    (key_full)
  );

  // Mode register; key_valid records that the last key word has been written.
  logic decrypt_req;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decrypt_req <= 1'b0;
      key_valid   <= 1'b0;
    end else begin
      if (wr_stb && wr_idx == REG_CTRL) decrypt_req <= wr_data[0];
      if (key_full) key_valid <= 1'b1;
    end
  end

  subkey_t subkeys [ROUNDS];
  des_key_schedule u_ks (.key(key), .subkeys(subkeys));

  logic   load, advance, capture, decrypt, busy, result_done, out_valid, out_pop;
  logic [4:0] step_count;
  block_t result;

  des_pipeline #(.SEGMENTS(SEGMENTS)) u_pipe (
    .clk, .rst_n, .advance, .load, .decrypt, .subkeys,
    .new_block   (in_block),
    .result      (result),
    .result_done (result_done)
  );

  logic [15:0] out_word;
  des_output_logic u_out (
    .clk, .rst_n, .capture,
    .din     (result),
    .rd_idx  (rd_idx[1:0]),
    .rd_data (out_word),
    .pop     (out_pop),
    .valid   (out_valid)
  );

  assign out_pop = rd_done && rd_done_idx == REG_DATA3 && out_valid;

  des_control #(.SEGMENTS(SEGMENTS)) u_ctrl (
    .clk, .rst_n, .in_full, .out_pop, .result_done, .decrypt_req,
    .in_take, .load, .advance, .capture, .decrypt, .busy, .step_count
  );

  // Read-back multiplexer.
  logic [15:0] status;
  always_comb begin
    status = '0;
    status[ST_IN_READY]  = !in_full;
    status[ST_OUT_VALID] = out_valid;
    status[ST_DECRYPT]   = decrypt;
    status[ST_BUSY]      = busy;
    status[ST_KEY_VALID] = key_valid;
    status[ST_STEP_LSB +: 5] = step_count;
    if (rd_idx[3:2] == 2'b00)    rd_data = out_word;
    else if (rd_idx == REG_CTRL) rd_data = status;
    else                         rd_data = '0;
  end

endmodule
