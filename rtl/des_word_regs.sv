// des_word_regs: four 16-bit registers ("Register 1" to "Register 4") that
// assemble one 64-bit block, or the key, from the 16-bit ISA data bus.
//
// Each write stores wr_data into word wr_idx; word 0 is the most significant
// (bits 63:48). Writing the last word (index WORDS-1) marks the block complete
// (full = 1); the control unit clears the flag with take when it moves the block
// into the pipeline. If take and a write of the last word meet in one cycle the
// new block wins. Word order and the full/take handshake are this design's
// choices; the four 16-bit registers are the document's.
module des_word_regs #(
  parameter int unsigned WORDS  = 4,     // registers per block
  parameter int unsigned WORD_W = 16,    // ISA data bus width
  localparam int unsigned IDX_W = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wr_en,
  input  logic [IDX_W-1:0]          wr_idx,
  input  logic [WORD_W-1:0]         wr_data,
  input  logic                      take,      // block consumed
  output logic [WORDS*WORD_W-1:0]   value,     // {word0, word1, ...}
  output logic                      full       // last word written since take
);

  logic [WORD_W-1:0] words [WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(WORDS); i++) words[i] <= '0;
      full <= 1'b0;
    end else begin
      if (wr_en) words[wr_idx] <= wr_data;
      if (wr_en && wr_idx == IDX_W'(WORDS - 1)) full <= 1'b1;
      else if (take)                            full <= 1'b0;
    end
  end

  always_comb
    for (int i = 0; i < int'(WORDS); i++)
      value[(WORDS-1-i)*WORD_W +: WORD_W] = words[i];

endmodule
