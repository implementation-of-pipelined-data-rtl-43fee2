// des_output_logic: holds one finished 64-bit block and hands it to the 16-bit
// ISA bus one word at a time.
//
// capture loads din into the holding register and sets valid. rd_data is word
// rd_idx of the held block (word 0 = bits 63:48), combinationally. pop, given by
// the bus interface when the host has read the last word, clears valid; the
// control unit then lets the pipeline advance to the next finished block. The
// holding register and the valid/pop handshake are this design's choice; the
// document gives only a 16-bit output logic block.
// The assertion below is disabled during reset through rst_n, which lint reports
// as rst_n being used both asynchronously and synchronously; it is not logic.
module des_output_logic #(
  parameter int unsigned WORDS  = 4,
  parameter int unsigned WORD_W = 16,
  localparam int unsigned IDX_W = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    capture,    // take din
  input  logic [WORDS*WORD_W-1:0] din,
  input  logic [IDX_W-1:0]        rd_idx,
  output logic [WORD_W-1:0]       rd_data,
  input  logic                    pop,        // host finished reading
  output logic                    valid
);

  logic [WORDS*WORD_W-1:0] hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold  <= '0;
      valid <= 1'b0;
    end else if (capture) begin
      hold  <= din;
      valid <= 1'b1;
    end else if (pop) begin
      valid <= 1'b0;
    end
  end

  always_comb rd_data = hold[(WORDS-1-int'(rd_idx))*WORD_W +: WORD_W];

  // A new block may only be captured once the previous one has been read.
  a_no_overwrite : assert property (@(posedge clk) disable iff (!rst_n) capture |-> !valid);

endmodule
