// des_segment: one pipeline segment, a segment register followed by one basic
// building block (a DES round).
//
// On a clock edge with advance = 1 the register takes the word from the previous
// segment (or from the feedback mux for segment 0). The round logic then works on
// the registered halves during the following cycle; its result, with the round
// number incremented, is the segment's output. With advance = 0 the register
// holds, which freezes the whole ring.
//
// Segment SEG of SEGMENTS only ever sees rounds SEG, SEG+SEGMENTS, ... so the
// round key index is formed from the upper bits of the travelling round number
// and the segment's own number in the lower bits. In decryption the keys are
// used in reverse order, K(15) in the first round. The round number and valid
// bit that travel with each block are this design's choice; the document
// describes only a register and a basic building block per segment.
// The assertion below is disabled during reset through rst_n, which lint reports
// as rst_n being used both asynchronously and synchronously; it is not logic.
module des_segment
  import des_pkg::*;
#(
  parameter int unsigned SEG      = 0,   // position in the ring, 0 = first
  parameter int unsigned SEGMENTS = 4    // segments in the ring (divides 16)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       advance,             // all segments step together
  input  logic       decrypt,             // use round keys in reverse order
  input  subkey_t    subkeys [ROUNDS],    // K(0)..K(15)
  input  pipe_word_t din,                 // from previous segment or mux
  output pipe_word_t dout                 // after this segment's round
);

  localparam logic [3:0] SEG_MASK = 4'(SEGMENTS - 1);

  pipe_word_t q;
  logic [3:0] kidx;
  subkey_t    k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (advance) q <= din;
  end

  always_comb begin
    kidx = (q.round[3:0] & ~SEG_MASK) | (4'(SEG) & SEG_MASK);
    k    = subkeys[decrypt ? 4'd15 - kidx : kidx];
  end

  des_round u_round (.din(q.st), .k(k), .dout(dout.st));

  always_comb begin
    dout.valid = q.valid;
    dout.round = q.round + 5'd1;
  end

  // A valid block in this segment must be on one of the segment's own rounds.
  a_round_slot : assert property (@(posedge clk) disable iff (!rst_n)
    q.valid && q.round < 5'(ROUNDS) |-> (q.round[3:0] & SEG_MASK) == (4'(SEG) & SEG_MASK));

endmodule
