// des_feedback_mux: the multiplexer in front of the first pipeline segment.
//
// While the pipeline is being filled it passes a new block from the input
// registers (after IP) with round number 0; afterwards it passes the word leaving
// the last segment back to the first, so each block makes 16/SEGMENTS trips
// around the ring. Combinational; sel_new is driven by the control unit.
module des_feedback_mux
  import des_pkg::*;
(
  input  logic       sel_new,    // 1: take new_st, 0: take fb
  input  des_state_t new_st,     // new block, already through IP
  input  pipe_word_t fb,         // word leaving the last segment
  output pipe_word_t dout        // word for the first segment register
);

  always_comb begin
    if (sel_new) begin
      dout.valid = 1'b1;
      dout.round = '0;
      dout.st    = new_st;
    end else begin
      dout = fb;
    end
  end

endmodule
