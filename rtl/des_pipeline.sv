// des_pipeline: the recirculating DES pipeline, SEGMENTS segments in a ring.
//
// A new 64-bit block passes through IP and the feedback mux into segment 0; each
// advance moves every block one segment on, and the word leaving the last segment
// returns through the mux to segment 0. With the default of four segments the
// ring holds four blocks at once and each block goes round it four times, so the
// sixteen rounds of a block take sixteen advances and four blocks finish on
// advances 16, 17, 18 and 19. SEGMENTS = 1 gives the iterative one-round DES and
// SEGMENTS = 16 the fully unrolled pipeline, which the same control handles.
//
// The result tap follows the mux output, as in the block diagram: when the word
// there has completed round 16 (result_done), its halves are swapped back (R16 L16)
// and put through IP^-1 to give the output block on `result`. All of this is
// combinational after the segment registers, so a result is read in the cycle
// after the advance that completes it, while the ring is held.
module des_pipeline
  import des_pkg::*;
#(
  parameter int unsigned SEGMENTS = 4    // pipeline segments; a power of 2 up to 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    advance,            // move every block one segment on
  input  logic    load,               // segment 0 takes new_block instead of feedback
  input  logic    decrypt,            // round keys in reverse order
  input  subkey_t subkeys [ROUNDS],   // K(0)..K(15)
  input  block_t  new_block,          // block from the input registers
  output block_t  result,             // IP^-1 of the word at the mux output
  output logic    result_done         // that word has completed all 16 rounds
);

  if (SEGMENTS == 0 || SEGMENTS > ROUNDS || (ROUNDS % SEGMENTS) != 0 ||
      (SEGMENTS & (SEGMENTS - 1)) != 0) begin : g_bad_segments
    $error("des_pipeline: SEGMENTS must be 1, 2, 4, 8 or 16");
  end

  des_state_t new_st;
  pipe_word_t seg_in  [SEGMENTS];
  pipe_word_t seg_out [SEGMENTS];
  block_t     swapped;

  des_ip_perm #(.INVERSE(1'b0)) u_ip (.din(new_block), .dout(new_st));

  des_feedback_mux u_mux (
    .sel_new (load),
    .new_st  (new_st),
    .fb      (seg_out[SEGMENTS-1]),
    .dout    (seg_in[0])
  );

  for (genvar s = 0; s < SEGMENTS; s++) begin : g_seg
    if (s > 0) begin : g_link
      assign seg_in[s] = seg_out[s-1];
    end
    des_segment #(.SEG(s), .SEGMENTS(SEGMENTS)) u_seg (
      .clk     (clk),
      .rst_n   (rst_n),
      .advance (advance),
      .decrypt (decrypt),
      .subkeys (subkeys),
      .din     (seg_in[s]),
      .dout    (seg_out[s])
    );
  end

  // Undo the last swap (the output is R16 L16) and apply IP^-1.
  assign swapped     = {seg_in[0].st.r, seg_in[0].st.l};
  assign result_done = seg_in[0].valid && (seg_in[0].round == 5'(ROUNDS));

  des_ip_perm #(.INVERSE(1'b1)) u_fp (.din(swapped), .dout(result));

endmodule
