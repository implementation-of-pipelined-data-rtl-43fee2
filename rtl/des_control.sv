// des_control: the control unit that sequences one batch through the pipeline.
//
// It follows the flow chart of the design. LOAD: each time the input registers
// hold a complete block, the block is loaded into segment 0, every segment
// processes its block and passes it on, and the step counter is increased; the
// ring waits (stalls) between blocks until the host has written the next one.
// When SEGMENTS blocks have been loaded the pipeline is full. RUN: the ring
// advances every clock, the result of the last segment being reloaded into the
// first, until the counter reaches 16, when the first block has finished all
// rounds. CAPTURE: the finished block is moved into the output logic. WAIT_READ:
// the ring holds until the host has read it; then, if blocks remain, one more
// advance brings the next finished block to the output (counter 17, 18, 19 for
// four segments). After the last block the counter is cleared for a new batch.
//
// The mode (decrypt_req) is sampled with the first block of a batch and held
// until its end. Timing: one advance is one clock; with four segments and the
// host keeping up, a batch of four blocks takes 19 advances. The exact states and
// handshakes are this design's choice; the loading, counting, pipeline-full and
// finish decisions and the reload path are the document's.
// The assertion below is disabled during reset through rst_n, which lint reports
// as rst_n being used both asynchronously and synchronously; it is not logic.
module des_control #(
  parameter int unsigned SEGMENTS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_full,        // input registers hold a block
  input  logic       out_pop,        // host has read the output block
  input  logic       result_done,    // pipeline: word at the mux has finished
  input  logic       decrypt_req,    // mode requested by the host
  output logic       in_take,        // clear the input registers' full flag
  output logic       load,           // mux selects the new block
  output logic       advance,        // all segments step
  output logic       capture,        // output logic takes the result
  output logic       decrypt,        // mode of the current batch
  output logic       busy,           // a batch is in progress
  output logic [4:0] step_count      // advances so far in this batch
);

  localparam logic [4:0] LAST_ROUND = 5'd16;
  localparam int unsigned CW = $clog2(SEGMENTS + 1);

  typedef enum logic [1:0] {
    C_LOAD,
    C_RUN,
    C_CAPTURE,
    C_WAIT_READ
  } state_e;

  state_e          state;
  logic [CW-1:0]   loaded, emitted;
  logic [4:0]      step_next;

  assign step_next = step_count + 5'd1;

  always_comb begin
    in_take = 1'b0;
    load    = 1'b0;
    advance = 1'b0;
    capture = 1'b0;
    unique case (state)
      C_LOAD:      if (in_full) begin
                     in_take = 1'b1;
                     load    = 1'b1;
                     advance = 1'b1;
                   end
      C_RUN:       advance = 1'b1;
      C_CAPTURE:   capture = 1'b1;
      C_WAIT_READ: if (out_pop && emitted != CW'(SEGMENTS)) advance = 1'b1;
      default:     ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_LOAD;
      loaded     <= '0;
      emitted    <= '0;
      step_count <= '0;
      decrypt    <= 1'b0;
      busy       <= 1'b0;
    end else begin
      if (advance) step_count <= step_next;
      unique case (state)
        C_LOAD: if (in_full) begin
          loaded <= loaded + CW'(1);
          busy   <= 1'b1;
          if (loaded == '0) decrypt <= decrypt_req;
          if (step_next == LAST_ROUND)                state <= C_CAPTURE;
          else if (loaded + CW'(1) == CW'(SEGMENTS)) state <= C_RUN;
        end
        C_RUN: if (step_next == LAST_ROUND) state <= C_CAPTURE;
        C_CAPTURE: begin
          emitted <= emitted + CW'(1);
          state   <= C_WAIT_READ;
        end
        C_WAIT_READ: if (out_pop) begin
          if (emitted == CW'(SEGMENTS)) begin
            loaded     <= '0;
            emitted    <= '0;
            step_count <= '0;
            busy       <= 1'b0;
            state      <= C_LOAD;
          end else begin
            state <= C_CAPTURE;
          end
        end
        default: state <= C_LOAD;
      endcase
    end
  end

  // The counter and the pipeline's own round tags must agree.
  a_capture_done : assert property (@(posedge clk) disable iff (!rst_n)
    capture |-> result_done);

endmodule
