// tb_des_feedback_mux: checks that a new block enters with round 0 and valid
// set, and that otherwise the fed-back word passes unchanged.
module tb_des_feedback_mux;
  import des_pkg::*;
  import des_ref_pkg::*;

  int checks = 0, failures = 0;
  logic       sel_new;
  des_state_t new_st;
  pipe_word_t fb, dout, exp;

  des_feedback_mux dut (.sel_new(sel_new), .new_st(new_st), .fb(fb), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      sel_new = 1'($urandom());
      new_st  = rand64();
      fb      = {1'($urandom()), 5'($urandom()), rand64()};
      #1;
      exp = sel_new ? {1'b1, 5'd0, new_st} : fb;
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("FAIL sel_new=%b got %h expected %h", sel_new, dout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
