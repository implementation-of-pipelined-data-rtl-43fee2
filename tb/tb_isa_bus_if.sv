// tb_isa_bus_if: runs ISA write and read cycles against the bus interface.
// Every write inside the window must give exactly one wr_stb with the right
// register index and data; writes outside the window (other base, or AEN high
// during DMA) none. Reads must enable the data driver only while IOR# is low and
// the window is selected, show the addressed register, and end with one rd_done.
module tb_isa_bus_if;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic [9:0]  sa;
  logic        aen, iow_n, ior_n, sd_oe, iocs16_n;
  logic [15:0] sd_host, sd_card;
  logic        wr_stb, rd_done;
  logic [3:0]  wr_idx, rd_idx, rd_done_idx;
  logic [15:0] wr_data, rd_data;

  isa_bus_if #(.BASE_ADDR(10'h300)) dut (
    .clk, .rst_n,
    .isa_sa(sa), .isa_aen(aen), .isa_iow_n(iow_n), .isa_ior_n(ior_n), .isa_sd_in(sd_host),
    .isa_sd_out(sd_card), .isa_sd_oe(sd_oe), .isa_iocs16_n(iocs16_n),
    .wr_stb, .wr_idx, .wr_data, .rd_idx, .rd_data, .rd_done, .rd_done_idx);

  isa_host #(.BASE_ADDR(10'h300)) host (
    .clk, .sa, .aen, .iow_n, .ior_n, .sd(sd_host), .sd_card, .sd_oe);

  // Register side: register i reads as a pattern of i.
  assign rd_data = {4{rd_idx}} ^ 16'hA5C3;

  always #5 clk = ~clk;

  int          n_wr = 0, n_rd = 0;
  logic [3:0]  last_wr_idx, last_rd_idx;
  logic [15:0] last_wr_data;
  int          oe_early = 0;

  always @(posedge clk) begin
    if (wr_stb) begin
      n_wr++;
      last_wr_idx  <= wr_idx;
      last_wr_data <= wr_data;
    end
    if (rd_done) begin
      n_rd++;
      last_rd_idx <= rd_done_idx;
    end
    if (sd_oe && ior_n) oe_early++;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, e);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d, got;
    logic        oe;
    int          w0, r0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      logic [3:0] idx;
      idx = 4'($urandom());
      d   = 16'($urandom());
      w0 = n_wr;
      host.io_write(idx, d);
      check(n_wr - w0, 1, "one strobe per write");
      check(last_wr_idx, idx, "write index");
      check(last_wr_data, d, "write data");
      r0 = n_rd;
      host.io_read(idx, got, oe);
      check(oe, 1, "driver enabled during read");
      check(got, {4{idx}} ^ 16'hA5C3, "read data");
      check(n_rd - r0, 1, "one rd_done per read");
      check(last_rd_idx, idx, "rd_done index");
    end
    // Outside the window, and inside it but with AEN high: ignored.
    w0 = n_wr;
    host.io_write_abs(10'h320, 16'h1111);
    host.io_write_abs(10'h2F0, 16'h2222);
    check(n_wr - w0, 0, "foreign addresses ignored");
    @(negedge clk);
    sa = 10'h302; aen = 1'b1;
    #1 check(iocs16_n, 1, "IOCS16# idle while AEN high");
    aen = 1'b0;
    #1 check(iocs16_n, 0, "IOCS16# asserted in window");
    aen = 1'b1;
    check(oe_early, 0, "driver never enabled without IOR#");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
