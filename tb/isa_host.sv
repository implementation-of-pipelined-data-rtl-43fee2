// isa_host: behavioural model of a PC driving 16-bit I/O cycles on the ISA bus,
// used by the testbenches. Each cycle puts the address out with AEN low, asserts
// IOW# or IOR# for STROBE clocks and releases it, then idles for GAP clocks.
// A read samples the data lines just before IOR# rises.
module isa_host #(
  parameter logic [9:0] BASE_ADDR = 10'h300,
  parameter int unsigned STROBE   = 6,
  parameter int unsigned GAP      = 3
) (
  input  logic        clk,
  output logic [9:0]  sa,
  output logic        aen,
  output logic        iow_n,
  output logic        ior_n,
  output logic [15:0] sd,        // host to card
  input  logic [15:0] sd_card,   // card to host
  input  logic        sd_oe
);

  int unsigned cycles = 0;       // I/O cycles performed

  initial begin
    sa = '0; aen = 1'b1; iow_n = 1'b1; ior_n = 1'b1; sd = '0;
  end

  task automatic io_write(input logic [3:0] idx, input logic [15:0] data);
    @(negedge clk);
    sa = BASE_ADDR + {5'd0, idx, 1'b0}; aen = 1'b0; sd = data;
    @(negedge clk);
    iow_n = 1'b0;
    repeat (STROBE) @(negedge clk);
    iow_n = 1'b1;
    @(negedge clk);
    aen = 1'b1; sa = '0; sd = 16'($urandom());
    repeat (GAP) @(negedge clk);
    cycles++;
  endtask

  task automatic io_read(input logic [3:0] idx, output logic [15:0] data, output logic oe);
    @(negedge clk);
    sa = BASE_ADDR + {5'd0, idx, 1'b0}; aen = 1'b0;
    @(negedge clk);
    ior_n = 1'b0;
    repeat (STROBE) @(negedge clk);
    data = sd_card;
    oe   = sd_oe;
    ior_n = 1'b1;
    @(negedge clk);
    aen = 1'b1; sa = '0;
    repeat (GAP) @(negedge clk);
    cycles++;
  endtask

  // A cycle to an arbitrary 10-bit address, for decode tests.
  task automatic io_write_abs(input logic [9:0] addr, input logic [15:0] data);
    @(negedge clk);
    sa = addr; aen = 1'b0; sd = data;
    @(negedge clk);
    iow_n = 1'b0;
    repeat (STROBE) @(negedge clk);
    iow_n = 1'b1;
    @(negedge clk);
    aen = 1'b1; sa = '0;
    repeat (GAP) @(negedge clk);
    cycles++;
  endtask

endmodule
