// isa_bus_if: 16-bit I/O slave on the PC ISA bus, the card's input logic.
//
// The card decodes a 32-byte I/O window at BASE_ADDR (SA[9:5] match, AEN low),
// i.e. sixteen 16-bit registers at even addresses; SA[4:1] selects the register.
// IOCS16# is pulled low for the whole window so the host makes 16-bit transfers;
// SA0 is therefore not decoded and lint reports it unused.
//
// Writes: IOW#, SA and SD are brought into the clock domain through two flip-flop
// stages. When the synchronised IOW# rises (end of the write cycle), one wr_stb
// pulse is issued with the address and data sampled one clock earlier, while IOW#
// was still low. Data must therefore be stable for at least three clocks before
// IOW# rises, which a standard ISA cycle gives for clocks above about 25 MHz.
// Reads: the data driver is enabled straight from the pins (window selected and
// IOR# low) and shows rd_data for the register at SA[4:1], without a clock. At
// the synchronised rising edge of IOR# one rd_done pulse reports which register
// was read, so that reading can have side effects.
// Only the existence of a 16-bit input logic on the ISA bus comes from the
// document; the window, strobe timing and IOCS16# handling are this design's.
module isa_bus_if #(
  parameter logic [9:0] BASE_ADDR = 10'h300    // I/O base, 32-byte aligned
) (
  input  logic        clk,
  input  logic        rst_n,
  // ISA bus pins (tri-state data split into in, out and enable)
  input  logic [9:0]  isa_sa,
  input  logic        isa_aen,
  input  logic        isa_iow_n,
  input  logic        isa_ior_n,
  input  logic [15:0] isa_sd_in,
  output logic [15:0] isa_sd_out,
  output logic        isa_sd_oe,
  output logic        isa_iocs16_n,
  // register side
  output logic        wr_stb,
  output logic [3:0]  wr_idx,
  output logic [15:0] wr_data,
  output logic [3:0]  rd_idx,      // register addressed by the pins now
  input  logic [15:0] rd_data,     // its contents
  output logic        rd_done,     // a read cycle of this window ended
  output logic [3:0]  rd_done_idx
);

  logic sel_pin;

  always_comb begin
    sel_pin      = !isa_aen && (isa_sa[9:5] == BASE_ADDR[9:5]);
    isa_iocs16_n = !sel_pin;
    isa_sd_oe    = sel_pin && !isa_ior_n;
    rd_idx       = isa_sa[4:1];
    isa_sd_out   = rd_data;
  end

  // Two synchroniser stages and one history stage for strobes, address and data.
  logic [2:0] iow_s, ior_s;
  logic [2:0] sel_s;
  logic [3:0] idx_s [3];
  logic [15:0] sd_s [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iow_s <= '1;
      ior_s <= '1;
      sel_s <= '0;
      for (int i = 0; i < 3; i++) begin
        idx_s[i] <= '0;
        sd_s[i]  <= '0;
      end
    end else begin
      iow_s <= {iow_s[1:0], isa_iow_n};
      ior_s <= {ior_s[1:0], isa_ior_n};
      sel_s <= {sel_s[1:0], sel_pin};
      idx_s[0] <= isa_sa[4:1];
      sd_s[0]  <= isa_sd_in;
      for (int i = 1; i < 3; i++) begin
        idx_s[i] <= idx_s[i-1];
        sd_s[i]  <= sd_s[i-1];
      end
    end
  end

  // Stage 1 is synchronised, stage 2 is one clock older.
  always_comb begin
    wr_stb      = iow_s[1] && !iow_s[2] && sel_s[2];
    wr_idx      = idx_s[2];
    wr_data     = sd_s[2];
    rd_done     = ior_s[1] && !ior_s[2] && sel_s[2];
    rd_done_idx = idx_s[2];
  end

endmodule
