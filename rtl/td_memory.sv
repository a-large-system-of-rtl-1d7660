// td_memory: the external memory board of one channel.
//
// Twelve 256 x 4 RAMs hold one 48-bit word per address: 32 bits of samples,
// the 8-bit TIMER tag and 8 flag bits, as in the original description. The RAMs are
// split into two banks of six, each driven by its own copy of the address
// from the Macro-Cell, again as in the original description. Which bits go to which
// bank is this design's choice: bank A (addr_a) holds samples 0..2,
// bank B (addr_b) holds sample 3, the tag and the flags.
// Writes happen on the clock edge with we high; reads are combinational.
module td_memory
  import td_pkg::*;
(
  input  logic                 clk,
  input  logic                 we,
  input  logic [ADDR_BITS-1:0] addr_a,
  input  logic [ADDR_BITS-1:0] addr_b,
  input  td_word_t             wdata,
  output td_word_t             rdata
);

  localparam int unsigned CHIPS_PER_BANK = 6;

  logic [WORD_BITS-1:0] wbits, rbits;
  assign wbits = wdata;
  assign rdata = rbits;

  for (genvar c = 0; c < 2 * CHIPS_PER_BANK; c++) begin : g_chip
    ecl_ram_256x4 #(.ADDR_BITS(ADDR_BITS), .WIDTH(4)) u_ram (
      .clk  (clk),
      .we   (we),
      .addr (c < CHIPS_PER_BANK ? addr_a : addr_b),
      .din  (wbits[4*c +: 4]),
      .dout (rbits[4*c +: 4])
    );
  end

endmodule
