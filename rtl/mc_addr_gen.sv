// mc_addr_gen: memory address and write control of the Macro-Cell.
//
// Drives two identical 8-bit address sets, one per memory bank (as in the original design:
// the memories are split in two banks of six to halve the address load).
// Both are kept as separate registers, as two pin sets would be, and an
// assertion checks they never differ.
//
// Write mode (rw low): the RAM write strobe follows the R/W line, so each
// word slot (`slot`) writes the current word at the current address; the
// address then advances only if `keep` is set, otherwise the next word
// overwrites the slot. Going to read (rw low -> high) advances the address
// once more if the last written word was not already kept, so the word at
// the moment of the transition survives (as in the original design: address increment on
// R/W going from write to read). This leaves the address on the oldest
// location of the circular buffer. Read mode (rw high): writing is off and
// each `rd_step` pulse advances the address by one, so 256 steps walk the
// whole buffer, oldest word first, and end where they began. The read
// stepping is this design's choice; the original description does not cover it.
// rw is taken to be synchronous to clk.
module mc_addr_gen #(
  parameter int unsigned ADDR_BITS = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 slot,     // a valid word is presented this clock
  input  logic                 keep,     // keep the word presented this clock
  input  logic                 rw,       // 0: write, 1: read
  input  logic                 rd_step,  // read mode: next address
  output logic [ADDR_BITS-1:0] addr_a,
  output logic [ADDR_BITS-1:0] addr_b,
  output logic                 we,       // RAM write strobe
  output logic                 rw_rise   // clock at which read mode starts
);

  logic rw_q;
  logic unkept;     // last written word was not kept
  logic advance;

  assign we      = slot && !rw;
  assign rw_rise = rw && !rw_q;

  always_comb begin
    if (!rw)         advance = slot && keep;
    else if (rw_rise) advance = unkept;
    else             advance = rd_step;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rw_q   <= 1'b0;
      unkept <= 1'b0;
      addr_a <= '0;
      addr_b <= '0;
    end else begin
      rw_q <= rw;
      if (we)           unkept <= !keep;
      else if (rw_rise) unkept <= 1'b0;
      if (advance) begin
        addr_a <= addr_a + 1'b1;
        addr_b <= addr_b + 1'b1;
      end
    end
  end

  a_sets_equal: assert property (@(posedge clk) disable iff (!rst_n) addr_a == addr_b)
    else $error("address sets differ");

endmodule
