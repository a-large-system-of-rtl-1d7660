// mc_zero_suppress: decides whether the word just written is kept.
//
// The Macro-Cell writes every word into the RAM but only moves the address
// on when the word is worth keeping; otherwise the next word overwrites it.
// Following the original description, a word is kept when
//   - one of its four samples is above the threshold (7 counts),
//   - the sample just before it or just after it in time is above the
//     threshold, so pulse edges are not cut off,
//   - its TIMER tag is the one at which the timer overflows, or
//   - suppression is switched off (EnableSuppression_n held high).
// The fifth condition of the original rules, the R/W line going to read, acts
// on the address directly and is handled in mc_addr_gen.
// Reading "previous or subsequent byte" as the single neighbouring sample on
// each side of the word is this design's interpretation. Purely
// combinational; `why` reports which conditions hold, for monitoring. Its
// top two bits are copies of the timer_ovf and en_supp_n inputs.
module mc_zero_suppress
  import td_pkg::*;
(
  input  sample_t [3:0] cur,          // the word under decision, [0] earliest
  input  sample_t       prev_sample,  // sample right before cur[0]
  input  sample_t       next_sample,  // sample right after cur[3]
  input  sample_t       thresh,       // cut, default 7
  input  logic          timer_ovf,    // cur carries the overflow tag
  input  logic          en_supp_n,    // high: keep every word
  output logic          keep,
  output logic [3:0]    why           // {forced, overflow, neighbour, signal}
);

  logic above;
  logic neighbour;

  always_comb begin
    above = 1'b0;
    for (int i = 0; i < 4; i++) above |= (cur[i] > thresh);
    neighbour = (prev_sample > thresh) || (next_sample > thresh);
    why  = {en_supp_n, timer_ovf, neighbour, above};
    keep = |why;
  end

endmodule
