// mc_demux: time demultiplexer at the input of the Macro-Cell.
//
// The flash ADC delivers two 8-bit samples per 250 MHz clock. This block
// collects two such pairs into one 4-sample word, so the word rate is half
// the input clock rate (125 MHz), slow enough for the external ECL RAM. That
// 2-to-4 byte conversion is what the original description gives; the register structure
// is this design's own.
//
// Timing: a toggling phase bit splits the input clocks into "first pair" and
// "second pair". One clock after the second pair is sampled, word_out holds
// {second pair, first pair} (sample 0 is the earliest) and word_stb is high
// for exactly one clock. word_stb is therefore the 125 MHz clock enable of
// everything downstream. The side-band flag bits are OR-ed over the two input
// clocks of a word and come out with it (this design's choice: the original description
// does not say how the flag bits are sampled).
module mc_demux
  import td_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  adc_pair_t            pair_in,   // two samples, [0] earlier
  input  logic [FLAG_BITS-1:0] flags_in,  // side-band flags, sampled every clock
  output sample_t [3:0]        word_out,  // four samples, [0] earliest
  output logic [FLAG_BITS-1:0] flags_out,
  output logic                 word_stb   // one clock per assembled word
);

  logic                 phase;       // 0: expecting first pair of a word
  adc_pair_t            first_pair;
  logic [FLAG_BITS-1:0] first_flags;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= 1'b0;
      first_pair  <= '0;
      first_flags <= '0;
      word_out    <= '0;
      flags_out   <= '0;
      word_stb    <= 1'b0;
    end else begin
      phase    <= ~phase;
      word_stb <= phase;
      if (!phase) begin
        first_pair  <= pair_in;
        first_flags <= flags_in;
      end else begin
        word_out  <= {pair_in, first_pair};
        flags_out <= flags_in | first_flags;
      end
    end
  end

endmodule
