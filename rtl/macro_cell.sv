// macro_cell: the BNL787TD data handler ("Macro-Cell") of one channel.
//
// It sits between the flash ADC (two 8-bit samples per 250 MHz clock) and
// the external 256-word ECL RAM, and does zero suppression before anything
// is written. Inside, following the original design's description:
//   mc_demux          2 samples at 250 MHz -> 4-sample word at 125 MHz
//   mc_timer          8-bit TIMER at 125 MHz, tags every word
//   mc_zero_suppress  keep/overwrite decision
//   mc_addr_gen       two identical 8-bit address sets and the write strobe
// To know the sample that follows a word, the word is held for one word
// period: the word written on a slot is the one assembled one slot earlier,
// and the first sample of the newly assembled word is its "next" neighbour.
// This one-word delay is this design's way of providing the look-ahead the
// keep rule needs.
//
// Timing: input to RAM write takes about two word periods (4 clocks of the
// 250 MHz clock). mem_we is high for one clock per word slot in write mode;
// the RAM captures mem_word at addr_a/addr_b on that clock edge, and the
// address moves on at the same edge when the word is kept. Flag bits travel
// through the same pipeline as the samples (this design's choice).
module macro_cell
  import td_pkg::*;
#(
  parameter sample_t THRESH = DEFAULT_THRESH   // zero-suppression cut
) (
  input  logic                 clk,         // 250 MHz sample-pair clock
  input  logic                 rst_n,
  input  adc_pair_t            adc_pair,    // from the flash ADC
  input  logic [FLAG_BITS-1:0] flags_in,    // flag bits to store with the word
  input  logic                 rw,          // R/W line: 0 write, 1 read
  input  logic                 en_supp_n,   // high: suppression off
  input  logic                 rd_step,     // read mode: advance address
  output td_word_t             mem_word,    // word to the RAM
  output logic                 mem_we,      // RAM write strobe
  output logic [ADDR_BITS-1:0] addr_a,      // bank A address
  output logic [ADDR_BITS-1:0] addr_b,      // bank B address
  output logic                 keep,        // current slot's word is kept
  output logic [3:0]           keep_why,    // {forced, overflow, neighbour, signal}
  output logic                 rw_rise      // read mode starts this clock
);

  sample_t [3:0]        new_word;
  logic [FLAG_BITS-1:0] new_flags;
  logic                 word_stb;
  logic [TAG_BITS-1:0]  new_tag;
  logic                 new_term;

  mc_demux u_demux (
    .clk, .rst_n,
    .pair_in  (adc_pair),
    .flags_in (flags_in),
    .word_out (new_word),
    .flags_out(new_flags),
    .word_stb (word_stb)
  );

  mc_timer #(.WIDTH(TAG_BITS)) u_timer (
    .clk, .rst_n,
    .ce       (word_stb),
    .tag      (new_tag),
    .terminal (new_term)
  );

  // One-word hold stage: cur is the word being decided on.
  td_word_t cur;
  logic     cur_term;
  logic     cur_valid;
  sample_t  prev_sample;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur         <= '0;
      cur_term    <= 1'b0;
      cur_valid   <= 1'b0;
      prev_sample <= '0;
    end else if (word_stb) begin
      prev_sample <= cur.data[3];
      cur.data    <= new_word;
      cur.tag     <= new_tag;
      cur.flags   <= new_flags;
      cur_term    <= new_term;
      cur_valid   <= 1'b1;
    end
  end

  mc_zero_suppress u_zs (
    .cur         (cur.data),
    .prev_sample (prev_sample),
    .next_sample (new_word[0]),
    .thresh      (THRESH),
    .timer_ovf   (cur_term),
    .en_supp_n   (en_supp_n),
    .keep        (keep),
    .why         (keep_why)
  );

  mc_addr_gen #(.ADDR_BITS(ADDR_BITS)) u_addr (
    .clk, .rst_n,
    .slot    (word_stb && cur_valid),
    .keep    (keep),
    .rw      (rw),
    .rd_step (rd_step),
    .addr_a  (addr_a),
    .addr_b  (addr_b),
    .we      (mem_we),
    .rw_rise (rw_rise)
  );

  assign mem_word = cur;

endmodule
