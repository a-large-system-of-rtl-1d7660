// td_channel: one transient digitizer channel after the flash ADC.
//
// The Macro-Cell demultiplexes and zero-suppresses the 500 MS/s sample
// stream and writes 48-bit words (4 samples, tag, flags) into the channel's
// 256-word memory board; in read mode the same address counter is stepped
// by the readout. The split into Macro-Cell and memory follows the
// original channel block diagram; the flash ADC and its threshold DAC are
// analog parts outside this module.
//
// Interface: adc_pair is sampled on every clk (250 MHz). rd_data is the word
// at the current address, combinationally; a rd_step pulse in read mode moves
// to the next word on the following clock.
module td_channel
  import td_pkg::*;
#(
  parameter sample_t THRESH = DEFAULT_THRESH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  adc_pair_t            adc_pair,
  input  logic [FLAG_BITS-1:0] flags_in,
  input  logic                 rw,          // 0 write, 1 read
  input  logic                 en_supp_n,   // high: suppression off
  input  logic                 rd_step,
  output td_word_t             rd_data,
  output logic [ADDR_BITS-1:0] addr,        // current address (bank A)
  output logic                 kept,        // a word was written and kept this clock
  output logic                 mem_we,
  output logic [3:0]           keep_why
);

  td_word_t             mem_word;
  logic [ADDR_BITS-1:0] addr_a, addr_b;
  logic                 keep;

  macro_cell #(.THRESH(THRESH)) u_mc (
    .clk, .rst_n,
    .adc_pair  (adc_pair),
    .flags_in  (flags_in),
    .rw        (rw),
    .en_supp_n (en_supp_n),
    .rd_step   (rd_step),
    .mem_word  (mem_word),
    .mem_we    (mem_we),
    .addr_a    (addr_a),
    .addr_b    (addr_b),
    .keep      (keep),
    .keep_why  (keep_why),
    .rw_rise   ()
  );

  td_memory u_mem (
    .clk    (clk),
    .we     (mem_we),
    .addr_a (addr_a),
    .addr_b (addr_b),
    .wdata  (mem_word),
    .rdata  (rd_data)
  );

  assign addr = addr_a;
  assign kept = mem_we && keep;

endmodule
