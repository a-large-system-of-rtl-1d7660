// td_pkg: types and constants shared by the transient digitizer design.
//
// One channel samples at 500 MS/s with 8 bits. The flash ADC hands over two
// samples per 250 MHz clock; the Macro-Cell turns them into 4-sample words at
// 125 MHz and writes them, with an 8-bit time tag and 8 flag bits, into a
// 256-word x 48-bit memory. These numbers follow the original description. The order of
// the fields inside the 48-bit word is this design's choice.
package td_pkg;

  localparam int unsigned SAMPLE_BITS = 8;   // ADC resolution
  localparam int unsigned ADDR_BITS   = 8;   // 256-deep ECL RAM
  localparam int unsigned TAG_BITS    = 8;   // TIMER width
  localparam int unsigned FLAG_BITS   = 8;   // flags that tell the 4 summed PMTs apart
  localparam int unsigned DAC_BITS    = 12;  // threshold DAC code
  localparam int unsigned WORD_BITS   = 4 * SAMPLE_BITS + TAG_BITS + FLAG_BITS; // 48

  // Default zero-suppression cut: a sample counts as signal when it is above 7.
  localparam logic [SAMPLE_BITS-1:0] DEFAULT_THRESH = 8'd7;

  typedef logic [SAMPLE_BITS-1:0] sample_t;

  // Two ADC samples per 250 MHz clock; s[0] is the earlier one in time.
  typedef sample_t [1:0] adc_pair_t;

  // One memory word. data[0] is the earliest of the four samples.
  typedef struct packed {
    logic [FLAG_BITS-1:0] flags;
    logic [TAG_BITS-1:0]  tag;
    sample_t [3:0]        data;
  } td_word_t;

endpackage
