// td_system: the complete transient digitizer system.
//
// Six FastBus crates of 32 channels each, 192 channels of 500 MS/s, 8-bit
// waveform recording with zero suppression before the memory, side by side.
// Each crate has its own R/W line, suppression switch, DAC-level write port
// and readout port toward its crate controller; the crates share only the
// clock and reset. The crate count and crate size follow the original design's
// description of the system organisation.
//
// Ports are arrays indexed [crate][channel]. adc_pair carries the two
// samples per 250 MHz clock of each channel's flash ADC; dac_level is the
// 12-bit level for each channel's threshold DAC.
module td_system
  import td_pkg::*;
#(
  parameter int unsigned N_CRATES     = 6,
  parameter int unsigned N_BOARDS     = 8,
  parameter int unsigned CH_PER_BOARD = 4,
  parameter sample_t     THRESH       = DEFAULT_THRESH,
  localparam int unsigned N_CH        = N_BOARDS * CH_PER_BOARD,
  localparam int unsigned SEL_BITS    = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  adc_pair_t            adc_pair  [N_CRATES][N_CH],
  input  logic [FLAG_BITS-1:0] flags_in  [N_CRATES][N_CH],
  input  logic [N_CRATES-1:0]  rw,
  input  logic [N_CRATES-1:0]  en_supp_n,
  input  logic [N_CRATES-1:0]  dac_we,
  input  logic [SEL_BITS-1:0]  dac_sel   [N_CRATES],
  input  logic [DAC_BITS-1:0]  dac_code  [N_CRATES],
  output logic [DAC_BITS-1:0]  dac_level [N_CRATES][N_CH],
  input  logic [N_CRATES-1:0]  ro_start,
  output logic [N_CRATES-1:0]  ro_busy,
  output logic [N_CRATES-1:0]  ro_done,
  output logic [N_CRATES-1:0]  ro_valid,
  input  logic [N_CRATES-1:0]  ro_ready,
  output logic [SEL_BITS-1:0]  ro_chan   [N_CRATES],
  output logic [ADDR_BITS-1:0] ro_index  [N_CRATES],
  output td_word_t             ro_word   [N_CRATES],
  output logic [N_CRATES-1:0]  ro_miss,
  output logic [N_CRATES-1:0]  bus_err,
  output logic [N_CH-1:0]      kept      [N_CRATES]
);

  for (genvar k = 0; k < N_CRATES; k++) begin : g_crate
    td_crate #(
      .N_BOARDS     (N_BOARDS),
      .CH_PER_BOARD (CH_PER_BOARD),
      .THRESH       (THRESH)
    ) u_crate (
      .clk, .rst_n,
      .adc_pair  (adc_pair[k]),
      .flags_in  (flags_in[k]),
      .rw        (rw[k]),
      .en_supp_n (en_supp_n[k]),
      .dac_we    (dac_we[k]),
      .dac_sel   (dac_sel[k]),
      .dac_code  (dac_code[k]),
      .dac_level (dac_level[k]),
      .ro_start  (ro_start[k]),
      .ro_busy   (ro_busy[k]),
      .ro_done   (ro_done[k]),
      .ro_valid  (ro_valid[k]),
      .ro_ready  (ro_ready[k]),
      .ro_chan   (ro_chan[k]),
      .ro_index  (ro_index[k]),
      .ro_word   (ro_word[k]),
      .ro_miss   (ro_miss[k]),
      .bus_err   (bus_err[k]),
      .kept      (kept[k])
    );
  end

endmodule
