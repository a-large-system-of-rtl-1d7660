// td_crate: one FastBus crate of transient digitizers.
//
// Eight TD boards of four channels (32 channels), the TDMASTER and the
// auxiliary backplane bus between them, as the original design organises a crate.
// All boards share the crate clock, the R/W line and the suppression
// switch. In write mode every channel records independently; when R/W goes
// high, ro_start makes the TDMASTER read all 32 x 256 words out through the
// crate readout port, one word per clock while ro_ready is high. The DAC
// levels of the 32 channels come out on dac_level. The crate controller,
// the clock fanout boards and the DACs themselves are outside this module.
module td_crate
  import td_pkg::*;
#(
  parameter int unsigned N_BOARDS     = 8,
  parameter int unsigned CH_PER_BOARD = 4,
  parameter sample_t     THRESH       = DEFAULT_THRESH,
  localparam int unsigned N_CH        = N_BOARDS * CH_PER_BOARD,
  localparam int unsigned SEL_BITS    = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  adc_pair_t            adc_pair [N_CH],
  input  logic [FLAG_BITS-1:0] flags_in [N_CH],
  input  logic                 rw,
  input  logic                 en_supp_n,
  input  logic                 dac_we,
  input  logic [SEL_BITS-1:0]  dac_sel,
  input  logic [DAC_BITS-1:0]  dac_code,
  output logic [DAC_BITS-1:0]  dac_level [N_CH],
  input  logic                 ro_start,
  output logic                 ro_busy,
  output logic                 ro_done,
  output logic                 ro_valid,
  input  logic                 ro_ready,
  output logic [SEL_BITS-1:0]  ro_chan,
  output logic [ADDR_BITS-1:0] ro_index,
  output td_word_t             ro_word,
  output logic                 ro_miss,
  output logic                 bus_err,
  output logic [N_CH-1:0]      kept
);

  logic [SEL_BITS-1:0] aux_sel;
  logic                aux_step;
  td_word_t            board_data [N_BOARDS];
  logic [N_BOARDS-1:0] board_hit;
  td_word_t            bus_data;
  logic                bus_hit;

  for (genvar b = 0; b < N_BOARDS; b++) begin : g_board
    adc_pair_t            b_adc   [CH_PER_BOARD];
    logic [FLAG_BITS-1:0] b_flags [CH_PER_BOARD];
    for (genvar c = 0; c < CH_PER_BOARD; c++) begin : g_map
      assign b_adc[c]   = adc_pair[b*CH_PER_BOARD + c];
      assign b_flags[c] = flags_in[b*CH_PER_BOARD + c];
    end
    td_board #(
      .CH_PER_BOARD (CH_PER_BOARD),
      .SEL_BITS     (SEL_BITS),
      .SLOT         (b),
      .THRESH       (THRESH)
    ) u_board (
      .clk, .rst_n,
      .adc_pair  (b_adc),
      .flags_in  (b_flags),
      .rw        (rw),
      .en_supp_n (en_supp_n),
      .aux_sel   (aux_sel),
      .aux_step  (aux_step),
      .aux_data  (board_data[b]),
      .aux_hit   (board_hit[b]),
      .kept      (kept[b*CH_PER_BOARD +: CH_PER_BOARD])
    );
  end

  aux_backplane #(.N_BOARDS(N_BOARDS)) u_bus (
    .board_data (board_data),
    .board_hit  (board_hit),
    .bus_data   (bus_data),
    .bus_hit    (bus_hit),
    .bus_err    (bus_err)
  );

  tdmaster #(.N_CH(N_CH), .SEL_BITS(SEL_BITS)) u_master (
    .clk, .rst_n,
    .dac_we, .dac_sel, .dac_code, .dac_level,
    .rw, .ro_start, .ro_busy, .ro_done,
    .aux_sel, .aux_step,
    .aux_data (bus_data),
    .aux_hit  (bus_hit),
    .ro_valid, .ro_ready, .ro_chan, .ro_index, .ro_word, .ro_miss
  );

endmodule
