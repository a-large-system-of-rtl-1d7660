// td_board: one TD module, a double-width FastBus board with four channels.
//
// Four td_channel instances share the clock, the R/W line and the
// suppression switch. Toward the crate's auxiliary backplane the board
// answers when the 5-bit channel number on aux_sel falls in its slot
// (aux_sel / CH_PER_BOARD == SLOT): it then drives the selected channel's
// current word onto aux_data and raises aux_hit, and passes aux_step to that
// channel only. Otherwise aux_data is all zeros, so the backplane can OR the
// boards together. Four channels per board follows the original description; the
// backplane signalling is this design's choice, as the original description only names
// a "special bus".
module td_board
  import td_pkg::*;
#(
  parameter int unsigned CH_PER_BOARD = 4,
  parameter int unsigned SEL_BITS     = 5,   // channel number width in the crate
  parameter int unsigned SLOT         = 0,   // board position in the crate
  parameter sample_t     THRESH       = DEFAULT_THRESH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  adc_pair_t            adc_pair [CH_PER_BOARD],
  input  logic [FLAG_BITS-1:0] flags_in [CH_PER_BOARD],
  input  logic                 rw,
  input  logic                 en_supp_n,
  input  logic [SEL_BITS-1:0]  aux_sel,
  input  logic                 aux_step,
  output td_word_t             aux_data,
  output logic                 aux_hit,
  output logic [CH_PER_BOARD-1:0] kept     // per channel: word kept this clock
);

  localparam int unsigned LCH_BITS = (CH_PER_BOARD > 1) ? $clog2(CH_PER_BOARD) : 1;

  td_word_t            rd_data [CH_PER_BOARD];
  logic [LCH_BITS-1:0] local_ch;

  assign aux_hit  = (32'(aux_sel) / CH_PER_BOARD) == SLOT;
  assign local_ch = LCH_BITS'(32'(aux_sel) % CH_PER_BOARD);

  for (genvar c = 0; c < CH_PER_BOARD; c++) begin : g_ch
    td_channel #(.THRESH(THRESH)) u_ch (
      .clk, .rst_n,
      .adc_pair  (adc_pair[c]),
      .flags_in  (flags_in[c]),
      .rw        (rw),
      .en_supp_n (en_supp_n),
      .rd_step   (aux_step && aux_hit && (local_ch == LCH_BITS'(c))),
      .rd_data   (rd_data[c]),
      .addr      (),
      .kept      (kept[c]),
      .mem_we    (),
      .keep_why  ()
    );
  end

  assign aux_data = aux_hit ? rd_data[local_ch] : '0;

endmodule
