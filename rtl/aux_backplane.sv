// aux_backplane: the special readout bus on the crate's auxiliary backplane.
//
// Every TD board drives its selected word or all zeros; the bus is the OR of
// all boards, standing in for a wired bus line. bus_hit says some board
// answered the channel number, and bus_err that more than one did, which
// would corrupt the data. The original description only names this bus; its structure is
// this design's choice. Purely combinational.
module aux_backplane
  import td_pkg::*;
#(
  parameter int unsigned N_BOARDS = 8
) (
  input  td_word_t            board_data [N_BOARDS],
  input  logic [N_BOARDS-1:0] board_hit,
  output td_word_t            bus_data,
  output logic                bus_hit,
  output logic                bus_err
);

  always_comb begin
    bus_data = '0;
    for (int b = 0; b < N_BOARDS; b++) bus_data |= board_data[b];
    bus_hit = |board_hit;
    bus_err = (board_hit & (board_hit - 1'b1)) != '0;   // two or more set
  end

endmodule
