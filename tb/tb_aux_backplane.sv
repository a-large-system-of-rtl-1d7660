// tb_aux_backplane: random board outputs (zero unless the board answers),
// checks the bus carries the answering board's word and flags collisions.
`timescale 1ns/1ps
module tb_aux_backplane;
  import td_pkg::*;
  localparam int NB = 8;
  td_word_t board_data [NB];
  logic [NB-1:0] board_hit;
  td_word_t bus_data;
  logic bus_hit, bus_err;
  int checks = 0, failures = 0, collisions = 0;

  aux_backplane #(.N_BOARDS(NB)) dut (.board_data, .board_hit, .bus_data, .bus_hit, .bus_err);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      td_word_t exp_d;
      int n;
      exp_d = '0; n = 0;
      board_hit = '0;
      case ($urandom % 4)
        0: ;                                         // nobody answers
        1: board_hit = NB'(1) << ($urandom % NB);   // collision-free
        2: board_hit = NB'(1) << ($urandom % NB);
        3: board_hit = NB'($urandom);               // maybe several
      endcase
      for (int b = 0; b < NB; b++) begin
        board_data[b] = board_hit[b] ? td_word_t'({16'($urandom), 32'($urandom)}) : '0;
        exp_d |= board_data[b];
        n += board_hit[b];
      end
      #1;
      checks++;
      if (bus_data !== exp_d || bus_hit !== (n > 0) || bus_err !== (n > 1)) begin
        failures++; $display("bus wrong for hits %b", board_hit);
      end
      if (n > 1) collisions++;
    end
    checks++;
    if (collisions == 0) begin failures++; $display("no collision tried"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
