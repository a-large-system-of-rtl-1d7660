// tb_td_board: a board in slot 3 with four channels fed by independent
// signal sources. After recording, it reads each channel through the
// auxiliary-bus port (channel numbers 12..15) and compares with one
// reference model per channel. It also checks that the board stays silent,
// with zero data, for channel numbers of other slots, and that a step for
// another slot moves none of its channels.
`timescale 1ns/1ps
module tb_td_board;
  import td_pkg::*;
  import td_tb_pkg::*;
  localparam int NC = 4, SLOT = 3;
  logic clk = 0, rst_n = 0;
  adc_pair_t adc_pair [NC];
  logic [7:0] flags_in [NC];
  logic rw = 0, en_supp_n = 0;
  logic [4:0] aux_sel = '0;
  logic aux_step = 0;
  td_word_t aux_data;
  logic aux_hit;
  logic [NC-1:0] kept;
  int checks = 0, failures = 0, compared = 0;
  int unsigned t = 0;
  ch_ref  refs [NC];
  sig_gen srcs [NC];

  td_board #(.CH_PER_BOARD(NC), .SEL_BITS(5), .SLOT(SLOT)) dut (
    .clk, .rst_n, .adc_pair, .flags_in, .rw, .en_supp_n, .aux_sel, .aux_step,
    .aux_data, .aux_hit, .kept);

  always #2 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cyc(bit do_rw, int sel, bit step);
    bit mine;
    rw = do_rw; aux_sel = 5'(sel); aux_step = step;
    mine = (sel / NC) == SLOT;
    for (int c = 0; c < NC; c++) begin
      adc_pair[c][0] = adc_code(srcs[c].sample(2 * t), 12'd2048);
      adc_pair[c][1] = adc_code(srcs[c].sample(2 * t + 1), 12'd2048);
      flags_in[c] = 8'(c + 1);
    end
    t++;
    #1;
    checks++;
    if (aux_hit !== mine || (!mine && aux_data !== '0)) begin
      failures++; $display("board answered wrongly for channel %0d", sel);
    end
    if (mine && do_rw && refs[sel % NC].written[refs[sel % NC].addr]) begin
      checks++; compared++;
      if (aux_data !== refs[sel % NC].mem[refs[sel % NC].addr]) begin
        failures++; $display("ch %0d word @%0d wrong", sel % NC, refs[sel % NC].addr);
      end
    end
    @(posedge clk);
    for (int c = 0; c < NC; c++)
      refs[c].clock(adc_pair[c], flags_in[c], rw, en_supp_n, step && mine && (sel % NC == c));
    @(negedge clk);
  endtask

  initial begin
    for (int c = 0; c < NC; c++) begin refs[c] = new(8'd7); srcs[c] = new(0.0, 150 + 100 * c); end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      for (int i = 0; i < 2500; i++) cyc(0, 0, 0);
      cyc(1, 0, 0);
      // a foreign slot first: must not move anything
      for (int i = 0; i < 10; i++) cyc(1, 5, 1);
      for (int c = 0; c < NC; c++)
        for (int i = 0; i < 256; i++) cyc(1, SLOT * NC + c, 1);
      cyc(0, 0, 0);
    end
    checks++;
    if (compared < 1000) begin failures++; $display("only %0d words compared", compared); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
