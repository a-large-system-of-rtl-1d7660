// tb_td_system: the whole system at its default size, 6 crates x 32
// channels, through one complete operation.
//
// Every channel gets its own signal source. Some channels have a -40 mV
// baseline shift. The operation is:
//   1. record with all DAC levels at 2048: the shifted channels sit above
//      the cut and keep every word;
//   2. the crate controllers write corrected DAC levels (2048 - 160 for
//      the shifted channels) and recording goes on; for a stretch the last
//      crate runs with suppression switched off;
//   3. R/W goes high in every crate and each TDMASTER reads its 32 x 256
//      words, crate 0 at full speed and the others under random back-pressure.
// Every word read from a location written since reset is compared with a
// reference model of its channel. The testbench counts how often each
// mechanism happened (each keep reason, dropped words, buffer wrap-around,
// DAC correction, back-pressure) and fails if one never did. Crate 0's
// readout time is checked: one word per 4 ns clock, 8192 words.
`timescale 1ns/1ps
module tb_td_system;
  import td_pkg::*;
  import td_tb_pkg::*;
  localparam int NK  = 6;
  localparam int NCH = 32;
  logic clk = 0, rst_n = 0;
  adc_pair_t            adc_pair  [NK][NCH];
  logic [FLAG_BITS-1:0] flags_in  [NK][NCH];
  logic [NK-1:0]        rw = '0, en_supp_n = '0, dac_we = '0, ro_start = '0, ro_ready = '0;
  logic [4:0]           dac_sel   [NK];
  logic [DAC_BITS-1:0]  dac_code  [NK];
  logic [DAC_BITS-1:0]  dac_level [NK][NCH];
  logic [NK-1:0]        ro_busy, ro_done, ro_valid, ro_miss, bus_err;
  logic [4:0]           ro_chan   [NK];
  logic [7:0]           ro_index  [NK];
  td_word_t             ro_word   [NK];
  logic [NCH-1:0]       kept      [NK];

  td_system dut (.*);

  int checks = 0, failures = 0, compared = 0;
  int unsigned t = 0;
  ch_ref  refs [NK][NCH];
  sig_gen srcs [NK][NCH];
  bit     shifted [NK][NCH];
  int unsigned start_addr [NK][NCH];
  int     got [NK];
  int     ro_clocks [NK];
  bit     done_seen [NK];
  // mechanism counters
  int n_signal, n_neighbour, n_ovf, n_forced, n_rwkeep, n_dropped, n_wrapped;
  int n_dac_writes, n_stalls, n_all_kept_shifted, n_kept_dut, n_kept_ref;

  always #2 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive the analog side for one clock
  task automatic drive_inputs();
    for (int k = 0; k < NK; k++)
      for (int c = 0; c < NCH; c++) begin
        adc_pair[k][c][0] = adc_code(srcs[k][c].sample(2 * t), dac_level[k][c]);
        adc_pair[k][c][1] = adc_code(srcs[k][c].sample(2 * t + 1), dac_level[k][c]);
        flags_in[k][c] = ($urandom % 32 == 0) ? 8'(1 << ($urandom % 8)) : 8'h00;
      end
    t++;
  endtask

  // one recording clock; refs follow the edge
  task automatic rec_cyc();
    drive_inputs();
    #1;
    @(posedge clk);
    for (int k = 0; k < NK; k++)
      for (int c = 0; c < NCH; c++) begin
        if (kept[k][c]) n_kept_dut++;
        refs[k][c].clock(adc_pair[k][c], flags_in[k][c], rw[k], en_supp_n[k], 1'b0);
      end
    @(negedge clk);
  endtask

  initial begin
    int unsigned kept0 [NK][NCH];
    int unsigned wr0 [NK][NCH];
    for (int k = 0; k < NK; k++) begin
      dac_sel[k] = '0; dac_code[k] = '0;
      for (int c = 0; c < NCH; c++) begin
        shifted[k][c] = (c % 5 == 2);
        refs[k][c] = new(8'd7);
        srcs[k][c] = new(shifted[k][c] ? -40.0 : 0.0, 200 + 13 * c + 7 * k);
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. DAC levels to nominal, then record with the shift uncorrected
    for (int c = 0; c < NCH; c++) begin
      for (int k = 0; k < NK; k++) begin dac_we[k] = 1; dac_sel[k] = 5'(c); dac_code[k] = 12'd2048; end
      rec_cyc();
    end
    dac_we = '0;
    for (int k = 0; k < NK; k++)
      for (int c = 0; c < NCH; c++) begin kept0[k][c] = refs[k][c].n_kept; wr0[k][c] = refs[k][c].n_written; end
    for (int i = 0; i < 600; i++) rec_cyc();
    for (int k = 0; k < NK; k++)
      for (int c = 0; c < NCH; c++)
        if (shifted[k][c]) begin
          checks++;
          if (refs[k][c].n_kept - kept0[k][c] == refs[k][c].n_written - wr0[k][c]) n_all_kept_shifted++;
          else begin failures++; $display("crate %0d ch %0d: shifted baseline not kept throughout", k, c); end
        end

    // 2. corrected DAC levels through the TDMASTERs, then record on
    for (int c = 0; c < NCH; c++) begin
      for (int k = 0; k < NK; k++) begin
        dac_we[k] = 1; dac_sel[k] = 5'(c); dac_code[k] = shifted[k][c] ? 12'd1888 : 12'd2048;
      end
      n_dac_writes++;
      rec_cyc();
    end
    dac_we = '0;
    for (int i = 0; i < 1000; i++) rec_cyc();
    en_supp_n[NK-1] = 1'b1;
    for (int i = 0; i < 800; i++) rec_cyc();
    en_supp_n[NK-1] = 1'b0;
    for (int i = 0; i < 1200; i++) rec_cyc();

    // 3. read mode everywhere; one recording edge so the refs see the rise
    rw = '1;
    rec_cyc();
    for (int k = 0; k < NK; k++)
      for (int c = 0; c < NCH; c++) start_addr[k][c] = refs[k][c].addr;
    ro_start = '1;
    @(negedge clk);
    ro_start = '0;
    forever begin
      bit all_done;
      for (int k = 0; k < NK; k++) ro_ready[k] = (k == 0) ? 1'b1 : (($urandom % 100) < 70);
      @(posedge clk);
      all_done = 1;
      for (int k = 0; k < NK; k++) begin
        if (!(done_seen[k] && !ro_valid[k])) ro_clocks[k]++;
        if (ro_done[k]) done_seen[k] = 1;
        if (ro_valid[k] && !ro_ready[k]) n_stalls++;
        if (ro_valid[k] && ro_ready[k]) begin
          int c, i;
          int unsigned a;
          c = ro_chan[k]; i = ro_index[k];
          a = (start_addr[k][c] + i) % 256;
          checks++;
          if (c != got[k] / 256 || i != got[k] % 256) begin
            failures++; $display("crate %0d: word %0d came as ch %0d idx %0d", k, got[k], c, i);
          end
          if (refs[k][c].written[a]) begin
            checks++; compared++;
            if (ro_word[k] !== refs[k][c].mem[a]) begin
              failures++;
              $display("crate %0d ch %0d idx %0d: %h expected %h", k, c, i, ro_word[k], refs[k][c].mem[a]);
            end
          end
          got[k]++;
        end
        if (ro_miss[k] || bus_err[k]) begin failures++; $display("crate %0d bus fault", k); end
        if (!(done_seen[k] && !ro_valid[k])) all_done = 0;
      end
      @(negedge clk);
      if (all_done) break;
    end

    // totals and mechanism counts
    for (int k = 0; k < NK; k++) begin
      checks++;
      if (got[k] != NCH * 256) begin failures++; $display("crate %0d delivered %0d words", k, got[k]); end
      for (int c = 0; c < NCH; c++) begin
        n_signal    += refs[k][c].n_signal;
        n_neighbour += refs[k][c].n_neighbour;
        n_ovf       += refs[k][c].n_ovf;
        n_forced    += refs[k][c].n_forced;
        n_rwkeep    += refs[k][c].n_rwkeep;
        n_dropped   += refs[k][c].n_overwritten;
        n_kept_ref  += refs[k][c].n_kept;
        if (refs[k][c].n_kept > 256) n_wrapped++;
      end
    end
    checks++;
    if (n_kept_dut != n_kept_ref) begin failures++; $display("kept words: %0d, model %0d", n_kept_dut, n_kept_ref); end
    checks++;
    // crate 0 at full speed: 8192 words, one per clock, plus the start clock
    if (ro_clocks[0] != NCH * 256 + 1) begin failures++; $display("crate 0 readout took %0d clocks", ro_clocks[0]); end
    $display("readout of a crate at full speed: %0d clocks = %0d ns", ro_clocks[0], ro_clocks[0] * 4);
    $display("kept for signal %0d, neighbour %0d, timer overflow %0d, suppression off %0d, R/W %0d; dropped %0d",
             n_signal, n_neighbour, n_ovf, n_forced, n_rwkeep, n_dropped);
    $display("channels wrapped %0d, shifted channels all-kept %0d, DAC write rounds %0d, stalls %0d, words compared %0d",
             n_wrapped, n_all_kept_shifted, n_dac_writes, n_stalls, compared);
    begin
      int m [10];
      m = '{n_signal, n_neighbour, n_ovf, n_forced, n_rwkeep, n_dropped, n_wrapped,
            n_all_kept_shifted, n_dac_writes, n_stalls};
      for (int j = 0; j < 10; j++) begin
        checks++;
        if (m[j] == 0) begin failures++; $display("mechanism %0d never happened", j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
