// tb_td_channel: one channel from analog-like input to memory readout.
// A signal source and the flash ADC model feed the channel. Each round
// records for a while, switches to read mode and reads all 256 words,
// comparing each written location with the reference model; locations never
// written since reset are skipped. Round 0 has a -40 mV baseline shift with
// the DAC at its nominal level, so the baseline sits above the cut and every
// word is kept; later rounds correct the DAC and suppression works again,
// so the memory then spans much more than 2 us of time.
`timescale 1ns/1ps
module tb_td_channel;
  import td_pkg::*;
  import td_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  real v0 = 0.0, v1 = 0.0;
  logic [11:0] dac = 12'd2048;
  adc_pair_t adc_pair;
  logic [7:0] flags_in = '0;
  logic rw = 0, en_supp_n = 0, rd_step = 0;
  td_word_t rd_data;
  logic [7:0] addr;
  logic kept, mem_we;
  logic [3:0] keep_why;
  int checks = 0, failures = 0, compared = 0;
  int unsigned t = 0;
  ch_ref  ref_m;
  sig_gen src;

  flash_adc_model u_adc (.vin_early_mv(v0), .vin_late_mv(v1), .dac_level(dac), .pair(adc_pair));
  td_channel dut (.clk, .rst_n, .adc_pair, .flags_in, .rw, .en_supp_n, .rd_step,
                  .rd_data, .addr, .kept, .mem_we, .keep_why);

  always #2 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Called at a falling edge; returns at the next falling edge.
  task automatic cyc(bit do_rw, bit step);
    rw = do_rw; rd_step = step;
    v0 = src.sample(2 * t); v1 = src.sample(2 * t + 1); t++;
    flags_in = ($urandom % 16 == 0) ? 8'(1 << ($urandom % 8)) : 8'h00;
    #1;
    if (do_rw && step) begin
      if (ref_m.written[ref_m.addr]) begin
        checks++; compared++;
        if (rd_data !== ref_m.mem[ref_m.addr]) begin
          failures++;
          $display("read @%0d: %h expected %h", ref_m.addr, rd_data, ref_m.mem[ref_m.addr]);
        end
      end
    end
    @(posedge clk);
    ref_m.clock(adc_pair, flags_in, rw, en_supp_n, rd_step);
    @(negedge clk);
    checks++;
    if (addr !== 8'(ref_m.addr)) begin failures++; $display("addr %0d expected %0d", addr, ref_m.addr); end
  endtask

  initial begin
    int unsigned kept_before, written_before;
    ref_m = new(8'd7);
    src = new(-40.0, 300);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      if (round == 1) dac = 12'd2048 - 12'd160;   // 160 x 0.25 mV = 40 mV
      kept_before = ref_m.n_kept; written_before = ref_m.n_written;
      for (int i = 0; i < 3000; i++) cyc(0, 0);
      if (round == 0) begin
        checks++;
        if (ref_m.n_kept - kept_before != ref_m.n_written - written_before) begin
          failures++; $display("shifted baseline should keep every word");
        end
      end else begin
        checks++;
        if ((ref_m.n_kept - kept_before) * 2 > (ref_m.n_written - written_before)) begin
          failures++; $display("corrected baseline: %0d of %0d kept", ref_m.n_kept - kept_before,
                               ref_m.n_written - written_before);
        end
      end
      cyc(1, 0);
      for (int i = 0; i < 256; i++) cyc(1, 1);
      cyc(0, 0);
    end
    checks++;
    if (compared < 900) begin failures++; $display("only %0d words compared", compared); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
