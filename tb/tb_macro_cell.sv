// tb_macro_cell: drives a sample stream of quiet baseline, short pulses and
// a long quiet stretch (so the TIMER overflow rule shows), and checks every
// RAM write (data, tag, flags, address) against the channel reference model.
// Then it switches to read mode and checks the address steps, including the
// extra advance when the last written word was not kept. A second pass runs
// with suppression switched off. Also checks the word rate: one write per
// two clocks.
`timescale 1ns/1ps
module tb_macro_cell;
  import td_pkg::*;
  import td_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  adc_pair_t adc_pair = '0;
  logic [7:0] flags_in = '0;
  logic rw = 0, en_supp_n = 0, rd_step = 0;
  td_word_t mem_word;
  logic mem_we, keep, rw_rise;
  logic [7:0] addr_a, addr_b;
  logic [3:0] keep_why;
  int checks = 0, failures = 0, writes = 0, clocks_w = 0;
  int why_seen [4];
  ch_ref ref_m;
  logic we_pre;
  td_word_t word_pre;
  logic [7:0] addr_pre;
  logic [3:0] why_pre;

  macro_cell dut (.clk, .rst_n, .adc_pair, .flags_in, .rw, .en_supp_n, .rd_step,
                  .mem_word, .mem_we, .addr_a, .addr_b, .keep, .keep_why, .rw_rise);

  always #2 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample generator: sparse pulses on a low baseline
  int unsigned t = 0;
  int unsigned pulse_at = 40;
  function automatic sample_t gen(int unsigned ts);
    int d;
    d = int'(ts) - int'(pulse_at);
    if (d >= 0 && d < 12) return 8'(20 + 10 * (d < 6 ? d : 11 - d));
    return 8'($urandom % 8);     // baseline noise 0..7, never above the cut
  endfunction

  // one clock: set inputs, check the edge against the model
  // Called at a falling edge; returns at the next falling edge.
  task automatic cyc(bit do_rw, bit step);
    rw = do_rw; rd_step = step;
    adc_pair[0] = gen(t); adc_pair[1] = gen(t + 1);
    flags_in = ($urandom % 8 == 0) ? 8'(1 << ($urandom % 8)) : 8'h00;
    t += 2;
    if (t > pulse_at + 12) pulse_at = t + 8 + ($urandom % 300) + (($urandom % 4 == 0) ? 1500 : 0);
    #1;
    // what the RAM sees at the coming edge
    we_pre = mem_we; word_pre = mem_word; addr_pre = addr_a; why_pre = keep_why;
    @(posedge clk);
    begin
      int unsigned a_before, e;
      a_before = ref_m.addr;
      e = ref_m.ecount;
      ref_m.clock(adc_pair, flags_in, rw, en_supp_n, rd_step);
      checks++;
      if (we_pre !== (e >= 4 && e % 2 == 0 && !rw)) begin
        failures++; $display("we wrong at edge %0d", e);
      end
      if (we_pre) begin
        writes++;
        checks++;
        if (word_pre !== ref_m.mem[a_before] || addr_pre !== 8'(a_before)) begin
          failures++;
          $display("write %0d: got %h @%0d expected %h @%0d", ref_m.n_written,
                   word_pre, addr_pre, ref_m.mem[a_before], a_before);
        end
        for (int r = 0; r < 4; r++) if (why_pre[r]) why_seen[r]++;
      end
    end
    @(negedge clk);
    checks++;
    if (addr_a !== 8'(ref_m.addr) || addr_b !== 8'(ref_m.addr)) begin
      failures++; $display("addr %0d expected %0d", addr_a, ref_m.addr);
    end
  endtask

  initial begin
    ref_m = new(8'd7);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // write phase long enough for two TIMER wraps
    for (int i = 0; i < 1200; i++) cyc(0, 0);
    checks++;
    if (writes != 600 - 2) begin failures++; $display("%0d writes in 1200 clocks", writes); end
    // read phase
    for (int i = 0; i < 256; i++) cyc(1, 1);
    // writes again, with suppression off: every word kept
    en_supp_n = 1;
    for (int i = 0; i < 300; i++) cyc(0, 0);
    en_supp_n = 0;
    for (int i = 0; i < 50; i++) cyc(0, 0);
    for (int i = 0; i < 20; i++) cyc(1, i % 3 == 0);
    checks++;
    if (ref_m.n_ovf == 0 || ref_m.n_neighbour == 0 || ref_m.n_signal == 0 ||
        ref_m.n_forced == 0 || ref_m.n_rwkeep == 0 || ref_m.n_overwritten == 0) begin
      failures++;
      $display("coverage: signal %0d neighbour %0d ovf %0d forced %0d rw %0d dropped %0d",
               ref_m.n_signal, ref_m.n_neighbour, ref_m.n_ovf, ref_m.n_forced,
               ref_m.n_rwkeep, ref_m.n_overwritten);
    end
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (why_seen[r] == 0) begin failures++; $display("keep reason %0d never seen", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
