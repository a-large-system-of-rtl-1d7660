// tb_memory_depth: the memory-depth workload on one channel at default size.
//
// The goal is a recording window of at least 10 us, which 256 unsuppressed
// words (2.048 us) cannot give. Each event: a pion pulse, its muon decay a
// few tens of ns later, and the decay electron up to 9 us after that, on
// top of random background pulses; R/W goes high 10.5 us after the pion.
// The buffer is first filled with suppression off, so every location holds
// a real word. After readout the testbench does what crate software does:
// walking the 256 words from newest to oldest, it counts TIMER wraps (a tag
// that does not increase means one wrap, which the kept overflow word makes
// unambiguous) and turns every tag into an absolute word number. It checks
// every word's samples against the generated input at that time, and that
// every word holding a sample above the cut, from the oldest word in the
// buffer onward, is present.
// It runs at two background rates: at 0.5 MHz the window must exceed 10 us;
// at 10 MHz it must not, yet the time reconstruction must still be right.
`timescale 1ns/1ps
module tb_memory_depth;
  import td_pkg::*;
  import td_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  adc_pair_t adc_pair = '0;
  logic [7:0] flags_in = '0;
  logic rw = 0, en_supp_n = 1, rd_step = 0;
  td_word_t rd_data;
  logic [7:0] addr;
  logic kept, mem_we;
  logic [3:0] keep_why;
  int checks = 0, failures = 0;

  td_channel dut (.clk, .rst_n, .adc_pair, .flags_in, .rw, .en_supp_n, .rd_step,
                  .rd_data, .addr, .kept, .mem_we, .keep_why);

  always #2 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t s [$];          // every sample since reset
  int unsigned edges = 0;  // posedges since reset release
  real pulse_mv [int unsigned];   // sample index -> added signal (sparse)

  function automatic void add_pulse(int unsigned at, real amp);
    for (int d = 0; d < 15; d++) begin
      real v;
      v = sig_gen::tri_shape(d, amp);
      if (pulse_mv.exists(at + d)) pulse_mv[at + d] += v;
      else pulse_mv[at + d] = v;
    end
  endfunction

  function automatic sample_t sample_at(int unsigned i);
    real v;
    v = pulse_mv.exists(i) ? pulse_mv[i] : 0.0;
    return adc_code(v - real'($urandom % 3), 12'd2048);
  endfunction

  task automatic cyc(bit do_rw, bit step);
    rw = do_rw; rd_step = step;
    adc_pair[0] = sample_at(2 * edges);
    adc_pair[1] = sample_at(2 * edges + 1);
    s.push_back(adc_pair[0]); s.push_back(adc_pair[1]);
    @(posedge clk);
    edges++;
    @(negedge clk);
  endtask

  // One event at background rate bg_mhz; returns the window in ns.
  task automatic event_run(real bg_mhz, output int unsigned window_ns);
    int unsigned t0, pion, e_rise, n_last, n_cur, oldest_n;
    td_word_t words [256];
    int unsigned absn [256];
    int unsigned period;
    // background pulses over the whole event, every `period` samples on average
    t0 = 2 * edges + 20;
    period = int'(500.0 / bg_mhz);      // 2 ns samples
    for (int unsigned at = t0; at < t0 + 6000; at += 20 + $urandom % (2 * period))
      add_pulse(at, -(40.0 + real'($urandom % 300)));
    pion = t0 + 400;
    add_pulse(pion, -500.0);                            // stopping pion
    add_pulse(pion + 5 + $urandom % 30, -60.0);         // decay muon, 4 MeV
    add_pulse(pion + 100 + $urandom % 4400, -50.0);     // decay electron
    // record until 10.5 us after the pion (5250 samples)
    while (2 * edges < pion + 5250) cyc(0, 0);
    e_rise = edges;
    cyc(1, 0);
    // the last written word is number (e_rise - 2 - 4) / 2 at edge e_rise - 2
    // or e_rise - 1, whichever is even
    n_last = ((e_rise - 1) % 2 == 0) ? (e_rise - 1 - 4) / 2 : (e_rise - 2 - 4) / 2;
    for (int i = 0; i < 256; i++) begin
      #1 words[i] = rd_data;
      cyc(1, 1);
    end
    // rebuild absolute word numbers, newest (index 255) first
    absn[255] = n_last;
    checks++;
    if (words[255].tag !== 8'(n_last)) begin
      failures++; $display("newest word tag %0d, expected %0d", words[255].tag, 8'(n_last));
    end
    for (int i = 254; i >= 0; i--) begin
      int unsigned back;
      back = (words[i].tag < words[i+1].tag) ? words[i+1].tag - words[i].tag
                                             : words[i+1].tag + 256 - words[i].tag;
      absn[i] = absn[i+1] - back;
    end
    // every word's samples must match the input at its rebuilt time
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (words[i].data !== {s[4*absn[i]+3], s[4*absn[i]+2], s[4*absn[i]+1], s[4*absn[i]]}) begin
        failures++; $display("word %0d (n=%0d) does not match the input there", i, absn[i]);
      end
    end
    oldest_n = absn[0];
    window_ns = (n_last - oldest_n + 1) * 8;
    // every sample above the cut since the buffer's oldest word is present
    for (int unsigned n = oldest_n; n <= n_last; n++) begin
      bit hot, found;
      hot = 0;
      for (int b = 0; b < 4; b++) if (s[4*n+b] > 8'd7) hot = 1;
      if (hot) begin
        found = 0;
        for (int i = 0; i < 256; i++) if (absn[i] == n) found = 1;
        checks++;
        if (!found) begin failures++; $display("signal word %0d missing", n); end
      end
    end
    $display("background %0.1f MHz: window %0d ns", bg_mhz, window_ns);
    cyc(0, 0);
  endtask

  initial begin
    int unsigned w_low, w_high;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // fill the whole buffer with real words first
    en_supp_n = 1;
    for (int i = 0; i < 1200; i++) cyc(0, 0);
    en_supp_n = 0;
    for (int i = 0; i < 3000; i++) cyc(0, 0);
    event_run(0.5, w_low);
    checks++;
    if (w_low < 10000) begin failures++; $display("window below 10 us at low rate"); end
    event_run(10.0, w_high);
    checks++;
    if (w_high >= 10000 || w_high <= 2048) begin failures++; $display("high-rate window %0d ns out of range", w_high); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
