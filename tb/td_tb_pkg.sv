// td_tb_pkg: reference models shared by the testbenches.
//
// keep_ref() restates the zero-suppression rule. ch_ref is a cycle-level
// model of what one channel's memory should hold. It is written from the
// timing stated in the RTL headers, not from the RTL itself:
//   - after reset, 250 MHz edge k samples pair k (samples 2k and 2k+1);
//   - word n is samples 4n..4n+3, tagged n mod 256, with the flags of
//     edges 2n and 2n+1 OR-ed;
//   - word n reaches the RAM at edge 2n+4, written if R/W is low there;
//   - it is kept if a sample of it, or the sample before or after it, is
//     above the cut, if its tag is 255, or if suppression is off;
//   - on the edge where R/W is first seen high the address advances once if
//     the last written word was not kept; in read mode each step advances it.
package td_tb_pkg;
  import td_pkg::*;

  function automatic bit keep_ref(input sample_t s0, s1, s2, s3, prv, nxt,
                                  input sample_t thr, input bit tag_max,
                                  input bit supp_off);
    return (s0 > thr) || (s1 > thr) || (s2 > thr) || (s3 > thr) ||
           (prv > thr) || (nxt > thr) || tag_max || supp_off;
  endfunction

  class ch_ref;
    sample_t            s[$];        // every sample since reset
    logic [7:0]         fl[$];       // flags per edge
    td_word_t           mem [256];
    bit                 written [256];
    int unsigned        addr;
    bit                 unkept;
    bit                 rw_q;
    int unsigned        ecount;
    sample_t            thr;
    // how often each reason kept a word, and how many words were dropped
    int unsigned        n_signal, n_neighbour, n_ovf, n_forced, n_rwkeep;
    int unsigned        n_overwritten, n_written, n_kept;

    function new(sample_t t = 8'd7);
      thr = t;
      addr = 0; unkept = 0; rw_q = 0; ecount = 0;
      foreach (written[i]) written[i] = 0;
    endfunction

    // Call once per posedge with the values present at that edge. The next
    // word's first sample must already be known when word n is written, so
    // the samples of edge k are pushed before word (k-4)/2 is evaluated.
    function void clock(adc_pair_t p, logic [7:0] flags, bit rw, bit supp_off,
                        bit rd_step);
      int unsigned n;
      td_word_t w;
      bit k, sig, nb;
      s.push_back(p[0]); s.push_back(p[1]);
      fl.push_back(flags);
      if (!rw) begin
        if (ecount >= 4 && ecount % 2 == 0) begin
          n = (ecount - 4) / 2;
          w.data  = {s[4*n+3], s[4*n+2], s[4*n+1], s[4*n]};
          w.tag   = 8'(n);
          w.flags = fl[2*n] | fl[2*n+1];
          sig = (s[4*n] > thr) || (s[4*n+1] > thr) || (s[4*n+2] > thr) || (s[4*n+3] > thr);
          nb  = ((n > 0) && (s[4*n-1] > thr)) || (s[4*n+4] > thr);
          k = keep_ref(s[4*n], s[4*n+1], s[4*n+2], s[4*n+3],
                       (n > 0) ? s[4*n-1] : 8'd0, s[4*n+4], thr,
                       (n % 256) == 255, supp_off);
          mem[addr] = w; written[addr] = 1; n_written++;
          if (sig) n_signal++;
          else if (nb) n_neighbour++;
          else if ((n % 256) == 255) n_ovf++;
          else if (supp_off) n_forced++;
          if (k) begin addr = (addr + 1) % 256; n_kept++; end
          else n_overwritten++;
          unkept = !k;
        end
      end else if (!rw_q) begin
        if (unkept) begin addr = (addr + 1) % 256; n_rwkeep++; end
        unkept = 0;
      end else if (rd_step) begin
        addr = (addr + 1) % 256;
      end
      rw_q = rw;
      ecount++;
    endfunction
  endclass

  // Signal source for one channel, in millivolts at the ADC input (PMT
  // pulses are negative). A pion-like primary pulse, 30 ns at the base,
  // is sometimes followed by a smaller secondary pulse a few tens of ns
  // later; between pulses there is only the baseline, shifted by offset_mv
  // (the cable shifts the threshold DAC corrects) plus a little noise.
  class sig_gen;
    real         offset_mv;
    int unsigned next_at;        // sample index of the next primary pulse
    int unsigned cur_at, sec_at;
    real         amp, sec_amp;
    int unsigned gap;            // mean quiet samples between pulses

    function new(real off = 0.0, int unsigned g = 400);
      offset_mv = off; gap = g;
      next_at = 20 + $urandom % g; cur_at = 0; sec_at = 0; amp = 0; sec_amp = 0;
    endfunction

    static function real tri_shape(int d, real a);   // 15-sample triangle
      if (d < 0 || d > 14) return 0.0;
      return a * (d <= 4 ? real'(d) / 4.0 : real'(14 - d) / 10.0);
    endfunction

    function real sample(int unsigned ts);
      if (ts == next_at) begin
        cur_at  = ts;
        amp     = -(40.0 + real'($urandom % 600));
        sec_at  = ts + 4 + $urandom % 40;
        sec_amp = ($urandom % 2) ? -(30.0 + real'($urandom % 20)) : 0.0;
        next_at = ts + 60 + $urandom % (2 * gap);
      end
      return offset_mv + tri_shape(int'(ts) - int'(cur_at), amp) +
             tri_shape(int'(ts) - int'(sec_at), sec_amp) - real'($urandom % 3);
    endfunction
  endclass

  // Flash ADC transfer function: 1 V full scale, 8 bits, the input pulse on
  // one side and the 12-bit DAC level (0.25 mV per count) on the other.
  // DAC code 2048 puts zero volts at code 0.
  localparam real LSB_MV = 1000.0 / 256.0;
  function automatic sample_t adc_code(real vin_mv, logic [11:0] dac);
    real v;
    v = (real'(dac) * 0.25 - 512.0) - vin_mv;
    if (v <= 0.0) return 8'd0;
    if (v >= 255.0 * LSB_MV) return 8'd255;
    return 8'($floor(v / LSB_MV));
  endfunction

endpackage
