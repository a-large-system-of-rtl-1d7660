// tb_mc_zero_suppress: random and corner-case inputs against the keep rule.
`timescale 1ns/1ps
module tb_mc_zero_suppress;
  import td_pkg::*;
  import td_tb_pkg::*;
  sample_t [3:0] cur;
  sample_t prev_sample, next_sample, thresh;
  logic timer_ovf, en_supp_n, keep;
  logic [3:0] why;
  int checks = 0, failures = 0;
  int hit [4];

  mc_zero_suppress dut (.cur, .prev_sample, .next_sample, .thresh, .timer_ovf,
                        .en_supp_n, .keep, .why);

  function automatic sample_t small_or_big();
    // mostly at or below the cut, sometimes just above, sometimes anywhere
    case ($urandom % 6)
      0: return 8'd7;
      1: return 8'd8;
      2: return 8'($urandom);
      default: return 8'($urandom % 8);
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      for (int b = 0; b < 4; b++) cur[b] = small_or_big();
      prev_sample = small_or_big();
      next_sample = small_or_big();
      thresh      = (i < 15000) ? 8'd7 : 8'($urandom % 32);
      timer_ovf   = ($urandom % 20) == 0;
      en_supp_n   = ($urandom % 20) == 0;
      if (i % 4 == 0) begin   // many all-quiet words to exercise the drop path
        cur = '0; prev_sample = 8'd7; next_sample = 8'd3; timer_ovf = 0; en_supp_n = 0;
      end
      #1;
      checks++;
      if (keep !== keep_ref(cur[0], cur[1], cur[2], cur[3], prev_sample, next_sample,
                            thresh, timer_ovf, en_supp_n)) begin
        failures++;
        $display("keep wrong: cur=%h prev=%0d next=%0d thr=%0d", cur, prev_sample, next_sample, thresh);
      end
      for (int r = 0; r < 4; r++) if (why[r]) hit[r]++;
    end
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (hit[r] == 0) begin failures++; $display("reason %0d never seen", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
