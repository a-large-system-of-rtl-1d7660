// tb_mc_demux: feeds random sample pairs and checks that every second
// clock a word of the last two pairs (earliest sample in byte 0) appears,
// with word_stb high for exactly one clock in two (125 MHz word rate).
`timescale 1ns/1ps
module tb_mc_demux;
  import td_pkg::*;
  logic clk = 0, rst_n = 0;
  adc_pair_t pair_in;
  logic [7:0] flags_in;
  sample_t [3:0] word_out;
  logic [7:0] flags_out;
  logic word_stb;
  int checks = 0, failures = 0, words = 0;
  adc_pair_t hist_p [$];
  logic [7:0] hist_f [$];
  int unsigned edge_cnt = 0;

  mc_demux dut (.clk, .rst_n, .pair_in, .flags_in, .word_out, .flags_out, .word_stb);

  always #2 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pair_in = '0; flags_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      pair_in  = {8'($urandom), 8'($urandom)};
      flags_in = ($urandom % 4 == 0) ? 8'(1 << ($urandom % 8)) : 8'h00;
      @(posedge clk);
      hist_p.push_back(pair_in); hist_f.push_back(flags_in);
      edge_cnt++;
      @(negedge clk);
      // edge_cnt edges seen; word n (edges 2n, 2n+1) is out after edge 2n+2
      checks++;
      if (word_stb !== (edge_cnt >= 2 && edge_cnt % 2 == 0)) begin
        failures++; $display("word_stb wrong after edge %0d", edge_cnt);
      end
      if (word_stb) begin
        int n;
        n = (edge_cnt - 2) / 2;
        checks++; words++;
        if (word_out !== {hist_p[2*n+1], hist_p[2*n]} ||
            flags_out !== (hist_f[2*n] | hist_f[2*n+1])) begin
          failures++; $display("word %0d wrong: %h", n, word_out);
        end
      end
    end
    checks++;
    if (words != 500) begin failures++; $display("word count %0d", words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
