// tb_tdmaster: the TDMASTER against a model of 32 channel memories on the
// auxiliary bus. Each model channel returns a word made of its channel
// number and a private read pointer that moves on aux_step. Checks:
// DAC level writes; ro_start ignored outside read mode; every word of every
// channel delivered once, in order, with the right secondary address and
// index, under random back-pressure; and with ro_ready held high, one word
// per clock (8192 words in 8192 clocks plus the start-up clock).
`timescale 1ns/1ps
module tb_tdmaster;
  import td_pkg::*;
  localparam int NCH = 32;
  logic clk = 0, rst_n = 0;
  logic dac_we = 0;
  logic [4:0] dac_sel = '0;
  logic [11:0] dac_code = '0;
  logic [11:0] dac_level [NCH];
  logic rw = 0, ro_start = 0, ro_busy, ro_done;
  logic [4:0] aux_sel;
  logic aux_step;
  td_word_t aux_data;
  logic aux_hit;
  logic ro_valid, ro_ready = 0;
  logic [4:0] ro_chan;
  logic [7:0] ro_index;
  td_word_t ro_word;
  logic ro_miss;
  logic [7:0] ptr [NCH];
  logic [11:0] dac_shadow [NCH];
  int checks = 0, failures = 0, stalls = 0;

  tdmaster #(.N_CH(NCH), .SEL_BITS(5)) dut (.*);

  always #2 clk = ~clk;

  // channel memory model
  always_comb begin
    aux_hit  = 1'b1;
    aux_data = '0;
    aux_data.flags = 8'(aux_sel);
    aux_data.tag   = ptr[aux_sel];
    aux_data.data  = {8'hA5, 8'(aux_sel), ptr[aux_sel], 8'h5A};
  end
  always_ff @(posedge clk) if (aux_step) ptr[aux_sel] <= ptr[aux_sel] + 1'b1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_readout(int ready_pct, output int clocks);
    int c, i, got;
    bit done_seen;
    @(negedge clk); ro_start = 1;
    @(negedge clk); ro_start = 0;
    c = 0; i = 0; got = 0; done_seen = 0; clocks = 0;
    while (!(done_seen && !ro_valid)) begin
      ro_ready = ($urandom % 100) < ready_pct;
      @(posedge clk);
      clocks++;
      if (ro_done) done_seen = 1;
      if (ro_valid && !ro_ready) stalls++;
      if (ro_valid && ro_ready) begin
        checks++;
        if (ro_chan !== 5'(c) || ro_index !== 8'(i) || ro_word.tag !== ptr_start(c) + 8'(i) ||
            ro_word.flags !== 8'(c) || ro_word.data[2] !== 8'(c)) begin
          failures++; $display("word ch%0d/%0d: chan %0d idx %0d tag %0d", c, i, ro_chan, ro_index, ro_word.tag);
        end
        got++;
        i++; if (i == 256) begin i = 0; c++; end
      end
      @(negedge clk);
      if (clocks > 100000) break;
    end
    ro_ready = 0;
    checks++;
    if (got != NCH * 256) begin failures++; $display("%0d words delivered", got); end
  endtask

  logic [7:0] start_ptr [NCH];
  function automatic logic [7:0] ptr_start(int c);
    return start_ptr[c];
  endfunction

  initial begin
    int clocks;
    for (int c = 0; c < NCH; c++) begin ptr[c] = 8'($urandom); start_ptr[c] = ptr[c]; dac_shadow[c] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // DAC levels
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      dac_we = 1; dac_sel = 5'($urandom); dac_code = 12'($urandom);
      dac_shadow[dac_sel] = dac_code;
    end
    @(negedge clk) dac_we = 0;
    @(negedge clk);
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (dac_level[c] !== dac_shadow[c]) begin failures++; $display("dac %0d wrong", c); end
    end
    // start refused in write mode
    ro_start = 1; @(negedge clk); ro_start = 0; @(negedge clk);
    checks++;
    if (ro_busy) begin failures++; $display("readout started in write mode"); end
    // read mode, random back-pressure
    rw = 1;
    run_readout(60, clocks);
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (ptr[c] !== start_ptr[c]) begin failures++; $display("channel %0d pointer not back at start", c); end
    end
    // full speed
    run_readout(100, clocks);
    checks++;
    if (clocks != NCH * 256 + 1) begin failures++; $display("full-speed readout took %0d clocks", clocks); end
    checks++;
    if (stalls == 0) begin failures++; $display("back-pressure never exercised"); end
    checks++;
    if (ro_miss) begin failures++; $display("miss flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
