// tb_mc_addr_gen: random write slots with random keep decisions, switches to
// read mode (with and without a kept last word) and steps through the
// buffer, comparing both address sets and the write strobe with a model.
`timescale 1ns/1ps
module tb_mc_addr_gen;
  logic clk = 0, rst_n = 0;
  logic slot = 0, keep = 0, rw = 0, rd_step = 0;
  logic [7:0] addr_a, addr_b;
  logic we, rw_rise;
  int checks = 0, failures = 0;
  int unsigned m_addr = 0;
  bit m_unkept = 0, m_rwq = 0;
  int rises_with_inc = 0, rises_without_inc = 0;

  mc_addr_gen #(.ADDR_BITS(8)) dut (.clk, .rst_n, .slot, .keep, .rw, .rd_step,
                                    .addr_a, .addr_b, .we, .rw_rise);

  always #2 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cyc();
    // model the edge, then check after it
    @(posedge clk);
    checks++;
    if (we !== (slot && !rw) || rw_rise !== (rw && !m_rwq)) begin
      failures++; $display("strobe wrong");
    end
    if (!rw) begin
      if (slot) begin if (keep) m_addr = (m_addr + 1) % 256; m_unkept = !keep; end
    end else if (!m_rwq) begin
      if (m_unkept) begin m_addr = (m_addr + 1) % 256; rises_with_inc++; end
      else rises_without_inc++;
      m_unkept = 0;
    end else if (rd_step) m_addr = (m_addr + 1) % 256;
    m_rwq = rw;
    @(negedge clk);
    checks++;
    if (addr_a !== 8'(m_addr) || addr_b !== 8'(m_addr)) begin
      failures++; $display("addr %0d/%0d expected %0d", addr_a, addr_b, m_addr);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int round = 0; round < 40; round++) begin
      rw = 0; rd_step = 0;
      for (int i = 0; i < 300; i++) begin
        slot = (i % 2 == 1);
        keep = ($urandom % 3) == 0;
        if (i == 299) keep = round[0];   // last word kept or not, alternately
        cyc();
      end
      slot = 0;
      rw = 1;
      for (int i = 0; i < 300; i++) begin
        rd_step = ($urandom % 2) == 0;
        slot = ($urandom % 2) == 0;   // writes must stay off in read mode
        keep = 1;
        cyc();
      end
    end
    checks++;
    if (rises_with_inc == 0 || rises_without_inc == 0) begin
      failures++; $display("read-mode entry cases not both seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
