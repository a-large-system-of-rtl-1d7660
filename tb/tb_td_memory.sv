// tb_td_memory: writes random 48-bit words and reads them back, including a
// check that the two banks follow their own address inputs.
`timescale 1ns/1ps
module tb_td_memory;
  import td_pkg::*;
  logic clk = 0, we = 0;
  logic [7:0] addr_a = 0, addr_b = 0;
  td_word_t wdata = '0, rdata;
  logic [47:0] shadow [256];
  int checks = 0, failures = 0;

  td_memory dut (.clk, .we, .addr_a, .addr_b, .wdata, .rdata);

  always #4 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; addr_a = 8'(i); addr_b = 8'(i);
      wdata = {16'($urandom), 32'($urandom)}; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = ($urandom % 2) == 0;
      addr_a = 8'($urandom); addr_b = addr_a;
      wdata = {16'($urandom), 32'($urandom)};
      #1;
      checks++;
      if (rdata !== shadow[addr_a]) begin failures++; $display("addr %0d wrong", addr_a); end
      if (we) shadow[addr_a] = wdata;
    end
    @(negedge clk); we = 0;
    // split addresses: low 24 bits from bank A's address, high 24 from bank B's
    for (int i = 0; i < 500; i++) begin
      addr_a = 8'($urandom); addr_b = 8'($urandom);
      #1;
      checks++;
      if (rdata !== {shadow[addr_b][47:24], shadow[addr_a][23:0]}) begin
        failures++; $display("bank split wrong at %0d/%0d", addr_a, addr_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
