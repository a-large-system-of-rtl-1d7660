// tb_ecl_ram_256x4: writes random nibbles to random addresses and reads
// them back against a shadow copy; also checks a cycle without we writes
// nothing.
`timescale 1ns/1ps
module tb_ecl_ram_256x4;
  logic clk = 0, we = 0;
  logic [7:0] addr = 0;
  logic [3:0] din = 0, dout;
  logic [3:0] shadow [256];
  int checks = 0, failures = 0;

  ecl_ram_256x4 dut (.clk, .we, .addr, .din, .dout);

  always #4 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; addr = 8'(i); din = 4'($urandom);
      shadow[i] = din;
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (dout !== shadow[addr]) begin failures++; $display("addr %0d: %h vs %h", addr, dout, shadow[addr]); end
      we = ($urandom % 2) == 0; addr = 8'($urandom); din = 4'($urandom);
      #1;
      checks++;
      if (dout !== shadow[addr]) begin failures++; $display("read addr %0d wrong", addr); end
      if (we) shadow[addr] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
