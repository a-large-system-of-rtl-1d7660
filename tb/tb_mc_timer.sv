// tb_mc_timer: checks the TIMER counts one per enable, wraps after 256
// counts and flags the all-ones value.
`timescale 1ns/1ps
module tb_mc_timer;
  logic clk = 0, rst_n = 0, ce = 0;
  logic [7:0] tag;
  logic terminal;
  int checks = 0, failures = 0, wraps = 0;
  int unsigned expect_cnt = 0;

  mc_timer #(.WIDTH(8)) dut (.clk, .rst_n, .ce, .tag, .terminal);

  always #2 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (tag !== 8'(expect_cnt) || terminal !== (8'(expect_cnt) == 8'hff)) begin
        failures++;
        $display("mismatch: tag %0d expected %0d", tag, 8'(expect_cnt));
      end
      ce = ($urandom % 3) != 0;
      @(posedge clk);
      if (ce) begin
        if (8'(expect_cnt) == 8'hff) wraps++;
        expect_cnt++;
      end
    end
    checks++;
    if (wraps < 2) begin failures++; $display("timer never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
