// tb_counter_reg: the counter must read 0 after reset, rise by exactly one per
// clock cycle over a long run, and restart from 0 on a second reset.
// The reference model follows the MIPS I / module behaviour described in its RTL header;
// the random stimulus and the run lengths are this testbench's own choices.
`timescale 1ns/1ps
module tb_counter_reg;
  logic clk = 0, rst = 1;
  logic [31:0] count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  counter_reg dut (.clk(clk), .rst(rst), .count(count));

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++; if (count !== 0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int n = 1; n <= 1000; n++) begin
      @(posedge clk); #1;
      checks++; if (count !== 32'(n)) begin failures++; $display("FAIL count %0d exp %0d", count, n); end
    end
    rst = 1; @(posedge clk); #1 rst = 0;
    checks++; if (count !== 0) begin failures++; $display("FAIL second reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
