// tb_ram: random byte-masked writes and reads against a reference array; read
// data must appear one cycle after the address and show the old word on a
// write cycle.
// The reference model follows the MIPS I / module behaviour described in its RTL header;
// the random stimulus and the run lengths are this testbench's own choices.
`timescale 1ns/1ps
module tb_ram;
  localparam int W = 256;
  logic clk = 0;
  logic [7:0] addr = 0;
  logic [3:0] we = 0;
  logic [31:0] wd = 0, rd, model [W], exp_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ram #(.WORDS(W)) dut (.clk(clk), .addr(addr), .we(we), .wdata(wd), .rdata(rd));

  initial begin
    // initialise every word with a full write
    for (int i = 0; i < W; i++) begin
      addr = 8'(i); we = 4'hF; wd = $urandom; model[i] = wd; @(posedge clk); #1;
    end
    we = 0;
    for (int n = 0; n < 3000; n++) begin
      addr = 8'($urandom); we = ($urandom_range(0, 1) == 0) ? 4'($urandom) : 4'h0; wd = $urandom;
      exp_q = model[addr];
      for (int b = 0; b < 4; b++) if (we[b]) model[addr][8*b +: 8] = wd[8*b +: 8];
      @(posedge clk); #1;
      checks++;
      if (rd !== exp_q) begin failures++; $display("FAIL read %h exp %h", rd, exp_q); end
    end
    we = 0;
    for (int i = 0; i < W; i++) begin
      addr = 8'(i); @(posedge clk); #1;
      checks++; if (rd !== model[i]) begin failures++; $display("FAIL final %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
