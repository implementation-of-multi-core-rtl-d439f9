// tb_gpio: random output writes must appear on the pins at the next edge and
// stay until the next write; input pins must reach gpio_in_q two cycles later.
// The reference model follows the MIPS I / module behaviour described in its RTL header;
// the random stimulus and the run lengths are this testbench's own choices.
`timescale 1ns/1ps
module tb_gpio;
  logic clk = 0, rst = 1, we = 0;
  logic [31:0] wd = 0, pins_out, pins_in = 0, in_q, m_out;
  logic [31:0] hist [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  gpio #(.WIDTH(32)) dut (.clk(clk), .rst(rst), .out_we(we), .out_wdata(wd), .gpio_out(pins_out),
    .gpio_in(pins_in), .gpio_in_q(in_q));

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    m_out = 0; hist[0] = 0; hist[1] = 0; hist[2] = 0;
    for (int n = 0; n < 500; n++) begin
      we = ($urandom_range(0, 3) == 0); wd = $urandom; pins_in = $urandom;
      @(posedge clk); #1;
      if (we) m_out = wd;
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = pins_in;
      checks += 1;
      if (pins_out !== m_out) begin failures++; $display("FAIL out"); end
      if (n >= 2) begin
        checks++;
        if (in_q !== hist[1]) begin failures++; $display("FAIL in got %h exp %h", in_q, hist[1]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
