// tb_uart: 16 clocks per bit. Transmit: random bytes are written, the serial
// line is decoded here (start bit, 8 data bits LSB first, stop bit, sampled at
// mid-bit) and busy_write must last exactly 10 bit times. Receive: frames are
// driven onto the receive line, and data_out/data_avail must show each byte;
// enable_read must clear data_avail; a glitch shorter than half a bit must not
// start a frame.
// The reference model follows the MIPS I / module behaviour described in its RTL header;
// the random stimulus and the run lengths are this testbench's own choices.
`timescale 1ns/1ps
module tb_uart;
  localparam int CPB = 16;
  logic clk = 0, rst = 1, rd = 0, wr = 0, busy, avail, rx = 1, tx;
  logic [7:0] din = 0, dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  uart #(.CLKS_PER_BIT(CPB)) dut (.clk(clk), .reset(rst), .enable_read(rd), .enable_write(wr),
    .data_in(din), .data_out(dout), .busy_write(busy), .data_avail(avail), .uart_read(rx), .uart_write(tx));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic send_rx(logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rx = f[i]; repeat (CPB) @(posedge clk); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    chk("idle line", tx, 1);
    for (int n = 0; n < 6; n++) begin
      logic [7:0] b, got;
      int busy_cycles;
      b = 8'($urandom);
      din = b; wr = 1; @(posedge clk); #1 wr = 0; din = ~b;
      // decode: the start bit began at the edge just passed
      busy_cycles = 0;
      repeat (CPB / 2) begin @(posedge clk); busy_cycles++; end
      #1 chk("start bit", tx, 0);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) begin @(posedge clk); busy_cycles++; end
        #1 got[i] = tx;
      end
      repeat (CPB) begin @(posedge clk); busy_cycles++; end
      #1 chk("stop bit", tx, 1);
      chk("tx byte", got, b);
      while (busy) begin @(posedge clk); busy_cycles++; #1; end
      chk("frame length", busy_cycles, 10 * CPB);
    end
    // write while busy is ignored
    din = 8'h55; wr = 1; @(posedge clk); #1 wr = 0;
    din = 8'hAA; wr = 1; @(posedge clk); #1 wr = 0;
    while (busy) @(posedge clk);
    // receive
    for (int n = 0; n < 6; n++) begin
      logic [7:0] b;
      b = 8'($urandom);
      send_rx(b);
      repeat (3) @(posedge clk); #1;
      chk("rx avail", avail, 1);
      chk("rx data", dout, b);
      rd = 1; @(posedge clk); #1 rd = 0;
      chk("read clears avail", avail, 0);
    end
    // short glitch
    rx = 0; repeat (CPB / 4) @(posedge clk); rx = 1;
    repeat (12 * CPB) @(posedge clk); #1;
    chk("glitch ignored", avail, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
