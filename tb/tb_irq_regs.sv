// tb_irq_regs: random interrupt sources and mask writes; status must show the
// sources one cycle later, mask must hold the last value written, and the
// interrupt line must be the OR of status AND mask.
// The reference model follows the MIPS I / module behaviour described in its RTL header;
// the random stimulus and the run lengths are this testbench's own choices.
`timescale 1ns/1ps
module tb_irq_regs;
  logic clk = 0, rst = 1, we = 0, intr;
  logic [7:0] src = 0, wd = 0, status, mask, m_status, m_mask;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  irq_regs #(.NIRQ(8)) dut (.clk(clk), .rst(rst), .sources(src), .mask_we(we), .mask_wdata(wd),
    .status(status), .mask(mask), .intr_out(intr));

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++; if (status !== 0 || mask !== 0) begin failures++; $display("FAIL reset"); end
    m_status = 0; m_mask = 0;
    for (int n = 0; n < 500; n++) begin
      src = 8'($urandom) & 8'($urandom); we = ($urandom_range(0, 5) == 0); wd = 8'($urandom);
      @(posedge clk); #1;
      m_status = src; if (we) m_mask = wd;
      checks += 3;
      if (status !== m_status) begin failures++; $display("FAIL status"); end
      if (mask !== m_mask) begin failures++; $display("FAIL mask"); end
      if (intr !== ((m_status & m_mask) != 0)) begin failures++; $display("FAIL intr"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
