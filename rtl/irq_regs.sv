// irq_regs: the interrupt status and interrupt mask registers.
//
// status samples the interrupt sources every clock cycle (so it shows which
// interrupts are pending); mask is written by the processor with mask_we. The
// interrupt line to the cores, intr_out, is high while any pending source is
// also enabled in mask. Reset clears both registers. Level-sensitive sources
// and the AND-then-OR combination are this design's choice.
module irq_regs #(
  parameter int unsigned NIRQ = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NIRQ-1:0] sources,
  input  logic            mask_we,
  input  logic [NIRQ-1:0] mask_wdata,
  output logic [NIRQ-1:0] status,
  output logic [NIRQ-1:0] mask,
  output logic            intr_out
);

  always_ff @(posedge clk) begin
    if (rst) begin
      status <= '0;
      mask   <= '0;
    end else begin
      status <= sources;
      if (mask_we) mask <= mask_wdata;
    end
  end

  assign intr_out = |(status & mask);

endmodule
