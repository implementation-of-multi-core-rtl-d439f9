// reg_bank: the core's 32 x 32-bit register file plus the two COP0 registers the
// core uses for interrupts.
//
// Two combinational read ports (rs_index -> reg_source, rt_index -> reg_target)
// and one write port (rd_index <- reg_dest) written at the rising clock edge when
// write_enable is high. Register 0 always reads zero. Writes are not forwarded to
// the read ports within the cycle; the core never needs it because it retires
// one instruction at a time.
//
// COP0: STATUS (register 12) holds the interrupt-enable bit in bit 0; EPC
// (register 14) holds the address of the instruction that was interrupted or
// that raised SYSCALL/BREAK. MTC0 writes either register; an exception stores
// EPC and clears the enable bit. Keeping these two registers in the register
// bank is this design's choice. Reset clears the enable bit, EPC and all
// general registers.
module reg_bank (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  rs_index,
  input  logic [4:0]  rt_index,
  input  logic [4:0]  rd_index,
  input  logic [31:0] reg_dest,
  input  logic        write_enable,
  output logic [31:0] reg_source,
  output logic [31:0] reg_target,
  // COP0
  input  logic [4:0]  cop0_index,
  input  logic        cop0_write,
  input  logic        exception,
  input  logic [31:0] epc_in,
  output logic [31:0] cop0_read,
  output logic        intr_enable
);
  import plasma_pkg::*;

  logic [31:0] regs [1:31];
  logic [31:0] epc;

  assign reg_source = (rs_index == 5'd0) ? '0 : regs[rs_index];
  assign reg_target = (rt_index == 5'd0) ? '0 : regs[rt_index];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i < 32; i++) regs[i] <= '0;
    end else if (write_enable && rd_index != 5'd0) begin
      regs[rd_index] <= reg_dest;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      epc         <= '0;
      intr_enable <= 1'b0;
    end else if (exception) begin
      epc         <= epc_in;
      intr_enable <= 1'b0;
    end else if (cop0_write) begin
      if (cop0_index == COP0_STATUS) intr_enable <= reg_target[0];
      if (cop0_index == COP0_EPC)    epc         <= reg_target;
    end
  end

  always_comb begin
    unique case (cop0_index)
      COP0_STATUS: cop0_read = {31'b0, intr_enable};
      COP0_EPC:    cop0_read = epc;
      default:     cop0_read = '0;
    endcase
  end

endmodule
