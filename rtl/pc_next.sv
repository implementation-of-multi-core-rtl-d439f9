// pc_next: the program counter of the core and its next-address logic.
//
// It keeps two registers: pc_current, the address of the instruction now
// executing, and pc_after, the address of the instruction that executes after
// it. MIPS branches and jumps have one delay slot, so a taken branch changes the
// address that follows the delay slot, not the one that follows the branch:
// pc_after is therefore always the delay-slot address, and the branch or jump
// target is loaded into pc_after one instruction later. Branch targets are
// relative to the delay-slot address; J/JAL targets take its upper four bits.
//
// pc_future is the address of the next instruction to execute; it is handed to
// the memory controller, which fetches it during the current cycle so that the
// opcode is on data_r when the instruction starts. When advance is low (the core
// is paused) both registers hold. An exception (interrupt, SYSCALL, BREAK)
// redirects the next instruction to EXC_VECTOR. link_addr (delay-slot address
// plus 4) is the return address of jump-and-link. in_delay_slot tells whether
// the current instruction sits in a delay slot; the core does not take an
// interrupt there, so that EPC always points at a restartable instruction.
// Reset loads RESET_PC. The two-register delay-slot scheme is this design's own.
module pc_next
  import plasma_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        advance,
  input  pc_source_t  pc_source,
  input  logic        take_branch,
  input  logic        exception,
  input  logic [25:0] opcode25_0,
  input  logic [31:0] reg_source,
  output logic [31:0] pc_current,
  output logic [31:0] pc_future,
  output logic [31:0] link_addr,
  output logic        in_delay_slot
);

  logic [31:0] pc_after, pc_target;
  logic [31:0] branch_offset;

  assign branch_offset = {{14{opcode25_0[15]}}, opcode25_0[15:0], 2'b00};
  assign link_addr     = pc_after + 32'd4;

  always_comb begin
    unique case (pc_source)
      PC_FROM_OPCODE25_0: pc_target = {pc_after[31:28], opcode25_0, 2'b00};
      PC_FROM_BRANCH:     pc_target = take_branch ? pc_after + branch_offset : pc_after + 32'd4;
      PC_FROM_REG_SOURCE: pc_target = reg_source;
      default:            pc_target = pc_after + 32'd4;
    endcase
    if (rst)            pc_future = RESET_PC;
    else if (exception) pc_future = EXC_VECTOR;
    else                pc_future = pc_after;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_current    <= RESET_PC;
      pc_after      <= RESET_PC + 32'd4;
      in_delay_slot <= 1'b0;
    end else if (advance) begin
      if (exception) begin
        pc_current    <= EXC_VECTOR;
        pc_after      <= EXC_VECTOR + 32'd4;
        in_delay_slot <= 1'b0;
      end else begin
        pc_current    <= pc_after;
        pc_after      <= pc_target;
        in_delay_slot <= pc_source != PC_FROM_INC4;
      end
    end
  end

endmodule
