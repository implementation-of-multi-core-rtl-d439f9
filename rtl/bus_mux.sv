// bus_mux: the operand and result multiplexers of the core.
//
// Combinational. a_source puts reg_source, the shift amount field of the
// instruction (imm bits 10:6) or the current PC on a_bus; b_source puts
// reg_target, the zero-extended or the sign-extended 16-bit immediate on b_bus.
// c_source chooses what is written back (reg_dest): the c_bus that the ALU,
// shifter and multiplier drive, the aligned load data, the link address of a
// jump-and-link, the immediate shifted into the upper half (LUI), or a COP0
// register (MFC0). branch_func compares reg_source with reg_target or with zero
// and drives take_branch for the PC logic.
//
// The unit and its signal names follow the PLASMA block diagram; the exact
// source encodings are this design's.
module bus_mux
  import plasma_pkg::*;
(
  input  logic [15:0]  imm_in,
  input  logic [31:0]  reg_source,
  input  a_source_t    a_source,
  input  logic [31:0]  reg_target,
  input  b_source_t    b_source,
  input  c_source_t    c_source,
  input  logic [31:0]  pc_current,
  input  logic [31:0]  link_addr,
  input  logic [31:0]  c_bus,
  input  logic [31:0]  mem_data,
  input  logic [31:0]  cop0_data,
  input  branch_func_t branch_func,
  output logic [31:0]  a_bus,
  output logic [31:0]  b_bus,
  output logic [31:0]  reg_dest,
  output logic         take_branch
);

  always_comb begin
    unique case (a_source)
      A_FROM_IMM10_6: a_bus = {27'b0, imm_in[10:6]};
      A_FROM_PC:      a_bus = pc_current;
      default:        a_bus = reg_source;
    endcase

    unique case (b_source)
      B_FROM_IMM:        b_bus = {16'b0, imm_in};
      B_FROM_SIGNED_IMM: b_bus = {{16{imm_in[15]}}, imm_in};
      default:           b_bus = reg_target;
    endcase

    unique case (c_source)
      C_FROM_C_BUS:       reg_dest = c_bus;
      C_FROM_MEMORY:      reg_dest = mem_data;
      C_FROM_LINK:        reg_dest = link_addr;
      C_FROM_IMM_SHIFT16: reg_dest = {imm_in, 16'b0};
      C_FROM_COP0:        reg_dest = cop0_data;
      default:            reg_dest = '0;
    endcase

    unique case (branch_func)
      BRANCH_YES: take_branch = 1'b1;
      BRANCH_EQ:  take_branch = reg_source == reg_target;
      BRANCH_NE:  take_branch = reg_source != reg_target;
      BRANCH_LTZ: take_branch = reg_source[31];
      BRANCH_LEZ: take_branch = reg_source[31] || reg_source == '0;
      BRANCH_GTZ: take_branch = !reg_source[31] && reg_source != '0;
      BRANCH_GEZ: take_branch = !reg_source[31];
      default:    take_branch = 1'b0;
    endcase
  end

endmodule
