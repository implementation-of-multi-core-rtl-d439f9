// control: the instruction decoder of the core.
//
// Combinational. It turns the 32-bit MIPS I opcode into the control word ctrl_t
// (register indices, immediate, unit functions, bus sources, PC and memory
// actions) that steers every other unit. It decodes the user-mode MIPS I set:
// arithmetic, logic, shifts, set-less-than, LUI, multiply/divide with
// MFHI/MFLO/MTHI/MTLO, all branches and jumps including the linking forms,
// LB/LBU/LH/LHU/LW and SB/SH/SW, SYSCALL/BREAK, and MFC0/MTC0 for the interrupt
// registers. The unaligned loads and stores (LWL, LWR, SWL, SWR) are not
// implemented, as in the original core, and like any other unknown opcode
// they execute as no-ops. ADD/ADDI/SUB do not trap on overflow.
module control
  import plasma_pkg::*;
(
  input  logic [31:0] opcode,
  output ctrl_t       ctrl
);

  logic [5:0] op, func;
  logic [4:0] rs, rt, rd;

  assign op   = opcode[31:26];
  assign rs   = opcode[25:21];
  assign rt   = opcode[20:16];
  assign rd   = opcode[15:11];
  assign func = opcode[5:0];

  always_comb begin
    ctrl             = '0;
    ctrl.rs_index    = rs;
    ctrl.rt_index    = rt;
    ctrl.rd_index    = 5'd0;
    ctrl.imm_out     = opcode[15:0];
    ctrl.alu_func    = ALU_NOTHING;
    ctrl.shift_func  = SHIFT_NOTHING;
    ctrl.mult_func   = MULT_NOTHING;
    ctrl.branch_func = BRANCH_NO;
    ctrl.a_source    = A_FROM_REG_SOURCE;
    ctrl.b_source    = B_FROM_REG_TARGET;
    ctrl.c_source    = C_FROM_NULL;
    ctrl.pc_source   = PC_FROM_INC4;
    ctrl.mem_source  = MEM_FETCH;
    ctrl.cop0_write  = 1'b0;
    ctrl.exception   = 1'b0;

    unique case (op)
      6'h00: begin // SPECIAL
        ctrl.rd_index = rd;
        ctrl.c_source = C_FROM_C_BUS;
        unique case (func)
          6'h00: begin ctrl.a_source = A_FROM_IMM10_6; ctrl.shift_func = SHIFT_LEFT_LOGICAL;  end // SLL
          6'h02: begin ctrl.a_source = A_FROM_IMM10_6; ctrl.shift_func = SHIFT_RIGHT_LOGICAL; end // SRL
          6'h03: begin ctrl.a_source = A_FROM_IMM10_6; ctrl.shift_func = SHIFT_RIGHT_ARITH;   end // SRA
          6'h04: ctrl.shift_func = SHIFT_LEFT_LOGICAL;  // SLLV
          6'h06: ctrl.shift_func = SHIFT_RIGHT_LOGICAL; // SRLV
          6'h07: ctrl.shift_func = SHIFT_RIGHT_ARITH;   // SRAV
          6'h08: begin // JR
            ctrl.rd_index  = 5'd0;
            ctrl.c_source  = C_FROM_NULL;
            ctrl.pc_source = PC_FROM_REG_SOURCE;
          end
          6'h09: begin // JALR
            ctrl.c_source  = C_FROM_LINK;
            ctrl.pc_source = PC_FROM_REG_SOURCE;
          end
          6'h0C, 6'h0D: begin // SYSCALL, BREAK
            ctrl.rd_index  = 5'd0;
            ctrl.c_source  = C_FROM_NULL;
            ctrl.exception = 1'b1;
          end
          6'h10: ctrl.mult_func = MULT_READ_HI;                           // MFHI
          6'h11: begin ctrl.mult_func = MULT_WRITE_HI; ctrl.rd_index = 5'd0; end // MTHI
          6'h12: ctrl.mult_func = MULT_READ_LO;                           // MFLO
          6'h13: begin ctrl.mult_func = MULT_WRITE_LO; ctrl.rd_index = 5'd0; end // MTLO
          6'h18: begin ctrl.mult_func = MULT_SIGNED_MULT;   ctrl.rd_index = 5'd0; end // MULT
          6'h19: begin ctrl.mult_func = MULT_MULT;          ctrl.rd_index = 5'd0; end // MULTU
          6'h1A: begin ctrl.mult_func = MULT_SIGNED_DIVIDE; ctrl.rd_index = 5'd0; end // DIV
          6'h1B: begin ctrl.mult_func = MULT_DIVIDE;        ctrl.rd_index = 5'd0; end // DIVU
          6'h20, 6'h21: ctrl.alu_func = ALU_ADD;              // ADD, ADDU
          6'h22, 6'h23: ctrl.alu_func = ALU_SUB;              // SUB, SUBU
          6'h24: ctrl.alu_func = ALU_AND;
          6'h25: ctrl.alu_func = ALU_OR;
          6'h26: ctrl.alu_func = ALU_XOR;
          6'h27: ctrl.alu_func = ALU_NOR;
          6'h2A: ctrl.alu_func = ALU_LESS_THAN_SIGNED;        // SLT
          6'h2B: ctrl.alu_func = ALU_LESS_THAN;               // SLTU
          default: begin ctrl.rd_index = 5'd0; ctrl.c_source = C_FROM_NULL; end
        endcase
      end
      6'h01: begin // REGIMM: BLTZ, BGEZ, BLTZAL, BGEZAL
        ctrl.pc_source   = PC_FROM_BRANCH;
        ctrl.branch_func = rt[0] ? BRANCH_GEZ : BRANCH_LTZ;
        if (rt[4]) begin
          ctrl.rd_index = 5'd31;
          ctrl.c_source = C_FROM_LINK;
        end
      end
      6'h02: ctrl.pc_source = PC_FROM_OPCODE25_0;                    // J
      6'h03: begin                                                   // JAL
        ctrl.pc_source = PC_FROM_OPCODE25_0;
        ctrl.rd_index  = 5'd31;
        ctrl.c_source  = C_FROM_LINK;
      end
      6'h04: begin ctrl.pc_source = PC_FROM_BRANCH; ctrl.branch_func = BRANCH_EQ;  end // BEQ
      6'h05: begin ctrl.pc_source = PC_FROM_BRANCH; ctrl.branch_func = BRANCH_NE;  end // BNE
      6'h06: begin ctrl.pc_source = PC_FROM_BRANCH; ctrl.branch_func = BRANCH_LEZ; end // BLEZ
      6'h07: begin ctrl.pc_source = PC_FROM_BRANCH; ctrl.branch_func = BRANCH_GTZ; end // BGTZ
      6'h08, 6'h09, 6'h0A, 6'h0B, 6'h0C, 6'h0D, 6'h0E: begin // immediate ALU forms
        ctrl.rd_index = rt;
        ctrl.c_source = C_FROM_C_BUS;
        ctrl.b_source = B_FROM_SIGNED_IMM;
        unique case (op)
          6'h0A: ctrl.alu_func = ALU_LESS_THAN_SIGNED;                          // SLTI
          6'h0B: ctrl.alu_func = ALU_LESS_THAN;                                 // SLTIU
          6'h0C: begin ctrl.alu_func = ALU_AND; ctrl.b_source = B_FROM_IMM; end // ANDI
          6'h0D: begin ctrl.alu_func = ALU_OR;  ctrl.b_source = B_FROM_IMM; end // ORI
          6'h0E: begin ctrl.alu_func = ALU_XOR; ctrl.b_source = B_FROM_IMM; end // XORI
          default: ctrl.alu_func = ALU_ADD;                                     // ADDI, ADDIU
        endcase
      end
      6'h0F: begin ctrl.rd_index = rt; ctrl.c_source = C_FROM_IMM_SHIFT16; end // LUI
      6'h10: begin // COP0
        if (rs == 5'd0) begin            // MFC0
          ctrl.rd_index = rt;
          ctrl.c_source = C_FROM_COP0;
        end else if (rs == 5'd4) begin   // MTC0
          ctrl.cop0_write = 1'b1;
        end
      end
      6'h20, 6'h21, 6'h23, 6'h24, 6'h25: begin // LB, LH, LW, LBU, LHU
        ctrl.rd_index = rt;
        ctrl.c_source = C_FROM_MEMORY;
        ctrl.b_source = B_FROM_SIGNED_IMM;
        ctrl.alu_func = ALU_ADD;
        unique case (op)
          6'h20:   ctrl.mem_source = MEM_READ8S;
          6'h21:   ctrl.mem_source = MEM_READ16S;
          6'h24:   ctrl.mem_source = MEM_READ8;
          6'h25:   ctrl.mem_source = MEM_READ16;
          default: ctrl.mem_source = MEM_READ32;
        endcase
      end
      6'h28, 6'h29, 6'h2B: begin // SB, SH, SW
        ctrl.b_source = B_FROM_SIGNED_IMM;
        ctrl.alu_func = ALU_ADD;
        unique case (op)
          6'h28:   ctrl.mem_source = MEM_WRITE8;
          6'h29:   ctrl.mem_source = MEM_WRITE16;
          default: ctrl.mem_source = MEM_WRITE32;
        endcase
      end
      default: ; // LWL, LWR, SWL, SWR and unknown opcodes: no operation
    endcase
  end

endmodule
