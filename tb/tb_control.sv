// tb_control: decodes one instance of each instruction class and compares the
// control-word fields that matter for it with the MIPS I meaning of the opcode.
// The reference model follows the MIPS I / module behaviour described in its RTL header;
// the random stimulus and the run lengths are this testbench's own choices.
module tb_control;
  import plasma_pkg::*;
  import mips_asm_pkg::*;
  logic [31:0] op;
  ctrl_t c;
  int checks = 0, failures = 0;

  control dut (.opcode(op), .ctrl(c));

  task automatic expect_(string what, logic [31:0] w, int rd, alu_func_t al, shift_func_t sf,
                         mult_func_t mf, a_source_t as, b_source_t bs, c_source_t cs,
                         pc_source_t ps, branch_func_t bf, mem_source_t ms);
    op = w; #1;
    checks++;
    if (c.rd_index !== 5'(rd) || c.alu_func !== al || c.shift_func !== sf || c.mult_func !== mf ||
        c.a_source !== as || c.b_source !== bs || c.c_source !== cs || c.pc_source !== ps ||
        c.branch_func !== bf || c.mem_source !== ms || c.rs_index !== w[25:21] || c.rt_index !== w[20:16]) begin
      failures++;
      $display("FAIL %s: rd=%0d %s %s %s %s %s %s %s %s %s", what, c.rd_index, c.alu_func.name(), c.shift_func.name(),
               c.mult_func.name(), c.a_source.name(), c.b_source.name(), c.c_source.name(), c.pc_source.name(),
               c.branch_func.name(), c.mem_source.name());
    end
  endtask

  initial begin
    expect_("addu", addu(3, 1, 2), 3, ALU_ADD, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_C_BUS, PC_FROM_INC4, BRANCH_NO, MEM_FETCH);
    expect_("subu", subu(4, 5, 6), 4, ALU_SUB, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_C_BUS, PC_FROM_INC4, BRANCH_NO, MEM_FETCH);
    expect_("slt", slt(7, 1, 2), 7, ALU_LESS_THAN_SIGNED, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_C_BUS, PC_FROM_INC4, BRANCH_NO, MEM_FETCH);
    expect_("nor", nor_(7, 1, 2), 7, ALU_NOR, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_C_BUS, PC_FROM_INC4, BRANCH_NO, MEM_FETCH);
    expect_("sll", sll(8, 9, 3), 8, ALU_NOTHING, SHIFT_LEFT_LOGICAL, MULT_NOTHING, A_FROM_IMM10_6, B_FROM_REG_TARGET, C_FROM_C_BUS, PC_FROM_INC4, BRANCH_NO, MEM_FETCH);
    expect_("srav", srav(8, 9, 10), 8, ALU_NOTHING, SHIFT_RIGHT_ARITH, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_C_BUS, PC_FROM_INC4, BRANCH_NO, MEM_FETCH);
    expect_("jr", jr(31), 0, ALU_NOTHING, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_NULL, PC_FROM_REG_SOURCE, BRANCH_NO, MEM_FETCH);
    expect_("jalr", jalr(31, 4), 31, ALU_NOTHING, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_LINK, PC_FROM_REG_SOURCE, BRANCH_NO, MEM_FETCH);
    expect_("mfhi", mfhi(2), 2, ALU_NOTHING, SHIFT_NOTHING, MULT_READ_HI, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_C_BUS, PC_FROM_INC4, BRANCH_NO, MEM_FETCH);
    expect_("mtlo", mtlo(2), 0, ALU_NOTHING, SHIFT_NOTHING, MULT_WRITE_LO, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_C_BUS, PC_FROM_INC4, BRANCH_NO, MEM_FETCH);
    expect_("mult", mult_(2, 3), 0, ALU_NOTHING, SHIFT_NOTHING, MULT_SIGNED_MULT, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_C_BUS, PC_FROM_INC4, BRANCH_NO, MEM_FETCH);
    expect_("divu", divu(2, 3), 0, ALU_NOTHING, SHIFT_NOTHING, MULT_DIVIDE, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_C_BUS, PC_FROM_INC4, BRANCH_NO, MEM_FETCH);
    expect_("bltz", bltz(4, 5), 0, ALU_NOTHING, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_NULL, PC_FROM_BRANCH, BRANCH_LTZ, MEM_FETCH);
    expect_("bgezal", bgezal(4, 5), 31, ALU_NOTHING, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_LINK, PC_FROM_BRANCH, BRANCH_GEZ, MEM_FETCH);
    expect_("j", j(32'h400), 0, ALU_NOTHING, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_NULL, PC_FROM_OPCODE25_0, BRANCH_NO, MEM_FETCH);
    expect_("jal", jal(32'h400), 31, ALU_NOTHING, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_LINK, PC_FROM_OPCODE25_0, BRANCH_NO, MEM_FETCH);
    expect_("beq", beq(1, 2, -4), 0, ALU_NOTHING, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_NULL, PC_FROM_BRANCH, BRANCH_EQ, MEM_FETCH);
    expect_("bgtz", bgtz(1, 3), 0, ALU_NOTHING, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_NULL, PC_FROM_BRANCH, BRANCH_GTZ, MEM_FETCH);
    expect_("addiu", addiu(5, 6, -1), 5, ALU_ADD, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_SIGNED_IMM, C_FROM_C_BUS, PC_FROM_INC4, BRANCH_NO, MEM_FETCH);
    expect_("sltiu", sltiu(5, 6, 9), 5, ALU_LESS_THAN, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_SIGNED_IMM, C_FROM_C_BUS, PC_FROM_INC4, BRANCH_NO, MEM_FETCH);
    expect_("ori", ori(5, 6, 16'h8000), 5, ALU_OR, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_IMM, C_FROM_C_BUS, PC_FROM_INC4, BRANCH_NO, MEM_FETCH);
    expect_("lui", lui(5, 16'h1234), 5, ALU_NOTHING, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_IMM_SHIFT16, PC_FROM_INC4, BRANCH_NO, MEM_FETCH);
    expect_("mfc0", mfc0(5, 14), 5, ALU_NOTHING, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_COP0, PC_FROM_INC4, BRANCH_NO, MEM_FETCH);
    expect_("lw", lw(5, 8, 29), 5, ALU_ADD, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_SIGNED_IMM, C_FROM_MEMORY, PC_FROM_INC4, BRANCH_NO, MEM_READ32);
    expect_("lb", lb(5, 8, 29), 5, ALU_ADD, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_SIGNED_IMM, C_FROM_MEMORY, PC_FROM_INC4, BRANCH_NO, MEM_READ8S);
    expect_("lhu", lhu(5, 8, 29), 5, ALU_ADD, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_SIGNED_IMM, C_FROM_MEMORY, PC_FROM_INC4, BRANCH_NO, MEM_READ16);
    expect_("sb", sb(5, 8, 29), 0, ALU_ADD, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_SIGNED_IMM, C_FROM_NULL, PC_FROM_INC4, BRANCH_NO, MEM_WRITE8);
    expect_("sw", sw(5, 8, 29), 0, ALU_ADD, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_SIGNED_IMM, C_FROM_NULL, PC_FROM_INC4, BRANCH_NO, MEM_WRITE32);
    expect_("lwl (unsupported)", 32'h88A50000, 0, ALU_NOTHING, SHIFT_NOTHING, MULT_NOTHING, A_FROM_REG_SOURCE, B_FROM_REG_TARGET, C_FROM_NULL, PC_FROM_INC4, BRANCH_NO, MEM_FETCH);
    op = syscall(); #1; checks++; if (!c.exception) begin failures++; $display("FAIL syscall"); end
    op = mtc0(5, 12); #1; checks++; if (!c.cop0_write || c.rd_index != 0) begin failures++; $display("FAIL mtc0"); end
    op = addu(3, 1, 2); #1; checks++; if (c.exception || c.cop0_write) begin failures++; $display("FAIL flags"); end
    op = ori(5, 6, 16'h8001); #1; checks++; if (c.imm_out !== 16'h8001) begin failures++; $display("FAIL imm"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
