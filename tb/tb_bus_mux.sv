// tb_bus_mux: every a/b/c source and every branch condition with random data,
// compared with the selection and comparison written out here.
// The reference model follows the MIPS I / module behaviour described in its RTL header;
// the random stimulus and the run lengths are this testbench's own choices.
module tb_bus_mux;
  import plasma_pkg::*;
  logic [15:0] imm;
  logic [31:0] rs, rt, pc, link, cb, md, c0, a, b, d, ea, eb, ed;
  logic tk, et;
  a_source_t as; b_source_t bs; c_source_t cs; branch_func_t bf;
  int checks = 0, failures = 0;

  bus_mux dut (.imm_in(imm), .reg_source(rs), .a_source(as), .reg_target(rt), .b_source(bs),
    .c_source(cs), .pc_current(pc), .link_addr(link), .c_bus(cb), .mem_data(md), .cop0_data(c0),
    .branch_func(bf), .a_bus(a), .b_bus(b), .reg_dest(d), .take_branch(tk));

  initial begin
    for (int n = 0; n < 3000; n++) begin
      imm = 16'($urandom); rs = $urandom; rt = (n % 5 == 0) ? rs : $urandom; pc = $urandom;
      if (n % 9 == 0) rs = 0;
      link = $urandom; cb = $urandom; md = $urandom; c0 = $urandom;
      as = a_source_t'($urandom_range(0, 2)); bs = b_source_t'($urandom_range(0, 2));
      cs = c_source_t'($urandom_range(0, 5)); bf = branch_func_t'($urandom_range(0, 7));
      #1;
      ea = (as == A_FROM_REG_SOURCE) ? rs : (as == A_FROM_IMM10_6) ? 32'(imm[10:6]) : pc;
      eb = (bs == B_FROM_REG_TARGET) ? rt : (bs == B_FROM_IMM) ? 32'(imm) : 32'($signed(imm));
      case (cs)
        C_FROM_NULL: ed = 0; C_FROM_C_BUS: ed = cb; C_FROM_MEMORY: ed = md;
        C_FROM_LINK: ed = link; C_FROM_IMM_SHIFT16: ed = {imm, 16'h0}; default: ed = c0;
      endcase
      case (bf)
        BRANCH_NO: et = 0; BRANCH_YES: et = 1;
        BRANCH_EQ: et = rs == rt; BRANCH_NE: et = rs != rt;
        BRANCH_LTZ: et = $signed(rs) < 0; BRANCH_LEZ: et = $signed(rs) <= 0;
        BRANCH_GTZ: et = $signed(rs) > 0; default: et = $signed(rs) >= 0;
      endcase
      checks += 4;
      if (a !== ea) begin failures++; $display("FAIL a %s", as.name()); end
      if (b !== eb) begin failures++; $display("FAIL b %s", bs.name()); end
      if (d !== ed) begin failures++; $display("FAIL c %s", cs.name()); end
      if (tk !== et) begin failures++; $display("FAIL branch %s rs=%h rt=%h", bf.name(), rs, rt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
