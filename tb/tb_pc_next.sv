// tb_pc_next: random sequences of PC actions (sequential, jump, conditional
// branch, register jump, exception) with random pauses, against a reference
// model of the MIPS delay-slot rule: the instruction after a branch always
// executes, and the target follows it. Also checks the reset address, the
// fetch address, the link address and the delay-slot flag.
// The reference model follows the MIPS I / module behaviour described in its RTL header;
// the random stimulus and the run lengths are this testbench's own choices.
`timescale 1ns/1ps
module tb_pc_next;
  import plasma_pkg::*;
  logic clk = 0, rst = 1, adv = 0, tb_ = 0, exc = 0, ids;
  pc_source_t ps;
  logic [25:0] op;
  logic [31:0] rs, pc, fut, link;
  logic [31:0] m_pc, m_after;
  logic m_ids;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  pc_next dut (.clk(clk), .rst(rst), .advance(adv), .pc_source(ps), .take_branch(tb_), .exception(exc),
    .opcode25_0(op), .reg_source(rs), .pc_current(pc), .pc_future(fut), .link_addr(link), .in_delay_slot(ids));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    ps = PC_FROM_INC4; op = 0; rs = 0;
    #1 chk("reset fetch", fut, 0);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    m_pc = 0; m_after = 4; m_ids = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] tgt;
      ps = pc_source_t'($urandom_range(0, 3)); tb_ = $urandom; op = 26'($urandom);
      rs = {$urandom} & ~32'h3; adv = ($urandom_range(0, 4) != 0); exc = ($urandom_range(0, 30) == 0);
      #1;
      chk("pc", pc, m_pc);
      chk("fetch", fut, exc ? EXC_VECTOR : m_after);
      chk("link", link, m_after + 4);
      chk("delay flag", {31'b0, ids}, {31'b0, m_ids});
      case (ps)
        PC_FROM_OPCODE25_0: tgt = {m_after[31:28], op, 2'b00};
        PC_FROM_BRANCH:     tgt = tb_ ? m_after + 32'(int'($signed(op[15:0])) * 4) : m_after + 4;
        PC_FROM_REG_SOURCE: tgt = rs;
        default:            tgt = m_after + 4;
      endcase
      @(posedge clk);
      #1;
      if (adv) begin
        if (exc) begin m_pc = EXC_VECTOR; m_after = EXC_VECTOR + 4; m_ids = 0; end
        else begin m_pc = m_after; m_after = tgt; m_ids = (ps != PC_FROM_INC4); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
