// tb_reg_bank: random writes and reads against a reference array; register 0
// must stay zero; writes with write_enable low must be ignored; MTC0 to STATUS
// and EPC, and an exception (EPC load, interrupt enable cleared).
// The reference model follows the MIPS I / module behaviour described in its RTL header;
// the random stimulus and the run lengths are this testbench's own choices.
`timescale 1ns/1ps
module tb_reg_bank;
  logic clk = 0, rst = 1, we = 0, cop0_write = 0, exception = 0, ie;
  logic [4:0] rs, rt, rd, cop0_index;
  logic [31:0] wd, s, t, epc_in, cop0_read;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  reg_bank dut (.clk(clk), .rst(rst), .rs_index(rs), .rt_index(rt), .rd_index(rd), .reg_dest(wd),
    .write_enable(we), .reg_source(s), .reg_target(t), .cop0_index(cop0_index), .cop0_write(cop0_write),
    .exception(exception), .epc_in(epc_in), .cop0_read(cop0_read), .intr_enable(ie));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    rs = 0; rt = 0; rd = 0; wd = 0; cop0_index = 0; epc_in = 0;
    for (int i = 0; i < 32; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      rs = 5'($urandom); rt = 5'($urandom); rd = 5'($urandom); wd = $urandom; we = ($urandom_range(0, 3) != 0);
      #1;
      chk("rs", s, model[rs]);
      chk("rt", t, model[rt]);
      @(posedge clk);
      if (we && rd != 0) model[rd] = wd;
    end
    // COP0
    @(negedge clk);
    we = 0; rt = 5'd3; #1;
    cop0_index = 12; cop0_write = 1; @(negedge clk);
    chk("status", cop0_read, {31'b0, model[3][0]});
    chk("ie", {31'b0, ie}, {31'b0, model[3][0]});
    // make sure a 1 is written
    model[5] = 32'h1; rd = 5; wd = 1; we = 1; @(negedge clk); we = 0;
    rt = 5; cop0_index = 12; cop0_write = 1; @(negedge clk);
    chk("ie set", {31'b0, ie}, 1);
    cop0_index = 14; cop0_write = 1; rt = 5; @(negedge clk);
    cop0_write = 0; chk("epc write", cop0_read, 1);
    epc_in = 32'h0000_1234; exception = 1; @(negedge clk);
    exception = 0;
    chk("epc", cop0_read, 32'h1234);
    chk("ie cleared", {31'b0, ie}, 0);
    cop0_index = 3; #1; chk("other cop0", cop0_read, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
