// tb_mult: random signed/unsigned multiplies and divides. Each operation is
// started, then MFLO/MFHI are requested at once: the unit must pause for the
// whole iteration (32 cycles, 33 for a signed operation) and then return the
// product or quotient/remainder computed here with 64-bit arithmetic. MTHI/MTLO
// are checked too.
// The reference model follows the MIPS I / module behaviour described in its RTL header;
// the random stimulus and the run lengths are this testbench's own choices.
`timescale 1ns/1ps
module tb_mult;
  import plasma_pkg::*;
  logic clk = 0, rst = 1, advance = 0, pause;
  logic [31:0] a, b, c;
  mult_func_t f = MULT_NOTHING;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mult dut (.clk(clk), .rst(rst), .a_in(a), .b_in(b), .mult_func(f), .advance(advance),
            .c_mult(c), .pause_out(pause));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h (a=%h b=%h)", what, got, exp, a, b); end
  endtask

  // issue one instruction: hold it until the unit stops pausing; return the cycles waited
  task automatic issue(mult_func_t fn, output int waited, output logic [31:0] result);
    f = fn; advance = 1; waited = 0;
    #1;
    while (pause) begin advance = 0; @(posedge clk); #1; waited++; end
    advance = 1;
    result = c;
    @(posedge clk); #1;
    advance = 0; f = MULT_NOTHING;
  endtask

  initial begin
    int w, w2;
    logic [31:0] lo, hi, dummy;
    logic [63:0] p;
    logic signed [63:0] sp;
    a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst = 0; #1;
    for (int n = 0; n < 200; n++) begin
      mult_func_t op;
      logic sgn;
      op = mult_func_t'($urandom_range(5, 8));
      a = $urandom; b = $urandom;
      if (n % 5 == 0) b = b >> $urandom_range(0, 31);
      if (op == MULT_DIVIDE || op == MULT_SIGNED_DIVIDE) if (b == 0) b = 1;
      sgn = (op == MULT_SIGNED_MULT || op == MULT_SIGNED_DIVIDE);
      issue(op, w, dummy);
      issue(MULT_READ_LO, w, lo);
      issue(MULT_READ_HI, w2, hi);
      chk("latency", 32'(w), sgn && (op == MULT_SIGNED_DIVIDE ? (a[31] | (a[31] ^ b[31])) : (a[31] ^ b[31])) ? 32'd33 : 32'd32);
      chk("no second pause", 32'(w2), 32'd0);
      case (op)
        MULT_MULT: begin p = {32'b0, a} * {32'b0, b}; chk("multu lo", lo, p[31:0]); chk("multu hi", hi, p[63:32]); end
        MULT_SIGNED_MULT: begin sp = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}); chk("mult lo", lo, sp[31:0]); chk("mult hi", hi, sp[63:32]); end
        MULT_DIVIDE: begin chk("divu q", lo, a / b); chk("divu r", hi, a % b); end
        default: begin chk("div q", lo, $signed(a) / $signed(b)); chk("div r", hi, $signed(a) % $signed(b)); end
      endcase
    end
    a = 32'hCAFEF00D; issue(MULT_WRITE_HI, w, dummy);
    a = 32'h12345678; issue(MULT_WRITE_LO, w, dummy);
    issue(MULT_READ_HI, w, hi); issue(MULT_READ_LO, w, lo);
    chk("mthi", hi, 32'hCAFEF00D); chk("mtlo", lo, 32'h12345678);
    f = MULT_NOTHING; #1; chk("idle output", c, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
