// tb_alu: random operands for every ALU function, compared with a reference
// written with plain SystemVerilog operators, plus zero output for ALU_NOTHING.
// The reference model follows the MIPS I / module behaviour described in its RTL header;
// the random stimulus and the run lengths are this testbench's own choices.
module tb_alu;
  import plasma_pkg::*;
  logic [31:0] a, b, c, exp;
  alu_func_t f;
  int checks = 0, failures = 0;

  alu dut (.a_in(a), .b_in(b), .alu_func(f), .c_alu(c));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a = $urandom; b = (n % 7 == 0) ? a : $urandom;
      if (n % 11 == 0) b = {~a[31], a[30:0]};
      f = alu_func_t'($urandom_range(0, 8));
      #1;
      case (f)
        ALU_ADD:              exp = a + b;
        ALU_SUB:              exp = a - b;
        ALU_LESS_THAN:        exp = (a < b) ? 1 : 0;
        ALU_LESS_THAN_SIGNED: exp = ($signed(a) < $signed(b)) ? 1 : 0;
        ALU_OR:               exp = a | b;
        ALU_AND:              exp = a & b;
        ALU_XOR:              exp = a ^ b;
        ALU_NOR:              exp = ~(a | b);
        default:              exp = 0;
      endcase
      checks++;
      if (c !== exp) begin failures++; $display("FAIL f=%s a=%h b=%h c=%h exp=%h", f.name(), a, b, c, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
