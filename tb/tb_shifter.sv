// tb_shifter: random values and shift amounts for the three shifts, compared
// with a bit-by-bit reference loop, plus zero output for SHIFT_NOTHING.
// The reference model follows the MIPS I / module behaviour described in its RTL header;
// the random stimulus and the run lengths are this testbench's own choices.
module tb_shifter;
  import plasma_pkg::*;
  logic [31:0] v, c, exp;
  logic [4:0] s;
  shift_func_t f;
  int checks = 0, failures = 0;

  shifter dut (.value(v), .shift_amount(s), .shift_func(f), .c_shift(c));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      v = $urandom; s = 5'($urandom); f = shift_func_t'($urandom_range(0, 3));
      #1;
      exp = 0;
      for (int i = 0; i < 32; i++) begin
        case (f)
          SHIFT_LEFT_LOGICAL:  exp[i] = (i >= s) ? v[i - s] : 1'b0;
          SHIFT_RIGHT_LOGICAL: exp[i] = (i + s <= 31) ? v[i + s] : 1'b0;
          SHIFT_RIGHT_ARITH:   exp[i] = (i + s <= 31) ? v[i + s] : v[31];
          default:             exp[i] = 1'b0;
        endcase
      end
      checks++;
      if (c !== exp) begin failures++; $display("FAIL f=%s v=%h s=%0d c=%h exp=%h", f.name(), v, s, c, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
