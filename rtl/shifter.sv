// shifter: the core's barrel shifter.
//
// Combinational. It shifts value (the b_bus) by shift_amount (the low five bits
// of the a_bus: the instruction's shamt field for SLL/SRL/SRA, register rs for
// the variable forms) left logically, right logically or right arithmetically.
// With SHIFT_NOTHING it drives zero so its output can be OR-ed onto c_bus.
//
// Named in the PLASMA block diagram; its function is that of the MIPS I shift
// instructions.
module shifter
  import plasma_pkg::*;
(
  input  logic [31:0] value,
  input  logic [4:0]  shift_amount,
  input  shift_func_t shift_func,
  output logic [31:0] c_shift
);

  always_comb begin
    unique case (shift_func)
      SHIFT_LEFT_LOGICAL:  c_shift = value << shift_amount;
      SHIFT_RIGHT_LOGICAL: c_shift = value >> shift_amount;
      SHIFT_RIGHT_ARITH:   c_shift = $unsigned($signed(value) >>> shift_amount);
      default:             c_shift = '0;
    endcase
  end

endmodule
