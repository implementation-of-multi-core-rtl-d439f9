// alu: the core's adder, comparator and logic unit.
//
// Combinational. It applies alu_func to a_bus and b_bus and drives c_alu; with
// ALU_NOTHING it drives zero, so that its output can be OR-ed with the shifter and
// multiplier outputs onto the shared c_bus, as the three units all drive c_bus in
// the core's block diagram. ADD and SUB are the same adder: the MIPS overflow trap
// is not produced (this design's choice). LESS_THAN compares unsigned,
// LESS_THAN_SIGNED two's-complement, and both return 0 or 1.
module alu
  import plasma_pkg::*;
(
  input  logic [31:0] a_in,
  input  logic [31:0] b_in,
  input  alu_func_t   alu_func,
  output logic [31:0] c_alu
);

  logic [32:0] diff;

  always_comb begin
    diff  = {1'b0, a_in} - {1'b0, b_in};
    c_alu = '0;
    unique case (alu_func)
      ALU_ADD:              c_alu = a_in + b_in;
      ALU_SUB:              c_alu = diff[31:0];
      ALU_LESS_THAN:        c_alu = {31'b0, diff[32]};
      ALU_LESS_THAN_SIGNED: c_alu = {31'b0, $signed(a_in) < $signed(b_in)};
      ALU_OR:               c_alu = a_in | b_in;
      ALU_AND:              c_alu = a_in & b_in;
      ALU_XOR:              c_alu = a_in ^ b_in;
      ALU_NOR:              c_alu = ~(a_in | b_in);
      default:              c_alu = '0;
    endcase
  end

endmodule
