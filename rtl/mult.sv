// mult: the core's multiply/divide unit with its HI and LO registers.
//
// MULT/MULTU and DIV/DIVU start an iterative operation that takes 32 clock
// cycles (one more for the sign fix-up of a signed operation) (one result bit per cycle: shift-and-add for multiplication, restoring
// division for division); signed forms work on magnitudes and fix the signs at
// the end. The product goes to HI:LO; the quotient to LO and the remainder to HI
// (remainder takes the dividend's sign). MTHI/MTLO write a_bus into HI/LO.
// MFHI/MFLO drive HI/LO onto c_mult; if the unit is still busy it raises
// pause_out so the core waits. In all other cases c_mult is zero, so it can be
// OR-ed onto c_bus.
//
// Interface: mult_func and operands come from the current instruction; advance
// is high in the cycle the core retires that instruction, which is when a start
// or a move is taken. The iterative algorithm and its 32-cycle latency are this
// design's choice: the block is only named in the core's block diagram.
module mult
  import plasma_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] a_in,
  input  logic [31:0] b_in,
  input  mult_func_t  mult_func,
  input  logic        advance,
  output logic [31:0] c_mult,
  output logic        pause_out
);

  logic [31:0] hi, lo;
  logic [31:0] aa;            // magnitudes: multiplicand / divisor and multiplier / dividend
  logic        is_div, neg_q, neg_r;
  logic [5:0]  count;
  logic        busy, iterating;
  localparam int unsigned STEPS = 32;   // one result bit per cycle

  assign iterating = count != 0;
  assign busy      = iterating || neg_q || neg_r;

  always_comb begin
    c_mult    = '0;
    pause_out = 1'b0;
    if (mult_func == MULT_READ_LO || mult_func == MULT_READ_HI) begin
      pause_out = busy;
      c_mult    = (mult_func == MULT_READ_LO) ? lo : hi;
    end
  end

  function automatic logic [31:0] mag(input logic [31:0] v, input logic sgn);
    return (sgn && v[31]) ? -v : v;
  endfunction

  logic [32:0] sum;
  logic [31:0] rem_sh;
  logic [32:0] trial;

  always_comb begin
    sum    = {1'b0, hi} + {1'b0, aa};
    rem_sh = {hi[30:0], lo[31]};
    trial  = {1'b0, rem_sh} - {1'b0, aa};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hi    <= '0;
      lo    <= '0;
      aa    <= '0;
      count <= '0;
      is_div <= 1'b0;
      neg_q <= 1'b0;
      neg_r <= 1'b0;
    end else if (iterating) begin
      if (!is_div) begin
        // shift-and-add: HI accumulates, LO holds the remaining multiplier bits
        if (lo[0]) {hi, lo} <= {sum, lo[31:1]};
        else       {hi, lo} <= {1'b0, hi, lo[31:1]};
      end else begin
        // restoring division: HI is the partial remainder, LO the quotient
        if (!trial[32]) {hi, lo} <= {trial[31:0], lo[30:0], 1'b1};
        else            {hi, lo} <= {rem_sh, lo[30:0], 1'b0};
      end
      count <= count - 1'b1;
    end else if (neg_q || neg_r) begin
      // sign fix-up happens in the cycle after the iterations, while busy is low
      if (!is_div) {hi, lo} <= -{hi, lo};
      else begin
        if (neg_q) lo <= -lo;
        if (neg_r) hi <= -hi;
      end
      neg_q <= 1'b0;
      neg_r <= 1'b0;
    end else if (advance) begin
      unique case (mult_func)
        MULT_WRITE_LO: lo <= a_in;
        MULT_WRITE_HI: hi <= a_in;
        MULT_MULT, MULT_SIGNED_MULT, MULT_DIVIDE, MULT_SIGNED_DIVIDE: begin
          automatic logic sgn = (mult_func == MULT_SIGNED_MULT) || (mult_func == MULT_SIGNED_DIVIDE);
          is_div <= (mult_func == MULT_DIVIDE) || (mult_func == MULT_SIGNED_DIVIDE);
          hi     <= '0;
          if (mult_func == MULT_MULT || mult_func == MULT_SIGNED_MULT) begin
            aa <= mag(a_in, sgn);
            lo <= mag(b_in, sgn);
            neg_q <= sgn && (a_in[31] ^ b_in[31]);
            neg_r <= 1'b0;
          end else begin
            // dividend a (rs) goes to LO, divisor b (rt) to aa
            aa <= mag(b_in, sgn);
            lo <= mag(a_in, sgn);
            neg_q <= sgn && (a_in[31] ^ b_in[31]);
            neg_r <= sgn && a_in[31];
          end
          count <= 6'(STEPS);
        end
        default: ;
      endcase
    end
  end

endmodule
