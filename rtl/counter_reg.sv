// counter_reg: 32-bit register that counts clock cycles.
//
// It increases by one on every rising clock edge and wraps around at 2^32.
// Reset clears it. The processor can only read it.
//
// The 32-bit width and counting every cycle follow the published system; the
// reset value and the wrap-around are this design's.
module counter_reg (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] count
);

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count + 32'd1;
  end

endmodule
