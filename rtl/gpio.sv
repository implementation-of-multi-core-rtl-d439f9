// gpio: general-purpose I/O with one output and one input register.
//
// The output register drives gpio_out and is written with out_we. The input
// register samples gpio_in every cycle through a two-flip-flop synchroniser, so
// a change on a pin is seen in gpio_in_q two cycles later. Reset clears both.
//
// One output and one input register follow the published system; the 32-bit
// width and the synchroniser are this design's.
module gpio #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             out_we,
  input  logic [WIDTH-1:0] out_wdata,
  output logic [WIDTH-1:0] gpio_out,
  input  logic [WIDTH-1:0] gpio_in,
  output logic [WIDTH-1:0] gpio_in_q
);

  logic [WIDTH-1:0] sync1;

  always_ff @(posedge clk) begin
    if (rst) begin
      gpio_out  <= '0;
      sync1     <= '0;
      gpio_in_q <= '0;
    end else begin
      if (out_we) gpio_out <= out_wdata;
      sync1     <= gpio_in;
      gpio_in_q <= sync1;
    end
  end

endmodule
