// ram: single-port synchronous RAM with byte write enables.
//
// The word at addr is read at the rising clock edge and appears on rdata in the
// next cycle; bytes whose we bit is set are written with wdata at the same edge
// (rdata then shows the old word). we[3] is bits 31:24, the byte at the lowest
// address in the big-endian order of the cores. Contents are not reset.
//
// Synchronous memory with read data one cycle after the address follows the
// core's timing; sizes and the single port are this design's.
module ram #(
  parameter int unsigned WORDS = 2048
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [3:0]               we,
  input  logic [31:0]              wdata,
  output logic [31:0]              rdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    for (int b = 0; b < 4; b++)
      if (we[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
    rdata <= mem[addr];
  end

endmodule
