// mem_ctrl: the core's memory controller.
//
// The memory is synchronous: an address put on address_next (with byte_we_next
// for a write) is taken at the clock edge and the read data appear on data_r in
// the next cycle; address and byte_we are the registered copies that belong to
// the data now on data_r.
//
// Normally address_next carries the fetch address from the PC logic, and the
// opcode of the instruction being executed is data_r itself. A load or store
// takes two cycles: in the first (pause_out high, the core holds) the data
// address, the byte enables and the write data are put out; in the second the
// load data arrive on data_r, are aligned and extended (data_read) and written
// back, while the fetch address is put out again. Whenever the core did not
// advance in the previous cycle, the opcode comes from an internal copy, since
// data_r then no longer holds it. pause_in (bus not granted, memory busy)
// stretches either cycle, and write enables are held off meanwhile; stall_in
// (the multiplier is busy) only holds the instruction. nullify_op replaces the opcode by a no-op (used
// when an interrupt is taken).
//
// Byte order is big-endian, as in MIPS: byte offset 0 is data bits 31:24 and
// byte_we[3]. Only naturally aligned accesses are supported; the low address
// bits of a misaligned halfword or word are ignored.
//
// The port names follow the published memory-controller diagram; the internal
// timing follows the original PLASMA core as far as it is known, the opcode
// copy and the pause handling are this design's.
module mem_ctrl
  import plasma_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        pause_in,
  input  logic        stall_in,
  input  logic        nullify_op,
  input  mem_source_t mem_source,
  input  logic [31:0] address_in,
  input  logic [31:0] data_write,
  input  logic [31:2] address_pc,
  input  logic [31:0] data_r,
  output logic [31:0] opcode_out,
  output logic [31:0] data_read,
  output logic [31:2] address_next,
  output logic [3:0]  byte_we_next,
  output logic [31:2] address,
  output logic [3:0]  byte_we,
  output logic [31:0] data_w,
  output logic        pause_out,
  output logic        data_phase,
  output logic        second_cycle
);

  logic        second;      // second cycle of a load or store
  logic        use_copy;    // opcode must come from opcode_q
  logic [31:0] opcode_q, opcode_raw;
  logic        is_mem, is_write;
  logic [1:0]  off;

  assign opcode_raw = use_copy ? opcode_q : data_r;
  assign opcode_out = nullify_op ? 32'h0 : opcode_raw;
  assign is_mem     = mem_source != MEM_FETCH;
  assign is_write   = mem_source inside {MEM_WRITE32, MEM_WRITE16, MEM_WRITE8};
  assign pause_out  = is_mem && !second;
  assign data_phase = pause_out;
  assign second_cycle = second;
  assign off        = address_in[1:0];

  always_comb begin
    // the data address is also held while the second cycle is stretched, so the
    // load data are read again rather than lost
    address_next = (pause_out || (second && pause_in)) ? address_in[31:2] : address_pc;
    byte_we_next = '0;
    data_w       = data_write;
    unique case (mem_source)
      MEM_WRITE8: begin
        data_w       = {4{data_write[7:0]}};
        byte_we_next = 4'b1000 >> off;
      end
      MEM_WRITE16: begin
        data_w       = {2{data_write[15:0]}};
        byte_we_next = off[1] ? 4'b0011 : 4'b1100;
      end
      MEM_WRITE32: byte_we_next = 4'b1111;
      default: ;
    endcase
    if (!(pause_out && is_write && !pause_in)) byte_we_next = '0;
  end

  always_comb begin
    logic [7:0]  b;
    logic [15:0] h;
    unique case (off)
      2'd0:    b = data_r[31:24];
      2'd1:    b = data_r[23:16];
      2'd2:    b = data_r[15:8];
      default: b = data_r[7:0];
    endcase
    h = off[1] ? data_r[15:0] : data_r[31:16];
    unique case (mem_source)
      MEM_READ8S:  data_read = {{24{b[7]}}, b};
      MEM_READ8:   data_read = {24'b0, b};
      MEM_READ16S: data_read = {{16{h[15]}}, h};
      MEM_READ16:  data_read = {16'b0, h};
      default:     data_read = data_r;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      second   <= 1'b0;
      use_copy <= 1'b0;
      opcode_q <= '0;
      address  <= '0;
      byte_we  <= '0;
    end else begin
      opcode_q <= opcode_out;
      use_copy <= pause_in || stall_in || pause_out;
      address  <= address_next;
      byte_we  <= byte_we_next;
      if (!pause_in) second <= pause_out;
    end
  end

endmodule
