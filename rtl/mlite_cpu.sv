// mlite_cpu: a PLASMA-style MIPS I core with a request line for a shared bus.
//
// The core executes one instruction per clock cycle, and two for a load or a
// store. The opcode fetched in the previous cycle arrives on data_r; the
// control unit decodes it into a control word; the register bank reads rs and
// rt; bus_mux routes operands onto a_bus and b_bus; the ALU, shifter and
// multiplier results are OR-ed onto c_bus; bus_mux picks the value written to
// rd; pc_next computes the next fetch address, and mem_ctrl puts either that
// fetch address or a data address on address_next. This is the
// single-issue, unpipelined organisation of the core's block diagram; the
// original core's optional extra pipeline stage is not built.
//
// Multi-core addition: bus_req raises req for every load or store outside the
// core's private RAM and pauses the core until ack (the arbiter's grant)
// arrives. mem_pause pauses the core from outside; intr_in requests an
// interrupt, taken when COP0 STATUS bit 0 is set and the current instruction is
// not in a branch delay slot: the instruction is replaced by a no-op, its
// address goes to EPC and execution continues at 0x3C.
//
// Interface (the core's own port list): data_r, ack, clk, intr_in, mem_pause,
// reset_in in; address, address_next, byte_we, byte_we_next, data_w, req out.
// address_next/byte_we_next are the unregistered address and byte write enables
// for a synchronous memory; address/byte_we are their registered copies, which
// tell which access the data on data_r belong to.
//
// Follows the published core: block structure, signal names, the MIPS I user
// instruction set without the misaligned-access instructions (LWL/LWR/SWL/SWR
// decode as no-ops). This design's: the interrupt details, multiply latency
// and the exact pause protocol.
module mlite_cpu
  import plasma_pkg::*;
(
  input  logic        clk,
  input  logic        reset_in,
  input  logic        intr_in,
  input  logic        mem_pause,
  input  logic        ack,
  input  logic [31:0] data_r,
  output logic [31:2] address,
  output logic [31:2] address_next,
  output logic [3:0]  byte_we,
  output logic [3:0]  byte_we_next,
  output logic [31:0] data_w,
  output logic        req
);

  ctrl_t       ctrl;
  logic [31:0] opcode;
  logic [31:0] reg_source, reg_target, reg_dest;
  logic [31:0] a_bus, b_bus, c_bus, c_alu, c_shift, c_mult;
  logic [31:0] pc_current, pc_future, link_addr;
  logic [31:0] data_read, cop0_read;
  logic        take_branch, in_delay_slot, intr_enable;
  logic        mem_pause_out, mult_pause, bus_pause, data_phase;
  logic        pause_ext, advance, take_intr, exception;

  // An interrupt is taken at the start of an instruction, never in the second
  // cycle of a load/store (that instruction has already started).
  logic second_cycle;
  assign take_intr = intr_in && intr_enable && !in_delay_slot && !second_cycle;
  assign exception = take_intr || ctrl.exception;

  assign pause_ext = mem_pause || bus_pause || mult_pause;
  assign advance   = !(pause_ext || mem_pause_out);
  assign c_bus     = c_alu | c_shift | c_mult;

  mem_ctrl u_mem_ctrl (
    .clk          (clk),
    .rst          (reset_in),
    .pause_in     (mem_pause || bus_pause),
    .stall_in     (mult_pause),
    .nullify_op   (take_intr),
    .mem_source   (ctrl.mem_source),
    .address_in   (c_bus),
    .data_write   (reg_target),
    .address_pc   (pc_future[31:2]),
    .data_r       (data_r),
    .opcode_out   (opcode),
    .data_read    (data_read),
    .address_next (address_next),
    .byte_we_next (byte_we_next),
    .address      (address),
    .byte_we      (byte_we),
    .data_w       (data_w),
    .pause_out    (mem_pause_out),
    .data_phase   (data_phase),
    .second_cycle (second_cycle)
  );

  control u_control (
    .opcode (opcode),
    .ctrl   (ctrl)
  );

  pc_next u_pc_next (
    .clk           (clk),
    .rst           (reset_in),
    .advance       (advance),
    .pc_source     (ctrl.pc_source),
    .take_branch   (take_branch),
    .exception     (exception),
    .opcode25_0    (opcode[25:0]),
    .reg_source    (reg_source),
    .pc_current    (pc_current),
    .pc_future     (pc_future),
    .link_addr     (link_addr),
    .in_delay_slot (in_delay_slot)
  );

  reg_bank u_reg_bank (
    .clk          (clk),
    .rst          (reset_in),
    .rs_index     (ctrl.rs_index),
    .rt_index     (ctrl.rt_index),
    .rd_index     (ctrl.rd_index),
    .reg_dest     (reg_dest),
    .write_enable (advance),
    .reg_source   (reg_source),
    .reg_target   (reg_target),
    .cop0_index   (opcode[15:11]),
    .cop0_write   (ctrl.cop0_write && advance),
    .exception    (exception && advance),
    .epc_in       (pc_current),
    .cop0_read    (cop0_read),
    .intr_enable  (intr_enable)
  );

  bus_mux u_bus_mux (
    .imm_in      (ctrl.imm_out),
    .reg_source  (reg_source),
    .a_source    (ctrl.a_source),
    .reg_target  (reg_target),
    .b_source    (ctrl.b_source),
    .c_source    (ctrl.c_source),
    .pc_current  (pc_current),
    .link_addr   (link_addr),
    .c_bus       (c_bus),
    .mem_data    (data_read),
    .cop0_data   (cop0_read),
    .branch_func (ctrl.branch_func),
    .a_bus       (a_bus),
    .b_bus       (b_bus),
    .reg_dest    (reg_dest),
    .take_branch (take_branch)
  );

  alu u_alu (
    .a_in     (a_bus),
    .b_in     (b_bus),
    .alu_func (ctrl.alu_func),
    .c_alu    (c_alu)
  );

  shifter u_shifter (
    .value        (b_bus),
    .shift_amount (a_bus[4:0]),
    .shift_func   (ctrl.shift_func),
    .c_shift      (c_shift)
  );

  mult u_mult (
    .clk       (clk),
    .rst       (reset_in),
    .a_in      (a_bus),
    .b_in      (b_bus),
    .mult_func (ctrl.mult_func),
    .advance   (advance),
    .c_mult    (c_mult),
    .pause_out (mult_pause)
  );

  bus_req u_bus_req (
    .data_phase   (data_phase),
    .data_address (c_bus[31:2]),
    .ack          (ack),
    .req          (req),
    .bus_pause    (bus_pause)
  );

endmodule
