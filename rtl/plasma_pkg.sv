// plasma_pkg: types and constants shared by the PLASMA-style MIPS I core and the
// multi-core system around it.
//
// The core turns every 32-bit opcode into a wide control word (ctrl_t below) whose
// fields steer the datapath units: which operands go on the a and b buses, which
// unit result goes back to the register file, what the program counter does and
// what the memory controller does. The field names follow the signal names of the
// original core (alu_func, a_source, c_source, pc_source, mem_source, ...); the
// encodings of each field are this design's own.
//
// The system memory map is this design's own choice (the original core places
// external memory at 0x10000000, which matches the bus addresses seen in its
// simulation): each core has a private RAM at 0x0000_0000, the shared RAM sits
// at 0x1000_0000 and the shared peripherals at 0x2000_0000.
package plasma_pkg;

  typedef enum logic [3:0] {
    ALU_NOTHING, ALU_ADD, ALU_SUB, ALU_LESS_THAN, ALU_LESS_THAN_SIGNED,
    ALU_OR, ALU_AND, ALU_XOR, ALU_NOR
  } alu_func_t;

  typedef enum logic [1:0] {
    SHIFT_NOTHING, SHIFT_LEFT_LOGICAL, SHIFT_RIGHT_LOGICAL, SHIFT_RIGHT_ARITH
  } shift_func_t;

  typedef enum logic [3:0] {
    MULT_NOTHING, MULT_READ_LO, MULT_READ_HI, MULT_WRITE_LO, MULT_WRITE_HI,
    MULT_MULT, MULT_SIGNED_MULT, MULT_DIVIDE, MULT_SIGNED_DIVIDE
  } mult_func_t;

  typedef enum logic [1:0] {
    A_FROM_REG_SOURCE, A_FROM_IMM10_6, A_FROM_PC
  } a_source_t;

  typedef enum logic [1:0] {
    B_FROM_REG_TARGET, B_FROM_IMM, B_FROM_SIGNED_IMM
  } b_source_t;

  typedef enum logic [2:0] {
    C_FROM_NULL, C_FROM_C_BUS, C_FROM_MEMORY, C_FROM_LINK,
    C_FROM_IMM_SHIFT16, C_FROM_COP0
  } c_source_t;

  typedef enum logic [2:0] {
    PC_FROM_INC4, PC_FROM_OPCODE25_0, PC_FROM_BRANCH, PC_FROM_REG_SOURCE
  } pc_source_t;

  typedef enum logic [2:0] {
    BRANCH_NO, BRANCH_YES, BRANCH_EQ, BRANCH_NE,
    BRANCH_LTZ, BRANCH_LEZ, BRANCH_GTZ, BRANCH_GEZ
  } branch_func_t;

  typedef enum logic [3:0] {
    MEM_FETCH, MEM_READ32, MEM_READ16, MEM_READ16S, MEM_READ8, MEM_READ8S,
    MEM_WRITE32, MEM_WRITE16, MEM_WRITE8
  } mem_source_t;

  // Control word produced by the decoder for one instruction.
  typedef struct packed {
    logic [4:0]   rs_index;
    logic [4:0]   rt_index;
    logic [4:0]   rd_index;
    logic [15:0]  imm_out;
    alu_func_t    alu_func;
    shift_func_t  shift_func;
    mult_func_t   mult_func;
    branch_func_t branch_func;
    a_source_t    a_source;
    b_source_t    b_source;
    c_source_t    c_source;
    pc_source_t   pc_source;
    mem_source_t  mem_source;
    logic         cop0_write;   // MTC0
    logic         exception;    // SYSCALL / BREAK
  } ctrl_t;

  // Exception / interrupt vector and reset address of the core.
  localparam logic [31:0] EXC_VECTOR = 32'h0000_003C;
  localparam logic [31:0] RESET_PC   = 32'h0000_0000;

  // COP0 registers the core implements.
  localparam logic [4:0] COP0_STATUS = 5'd12;
  localparam logic [4:0] COP0_EPC    = 5'd14;

  // System memory map (byte addresses).
  localparam logic [3:0] REGION_LOCAL  = 4'h0;
  localparam logic [3:0] REGION_SHARED = 4'h1;
  localparam logic [3:0] REGION_PERIPH = 4'h2;

  // Peripheral register offsets, address bits [7:4] inside REGION_PERIPH.
  localparam logic [3:0] PER_UART       = 4'h0;
  localparam logic [3:0] PER_IRQ_MASK   = 4'h1;
  localparam logic [3:0] PER_IRQ_STATUS = 4'h2;
  localparam logic [3:0] PER_GPIO_OUT   = 4'h3;
  localparam logic [3:0] PER_GPIO_IN    = 4'h4;
  localparam logic [3:0] PER_COUNTER    = 4'h5;

  // A word address (bits 31:2) that leaves the core's private RAM.
  function automatic logic is_bus_addr(input logic [31:2] waddr);
    return waddr[31:28] != REGION_LOCAL;
  endfunction

endpackage
