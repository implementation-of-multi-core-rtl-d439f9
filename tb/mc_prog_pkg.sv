// mc_prog_pkg: test programs for the multi-core system.
//
// core_program(id, n) builds the program one core runs from its private RAM.
// Every core computes sum(i*i, i = 0..n-1) with MULTU/MFLO, and in every loop
// iteration stores the running sum to its slot in shared RAM and loads it back
// (two shared-bus accesses per eight-instruction iteration). The slot of core
// id is at 0x1000_0000 + 0x100*id: +0 final sum, +4 running sum, +8 value last
// read back, +12 done flag (1). Core 0 also drives the peripherals first: it
// writes 0xA5 to the GPIO output, copies the GPIO input to +16, stores the
// difference of two counter reads to +20, sends 'H' on the UART, and enables
// the UART receive interrupt; its interrupt handler (at 0x3C) reads the UART
// data register, stores the byte at 0x1000_03F0 and counts in +24.
// The programs, the slot layout and the sizes are this design's own test choices.
package mc_prog_pkg;
  import mips_asm_pkg::*;

  localparam int PROG_WORDS = 256;
  typedef logic [31:0] prog_t [PROG_WORDS];

  function automatic prog_t core_program(int id, int n);
    prog_t p;
    int pc, loop;
    for (int i = 0; i < PROG_WORDS; i++) p[i] = 0;
    p[0] = j(32'h80); p[1] = nop();
    if (id == 0) begin
      // interrupt handler
      pc = 32'h3C / 4;
      p[pc++] = lui(27, 16'h2000);
      p[pc++] = lw(26, 0, 27);             // UART data (clears data available)
      p[pc++] = lui(27, 16'h1000);
      p[pc++] = sw(26, 16'h3F0, 27);
      p[pc++] = addiu(25, 25, 1);
      p[pc++] = sw(25, 24, 1);
      p[pc++] = mfc0(26, 14);
      p[pc++] = jr(26);
      p[pc++] = mtc0(30, 12);              // re-enable in the delay slot
    end
    pc = 32'h80 / 4;
    p[pc++] = lui(1, 16'h1000);
    p[pc++] = ori(1, 1, id * 32'h100);
    if (id == 0) begin
      p[pc++] = lui(8, 16'h2000);
      p[pc++] = ori(9, 0, 16'hA5);
      p[pc++] = sw(9, 16'h30, 8);          // GPIO out
      p[pc++] = lw(10, 16'h40, 8);         // GPIO in
      p[pc++] = sw(10, 16, 1);
      p[pc++] = lw(11, 16'h50, 8);         // counter
      p[pc++] = lw(12, 16'h50, 8);
      p[pc++] = subu(13, 12, 11);
      p[pc++] = sw(13, 20, 1);
      p[pc++] = ori(9, 0, 16'h48);
      p[pc++] = sw(9, 0, 8);               // UART transmit 'H'
      p[pc++] = ori(9, 0, 1);
      p[pc++] = sw(9, 16'h10, 8);          // IRQ mask: UART data available
      p[pc++] = ori(30, 0, 1);
      p[pc++] = mtc0(30, 12);              // interrupts on
    end
    p[pc++] = ori(2, 0, n);
    p[pc++] = ori(3, 0, 0);
    p[pc++] = ori(4, 0, 0);
    loop = pc;
    p[pc++] = multu(4, 4);
    p[pc++] = mflo(5);
    p[pc++] = addu(3, 3, 5);
    p[pc++] = sw(3, 4, 1);
    p[pc++] = lw(6, 4, 1);
    p[pc++] = addiu(4, 4, 1);
    p[pc] = bne(4, 2, loop - (pc + 1));   // offset from the delay slot
    pc++;
    p[pc++] = nop();
    p[pc++] = sw(3, 0, 1);
    p[pc++] = sw(6, 8, 1);
    p[pc++] = ori(7, 0, 1);
    p[pc++] = sw(7, 12, 1);
    p[pc] = j(pc * 4); p[pc + 1] = nop();
    return p;
  endfunction

  function automatic logic [31:0] expected_sum(int n);
    logic [31:0] s = 0;
    for (int i = 0; i < n; i++) s += 32'(i * i);
    return s;
  endfunction
endpackage
