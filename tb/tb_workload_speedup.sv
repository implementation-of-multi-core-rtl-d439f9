// tb_workload_speedup: measures how much faster a fixed amount of work ends
// on two and on four cores than on one, as a function of the share of
// instructions that use the shared bus. Three copies of the system are built
// side by side (NCORES = 1, 2 and 4, all other parameters at their defaults)
// and run the same total work split evenly over their cores.
//
// The work is a loop of L instructions of which B are loads from the core's
// slot in shared RAM (the others are ALU operations in the private RAM), so B/L
// of all instructions go over the shared bus. Shares of 15 % (3 of 20),
// 4.17 % (1 of 24) and 3.22 % (1 of 31) are the three tasks the speedup-versus
// -work plot is drawn for; the others sweep the bus share from 2 % to 62.5 %
// as in the speedup-versus-bus-share plot. The total is 160 000 instructions,
// the smallest work size of that plot; the 15 % task is also run at 1.6 million
// instructions, the next size, and must give the same speedup, since nothing
// here (no operating system rescheduling tasks) changes with the size. The two
// larger sizes of the plot only repeat the same loop for longer.
//
// The testbench checks that every core finished with the right loop count
// and load sum, that the speedup never exceeds the core count, that four
// cores are never slower than two, and that the speedup falls as the bus
// share rises (for loops whose loads come in bursts; loops with a single load
// let the cores fall into turns on the bus and keep the full speedup up to
// the share where the bus is busy every cycle). It prints one line per configuration with both speedups.
// The bus shares and the smallest work size come from the published measurements; the loop
// shape and everything else are this testbench's choices.
`timescale 1ns/1ps
module tb_workload_speedup;
  import mips_asm_pkg::*;
  import mc_prog_pkg::*;
  localparam int TOTAL = 160000;
  localparam int NCFG = 9;
  localparam int CFG_B [NCFG] = '{3, 1, 1, 1, 1, 1, 2, 5, 3};
  localparam int CFG_L [NCFG] = '{20, 24, 31, 50, 10, 6, 4, 8, 20};
  localparam int CFG_T [NCFG] = '{TOTAL, TOTAL, TOTAL, TOTAL, TOTAL, TOTAL, TOTAL, TOTAL, 10 * TOTAL};

  logic clk = 0, reset = 1;
  logic tx1, tx2, tx4;
  logic [31:0] go1, go2, go4;
  int checks = 0, failures = 0, cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  plasma_multicore #(.NCORES(1)) dut1 (.clk(clk), .reset(reset), .uart_read(1'b1), .uart_write(tx1), .gpio_in(32'h0), .gpio_out(go1));
  plasma_multicore #(.NCORES(2)) dut2 (.clk(clk), .reset(reset), .uart_read(1'b1), .uart_write(tx2), .gpio_in(32'h0), .gpio_out(go2));
  plasma_multicore #(.NCORES(4)) dut4 (.clk(clk), .reset(reset), .uart_read(1'b1), .uart_write(tx4), .gpio_in(32'h0), .gpio_out(go4));

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // One core's program: r2 counts down `iters` iterations; each iteration
  // does B loads of the slot word (value 3) into r3, adds them into r4, and
  // fills up to L instructions with register moves. At the end r4 and the
  // done flag are stored to the slot (+0 sum, +12 flag).
  function automatic prog_t work_program(int id, int iters, int b, int l);
    prog_t p;
    int pc, loop, off;
    for (int i = 0; i < PROG_WORDS; i++) p[i] = 0;
    p[0] = j(32'h80); p[1] = nop();
    pc = 32'h80 / 4;
    p[pc++] = lui(1, 16'h1000);
    p[pc++] = ori(1, 1, id * 32'h100);
    p[pc++] = addiu(2, 0, 0);
    p[pc++] = lui(5, iters >> 16);
    p[pc++] = ori(5, 5, iters & 16'hFFFF);
    p[pc++] = addu(2, 5, 0);
    p[pc++] = addiu(4, 0, 0);
    loop = pc;
    for (int k = 0; k < b; k++) p[pc++] = lw(3, 4, 1);
    p[pc++] = addu(4, 4, 3);             // adds the last load (all loads read the same word)
    for (int k = 0; k < l - b - 4; k++) p[pc++] = addu(6, 6, 3);
    p[pc++] = addiu(2, 2, -1);
    off = loop - (pc + 1);
    p[pc++] = bne(2, 0, off);
    p[pc++] = nop();
    p[pc++] = addiu(7, 0, 1);
    p[pc++] = sw(4, 0, 1);
    p[pc++] = sw(7, 12, 1);
    p[pc] = j(pc * 4); pc++;
    p[pc++] = nop();
    return p;
  endfunction

  prog_t progs [3][4];   // [variant: 1, 2, 4 cores][core]
  int iters [3];
  event load_ev;

  // program loading and done detection, one generate block per core
  for (genvar k = 0; k < 1; k++) begin : g_l1
    always @(load_ev) for (int w = 0; w < PROG_WORDS; w++) dut1.g_core[k].u_local_ram.mem[w] = progs[0][k][w];
  end
  for (genvar k = 0; k < 2; k++) begin : g_l2
    always @(load_ev) for (int w = 0; w < PROG_WORDS; w++) dut2.g_core[k].u_local_ram.mem[w] = progs[1][k][w];
  end
  for (genvar k = 0; k < 4; k++) begin : g_l4
    always @(load_ev) for (int w = 0; w < PROG_WORDS; w++) dut4.g_core[k].u_local_ram.mem[w] = progs[2][k][w];
  end

  function automatic bit all_done(int v);
    bit d = 1;
    for (int k = 0; k < (1 << v); k++) begin
      case (v)
        0: d &= dut1.u_shared_ram.mem[k * 64 + 3] == 1;
        1: d &= dut2.u_shared_ram.mem[k * 64 + 3] == 1;
        default: d &= dut4.u_shared_ram.mem[k * 64 + 3] == 1;
      endcase
    end
    return d;
  endfunction
  function automatic logic [31:0] slot_sum(int v, int k);
    case (v)
      0: return dut1.u_shared_ram.mem[k * 64];
      1: return dut2.u_shared_ram.mem[k * 64];
      default: return dut4.u_shared_ram.mem[k * 64];
    endcase
  endfunction
  task automatic clear_shared();
    for (int w = 0; w < 256; w++) begin
      dut1.u_shared_ram.mem[w] = (w % 64 == 1) ? 32'd3 : 32'd0;
      dut2.u_shared_ram.mem[w] = (w % 64 == 1) ? 32'd3 : 32'd0;
      dut4.u_shared_ram.mem[w] = (w % 64 == 1) ? 32'd3 : 32'd0;
    end
  endtask

  real sp2 [NCFG], sp4 [NCFG];
  int grants4 = 0, contention4 = 0;
  always @(posedge clk) begin
    if (!reset && dut4.gnt != 0 && (dut4.req & ~dut4.gnt) != 0) contention4++;
  end

  initial begin
    for (int c = 0; c < NCFG; c++) begin
      int b, l, per, start, t [3];
      bit d [3];
      b = CFG_B[c];
      l = CFG_L[c];
      per = CFG_T[c] / l;                  // iterations in total
      reset = 1;
      for (int v = 0; v < 3; v++) begin
        iters[v] = per >> v;
        for (int k = 0; k < 4; k++) progs[v][k] = work_program(k, iters[v], b, l);
      end
      ->load_ev;
      #1 clear_shared();
      repeat (3) @(posedge clk);
      #1 reset = 0;
      start = cycle;
      d = '{0, 0, 0};
      t = '{0, 0, 0};
      while (!(d[0] && d[1] && d[2])) begin
        @(posedge clk);
        for (int v = 0; v < 3; v++) if (!d[v] && all_done(v)) begin d[v] = 1; t[v] = cycle - start; end
      end
      for (int v = 0; v < 3; v++)
        for (int k = 0; k < (1 << v); k++)
          chk($sformatf("cfg %0d variant %0d core %0d sum", c, v, k), slot_sum(v, k) == 32'(3 * iters[v]));
      sp2[c] = real'(t[0]) / real'(t[1]);
      sp4[c] = real'(t[0]) / real'(t[2]);
      $display("bus share %5.2f %% (%0d of %0d), %0d instructions: cycles 1/2/4 cores = %0d / %0d / %0d, speedup 2 cores %4.2f, 4 cores %4.2f",
               100.0 * b / l, b, l, CFG_T[c], t[0], t[1], t[2], sp2[c], sp4[c]);
      chk($sformatf("cfg %0d speedup 2 <= 2", c), sp2[c] <= 2.01);
      chk($sformatf("cfg %0d speedup 4 <= 4", c), sp4[c] <= 4.01);
      chk($sformatf("cfg %0d 4 cores not slower than 2", c), sp4[c] >= sp2[c] - 0.01);
    end
    // bus share order: 2 % (cfg 3) < 3.22 % (2) < 4.17 % (1) < 15 % (0) < 50 % (6) < 62.5 % (7).
    // The single-load loops of 10 % and 16.7 % are left out of the order: one
    // load per loop lets the cores settle into turns on the bus, so they reach
    // the full speedup until the bus is busy every cycle.
    begin
      int ord [6] = '{3, 2, 1, 0, 6, 7};
      for (int i = 1; i < 6; i++)
        chk($sformatf("speedup 4 falls from share %0d to %0d", ord[i-1], ord[i]), sp4[ord[i]] <= sp4[ord[i-1]] + 0.01);
    end
    chk("bus contention happened on four cores", contention4 > 0);
    chk("ten times the work gives the same 4-core speedup", sp4[8] > sp4[0] - 0.01 && sp4[8] < sp4[0] + 0.01);
    chk("ten times the work gives the same 2-core speedup", sp2[8] > sp2[0] - 0.01 && sp2[8] < sp2[0] + 0.01);
    chk("low bus share gives near-ideal 4-core speedup", sp4[3] > 3.5);
    chk("high bus share saturates the bus", sp4[7] < 2.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (6000000) @(posedge clk); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
