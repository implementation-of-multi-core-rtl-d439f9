// tb_plasma_multicore_full: the end-to-end run of tb_plasma_multicore with the
// system at its default parameters (four cores, 2048-word private RAMs,
// 4096-word shared RAM, UART at 434 clocks per bit) and 200 loop iterations per
// core. Each core runs the program of
// mc_prog_pkg from its private RAM; the testbench waits for the four done
// flags in shared RAM and checks every result. It also decodes the UART
// transmit line, sends a byte into the UART receiver while the cores run (core
// 0 takes it by interrupt), and counts how often each mechanism of the system
// happened: bus grants per core, a core waiting while another holds the bus,
// two or more cores queued in the arbiter's FIFO, multiplier stalls, the
// interrupt, the UART in both directions, GPIO and counter reads.
// The system is left at its own defaults; the program and the iteration count are this
// testbench's choices.
`timescale 1ns/1ps
module tb_plasma_multicore_full;
  import mc_prog_pkg::*;
  localparam int N = 4, ITER = 200, CPB = 434;
  logic clk = 0, reset = 1, rx = 1, tx;
  logic [31:0] gin = 32'h5A5A_0001, gout;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  plasma_multicore dut (
    .clk(clk), .reset(reset), .uart_read(rx), .uart_write(tx), .gpio_in(gin), .gpio_out(gout));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  function automatic logic [31:0] shared(int byte_off); return dut.u_shared_ram.mem[byte_off / 4]; endfunction

  // mechanism counters
  int grants [N];
  int contention = 0, queued2 = 0, mult_stalls = 0, irq_taken = 0, uart_tx_bytes = 0;
  logic [N-1:0] gnt_q = 0;
  always @(posedge clk) if (!reset) begin
    cycle <= cycle + 1;
    gnt_q <= dut.gnt;
    for (int i = 0; i < N; i++) if (dut.gnt[i] && !gnt_q[i]) grants[i]++;
    if ((dut.req & ~dut.gnt) != 0 && dut.gnt != 0) contention++;
    if (dut.u_arbiter.count >= 2) queued2++;
    if (dut.g_core[0].u_cpu.mult_pause || dut.g_core[1].u_cpu.mult_pause ||
        dut.g_core[2].u_cpu.mult_pause || dut.g_core[3].u_cpu.mult_pause) mult_stalls++;
    if (dut.g_core[0].u_cpu.take_intr && dut.g_core[0].u_cpu.advance) irq_taken++;
  end

  // UART line decoder
  logic [7:0] tx_byte = 0;
  initial begin
    forever begin
      @(negedge tx);
      if (!reset) begin
        repeat (CPB / 2) @(posedge clk);
        for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); tx_byte[i] = tx; end
        repeat (CPB) @(posedge clk);
        uart_tx_bytes++;
      end
    end
  end

  task automatic send_rx(logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rx = f[i]; repeat (CPB) @(posedge clk); end
  endtask

  prog_t p0, p1, p2, p3;
  initial begin
    p0 = core_program(0, ITER); p1 = core_program(1, ITER);
    p2 = core_program(2, ITER); p3 = core_program(3, ITER);
    for (int k = 0; k < PROG_WORDS; k++) begin
      dut.g_core[0].u_local_ram.mem[k] = p0[k];
      dut.g_core[1].u_local_ram.mem[k] = p1[k];
      dut.g_core[2].u_local_ram.mem[k] = p2[k];
      dut.g_core[3].u_local_ram.mem[k] = p3[k];
    end
    for (int k = 0; k < 256; k++) dut.u_shared_ram.mem[k] = 0;
    for (int i = 0; i < N; i++) grants[i] = 0;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    repeat (200) @(posedge clk);
    send_rx(8'h3C);
    while (!(shared(12) == 1 && shared(12 + 256) == 1 && shared(12 + 512) == 1 && shared(12 + 768) == 1 &&
             uart_tx_bytes >= 1)) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      chk($sformatf("core %0d sum", i), shared(256 * i), expected_sum(ITER));
      chk($sformatf("core %0d read back", i), shared(256 * i + 8), expected_sum(ITER));
    end
    chk("gpio out", gout, 32'hA5);
    chk("gpio in", shared(16), gin);
    chk("counter advanced", {31'b0, shared(20) >= 3 && shared(20) < 200}, 1);
    chk("uart tx byte", {24'b0, tx_byte}, 32'h48);
    chk("uart rx by interrupt", shared(32'h3F0), 32'h3C);
    chk("handler count", shared(24), 1);
    $display("mechanisms: grants %0d %0d %0d %0d, contention %0d, fifo>=2 %0d, mult stalls %0d, irq %0d, uart tx %0d, cycles %0d",
             grants[0], grants[1], grants[2], grants[3], contention, queued2, mult_stalls, irq_taken, uart_tx_bytes, cycle);
    for (int i = 0; i < N; i++) begin checks++; if (grants[i] < ITER) begin failures++; $display("FAIL grants of core %0d", i); end end
    checks++; if (contention == 0) begin failures++; $display("FAIL no bus contention"); end
    checks++; if (queued2 == 0) begin failures++; $display("FAIL FIFO never held two cores"); end
    checks++; if (mult_stalls == 0) begin failures++; $display("FAIL no multiplier stall"); end
    checks++; if (irq_taken != 1) begin failures++; $display("FAIL interrupt taken %0d times", irq_taken); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (400000) @(posedge clk); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
