// tb_mlite_cpu: runs a self-checking MIPS I program on one core.
//
// The core fetches from a private RAM (the rtl ram) and reaches a behavioural
// bus memory at 0x1000_0000 through its req/ack pair; the testbench grants the
// bus after a random delay of 0..3 cycles. The program covers ALU, shift,
// set-less-than, LUI/ORI, loops with delay slots, JAL/JR, multiply/divide with
// the HI/LO read stall, byte/halfword/word loads and stores, shared-bus
// accesses, and an interrupt through COP0. Results are stored in RAM and
// compared with values computed here. The cycle count of a straight-line
// block checks one cycle per instruction and two per load/store.
// The reference model follows the MIPS I / module behaviour described in its RTL header;
// the random stimulus and the run lengths are this testbench's own choices.
`timescale 1ns/1ps
module tb_mlite_cpu;
  import mips_asm_pkg::*;

  logic clk = 0, rst = 1, intr = 0, mem_pause = 0, ack = 0;
  logic [31:0] data_r, data_w, local_q, busmem_q;
  logic [31:2] address, address_next;
  logic [3:0]  byte_we, byte_we_next;
  logic        req;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  mlite_cpu dut (
    .clk(clk), .reset_in(rst), .intr_in(intr), .mem_pause(mem_pause), .ack(ack),
    .data_r(data_r), .address(address), .address_next(address_next),
    .byte_we(byte_we), .byte_we_next(byte_we_next), .data_w(data_w), .req(req));

  ram #(.WORDS(1024)) u_ram (
    .clk(clk), .addr(address_next[11:2]),
    .we(address_next[31:28] == 0 ? byte_we_next : 4'b0),
    .wdata(data_w), .rdata(local_q));

  // behavioural shared memory, 256 words at 0x1000_0000, written only when granted
  logic [31:0] busmem [256];
  always_ff @(posedge clk) begin
    if (ack && req) begin
      for (int b = 0; b < 4; b++)
        if (byte_we_next[b]) busmem[address_next[9:2]][8*b +: 8] <= data_w[8*b +: 8];
    end
    busmem_q <= busmem[address_next[9:2]];
  end
  assign data_r = (address[31:28] != 0) ? busmem_q : local_q;

  // grant after a random delay; drop when the request drops
  int wait_cnt = 0;
  int bus_accesses = 0;
  always_ff @(posedge clk) begin
    if (!req) begin ack <= 0; wait_cnt <= $urandom_range(0, 3); end
    else if (!ack) begin
      if (wait_cnt == 0) ack <= 1; else wait_cnt <= wait_cnt - 1;
    end
    if (req && ack) bus_accesses <= bus_accesses + 1;
  end

  // ---------------- program ----------------
  logic [31:0] prog [1024];
  int pc;
  task automatic emit(input logic [31:0] w); prog[pc/4] = w; pc += 4; endtask

  localparam int RES = 32'h400;   // result area
  int t_mark_a = -1, t_mark_b = -1, handler_runs = 0;

  initial begin
    for (int i = 0; i < 1024; i++) prog[i] = 0;
    pc = 0;
    emit(j(32'h80)); emit(nop());
    // interrupt handler at 0x3C: count, return to EPC re-enabling interrupts
    pc = 32'h3C;
    emit(addiu(29, 29, 1)); emit(mfc0(26, 14)); emit(jr(26)); emit(mtc0(30, 12));
    pc = 32'h80;
    emit(addiu(1, 0, 5)); emit(addiu(2, 0, -3));
    emit(addu(3, 1, 2));  emit(sw(3, RES + 0, 0));
    emit(subu(4, 1, 2));  emit(sw(4, RES + 4, 0));
    emit(slt(5, 2, 1));   emit(sltu(6, 2, 1));
    emit(sw(5, RES + 8, 0)); emit(sw(6, RES + 12, 0));
    emit(lui(7, 16'h1234)); emit(ori(7, 7, 16'h5678)); emit(sw(7, RES + 16, 0));
    emit(sll(8, 7, 4));   emit(sw(8, RES + 20, 0));
    emit(sra(9, 2, 1));   emit(sw(9, RES + 24, 0));
    emit(srl(10, 2, 28)); emit(sw(10, RES + 28, 0));
    emit(xor_(11, 7, 2)); emit(sw(11, RES + 32, 0));
    emit(nor_(11, 7, 0)); emit(sw(11, RES + 36, 0));
    emit(andi(11, 2, 16'hF0F0)); emit(sw(11, RES + 40, 0));
    emit(slti(11, 2, -2)); emit(sltiu(12, 1, -1));
    emit(sw(11, RES + 44, 0)); emit(sw(12, RES + 48, 0));
    // loop: sum 10..1
    emit(addiu(12, 0, 0)); emit(addiu(13, 0, 10));
    emit(addu(12, 12, 13)); emit(addiu(13, 13, -1)); emit(bne(13, 0, -3)); emit(nop());
    emit(sw(12, RES + 52, 0));
    // delay slot executes, the next instruction is skipped
    emit(beq(0, 0, 2)); emit(addiu(14, 0, 7)); emit(addiu(14, 0, 99));
    emit(sw(14, RES + 56, 0));
    // enable interrupts (the testbench raises one during the loop below)
    emit(addiu(30, 0, 1)); emit(mtc0(30, 12));
    // call / return
    emit(jal(32'h300)); emit(addiu(16, 0, 1));
    emit(sw(17, RES + 60, 0)); emit(sw(31, RES + 64, 0));
    // multiply / divide
    emit(addiu(18, 0, -7)); emit(addiu(19, 0, 6)); emit(mult_(18, 19));
    emit(mflo(20)); emit(mfhi(21)); emit(sw(20, RES + 68, 0)); emit(sw(21, RES + 72, 0));
    emit(addiu(22, 0, 100)); emit(addiu(23, 0, 7)); emit(divu(22, 23));
    emit(mflo(20)); emit(mfhi(21)); emit(sw(20, RES + 76, 0)); emit(sw(21, RES + 80, 0));
    emit(addiu(22, 0, -100)); emit(div_(22, 23));
    emit(mflo(20)); emit(mfhi(21)); emit(sw(20, RES + 84, 0)); emit(sw(21, RES + 88, 0));
    emit(lui(22, 16'h8000)); emit(ori(22, 22, 3)); emit(multu(22, 22));
    emit(mfhi(21)); emit(mflo(20)); emit(sw(21, RES + 92, 0)); emit(sw(20, RES + 96, 0));
    emit(mthi(7)); emit(mtlo(1)); emit(mfhi(20)); emit(mflo(21));
    emit(sw(20, RES + 100, 0)); emit(sw(21, RES + 104, 0));
    // sub-word loads and stores
    emit(sw(7, RES + 108, 0));
    emit(lb(24, RES + 109, 0)); emit(lbu(25, RES + 111, 0)); emit(lh(26, RES + 110, 0));
    emit(sw(24, RES + 112, 0)); emit(sw(25, RES + 116, 0)); emit(sw(26, RES + 120, 0));
    emit(sb(2, RES + 108, 0)); emit(sh(2, RES + 126, 0)); emit(sw(0, RES + 124, 0));
    emit(sh(2, RES + 126, 0));
    emit(lb(24, RES + 108, 0)); emit(lhu(25, RES + 126, 0));
    emit(sw(24, RES + 128, 0)); emit(sw(25, RES + 132, 0));
    // shared bus accesses at 0x1000_0000
    emit(lui(27, 16'h1000)); emit(sw(7, 0, 27)); emit(lw(28, 0, 27));
    emit(addiu(28, 28, 1)); emit(sw(28, RES + 136, 0)); emit(sb(1, 3, 27));
    emit(lw(28, 0, 27)); emit(sw(28, RES + 140, 0));
    // timing block: marker store, 10 ALU instructions, a load, marker store
    emit(sw(0, RES + 200, 0));
    for (int k = 0; k < 10; k++) emit(addiu(15, 15, 1));
    emit(lw(15, RES + 4, 0));
    emit(sw(0, RES + 204, 0));
    // long loop during which the interrupt arrives
    emit(addiu(13, 0, 40));
    emit(addiu(13, 13, -1)); emit(bgtz(13, -2)); emit(nop());
    emit(sw(29, RES + 144, 0));
    emit(addiu(11, 0, 16'h0DEA)); emit(sw(11, RES + 252, 0));
    emit(j(pc)); emit(nop());
    // function at 0x300
    pc = 32'h300;
    emit(addiu(17, 16, 10)); emit(jr(31)); emit(nop());
    for (int i = 0; i < 1024; i++) u_ram.mem[i] = prog[i];
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] res(int off); return u_ram.mem[(RES + off) / 4]; endfunction

  // external memory pauses at random, except inside the timed block
  int pauses = 0;
  always @(posedge clk) begin
    mem_pause <= !rst && (t_mark_a < 0 || t_mark_b >= 0) && !done && ($urandom_range(0, 5) == 0);
    if (mem_pause) pauses++;
  end

  // markers and interrupt stimulus
  logic done = 0;
  always @(posedge clk) begin
    if (byte_we_next != 0 && address_next == 30'((RES + 200) / 4)) t_mark_a = cycle;
    if (byte_we_next != 0 && address_next == 30'((RES + 204) / 4)) t_mark_b = cycle;
    if (byte_we_next != 0 && address_next == 30'((RES + 252) / 4)) done <= 1;
    if (dut.pc_current == 32'h3C && !rst && dut.advance) handler_runs++;
  end

  initial begin
    logic signed [63:0] p;
    logic [63:0] pu;
    repeat (3) @(posedge clk);
    rst = 0;
    // once the long loop is running, raise the interrupt until the handler starts
    wait (t_mark_b >= 0);
    repeat (20) @(posedge clk);
    intr = 1;
    wait (dut.pc_current == 32'h3C);
    @(posedge clk) intr = 0;
    wait (done);
    repeat (2) @(posedge clk);
    check("add", res(0), 32'd2);
    check("sub", res(4), 32'd8);
    check("slt", res(8), 32'd1);
    check("sltu", res(12), 32'd0);
    check("lui/ori", res(16), 32'h12345678);
    check("sll", res(20), 32'h23456780);
    check("sra", res(24), 32'hFFFFFFFE);
    check("srl", res(28), 32'h0000000F);
    check("xor", res(32), 32'h12345678 ^ 32'hFFFFFFFD);
    check("nor", res(36), ~32'h12345678);
    check("andi", res(40), 32'hFFFFFFFD & 32'h0000F0F0);
    check("slti", res(44), 32'd1);
    check("sltiu", res(48), 32'd1);
    check("loop", res(52), 32'd55);
    check("delay slot", res(56), 32'd7);
    check("jal body", res(60), 32'd11);
    check("jal link", res(64), 32'h80 + 4 * 44);
    p = -64'sd7 * 64'sd6;
    check("mult lo", res(68), p[31:0]);
    check("mult hi", res(72), p[63:32]);
    check("divu q", res(76), 32'd14);
    check("divu r", res(80), 32'd2);
    check("div q", res(84), -32'sd14);
    check("div r", res(88), -32'sd2);
    pu = 64'h80000003 * 64'h80000003;
    check("multu hi", res(92), pu[63:32]);
    check("multu lo", res(96), pu[31:0]);
    check("mthi", res(100), 32'h12345678);
    check("mtlo", res(104), 32'd5);
    check("lb", res(112), 32'h00000034);
    check("lbu", res(116), 32'h00000078);
    check("lh", res(120), 32'h00005678);
    check("sb/lb", res(128), 32'hFFFFFFFD);
    check("sh/lhu", res(132), 32'h0000FFFD);
    check("sb word", res(108), 32'hFD345678);
    check("sh word", res(124), 32'h0000FFFD);
    check("bus lw", res(136), 32'h12345679);
    check("bus sb", res(140), 32'h12345605);
    check("bus mem", busmem[0], 32'h12345605);
    check("interrupt count", res(144), 32'd1);
    check("handler runs", 32'(handler_runs), 32'd1);
    // 2 (marker store) + 10 ALU + 2 (load) = 14 cycles
    check("cycles per instruction", 32'(t_mark_b - t_mark_a), 32'd14);
    checks++;
    if (pauses < 10) begin failures++; $display("FAIL too few pauses %0d", pauses); end
    checks++;
    if (bus_accesses < 4) begin failures++; $display("FAIL too few bus accesses %0d", bus_accesses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
