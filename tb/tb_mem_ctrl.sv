// tb_mem_ctrl: drives the memory controller against a behavioural synchronous
// memory. Checks that an opcode is passed straight from data_r after a normal
// cycle and held after a stall; that a load or store takes two cycles with the
// data address and byte enables in the first; big-endian byte and halfword
// write enables and data replication; sign and zero extension of every load
// width at every offset; that writes are held off while paused from outside;
// and that nullify_op turns the opcode into a no-op.
// The reference model follows the MIPS I / module behaviour described in its RTL header;
// the random stimulus and the run lengths are this testbench's own choices.
`timescale 1ns/1ps
module tb_mem_ctrl;
  import plasma_pkg::*;
  logic clk = 0, rst = 1, pause_in = 0, stall_in = 0, nullify = 0;
  mem_source_t ms = MEM_FETCH;
  logic [31:0] addr_in = 0, wdata = 0, data_r, opcode, dread, data_w;
  logic [31:2] apc = 0, anext, areg;
  logic [3:0] bwn, bw;
  logic po, dph, sec;
  logic [31:0] mem [64];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mem_ctrl dut (.clk(clk), .rst(rst), .pause_in(pause_in), .stall_in(stall_in), .nullify_op(nullify),
    .mem_source(ms), .address_in(addr_in), .data_write(wdata), .address_pc(apc), .data_r(data_r),
    .opcode_out(opcode), .data_read(dread), .address_next(anext), .byte_we_next(bwn), .address(areg),
    .byte_we(bw), .data_w(data_w), .pause_out(po), .data_phase(dph), .second_cycle(sec));

  always_ff @(posedge clk) begin
    for (int b = 0; b < 4; b++) if (bwn[b]) mem[anext[7:2]][8*b +: 8] <= data_w[8*b +: 8];
    data_r <= mem[anext[7:2]];
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  function automatic logic [31:0] ld(mem_source_t m, logic [31:0] w, logic [1:0] o);
    logic [7:0] b; logic [15:0] h;
    b = w[31 - 8*o -: 8]; h = o[1] ? w[15:0] : w[31:16];
    case (m)
      MEM_READ8S: return {{24{b[7]}}, b};
      MEM_READ8: return {24'b0, b};
      MEM_READ16S: return {{16{h[15]}}, h};
      MEM_READ16: return {16'b0, h};
      default: return w;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 64; i++) mem[i] = 32'hA000_0000 + i * 32'h0101_0101;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // fetch words 5 and 6 in turn
    apc = 30'd5; @(posedge clk); #1;
    chk("opcode from data_r", opcode, mem[5]);
    apc = 30'd6; stall_in = 1; #1; chk("stall: no pause_out", {31'b0, po}, 0);
    @(posedge clk); #1; stall_in = 0;
    chk("opcode held after stall", opcode, mem[5]);
    @(posedge clk); #1;
    chk("next opcode", opcode, mem[6]);
    nullify = 1; #1; chk("nullify", opcode, 0); nullify = 0;
    // loads at every width and offset
    for (int k = 0; k < 40; k++) begin
      mem_source_t m;
      logic [1:0] o;
      int w;
      m = mem_source_t'($urandom_range(1, 5));
      w = $urandom_range(8, 63);
      o = (m == MEM_READ32) ? 2'b00 : (m == MEM_READ16 || m == MEM_READ16S) ? {1'($urandom), 1'b0} : 2'($urandom);
      mem[w] = $urandom;
      ms = m; addr_in = {24'b0, 6'(w), o}; apc = 30'd7;
      #1;
      chk("load first cycle pauses", {31'b0, po}, 1);
      chk("load address", {anext, 2'b00}, {24'b0, 6'(w), 2'b00});
      chk("load no write", {28'b0, bwn}, 0);
      @(posedge clk); #1;
      chk("second cycle", {31'b0, sec}, 1);
      chk("load no pause", {31'b0, po}, 0);
      chk("load data", dread, ld(m, mem[w], o));
      chk("fetch again", {anext, 2'b00}, {30'd7, 2'b00});
      @(posedge clk); #1;
      ms = MEM_FETCH;
    end
    // stores
    for (int k = 0; k < 40; k++) begin
      mem_source_t m;
      logic [1:0] o;
      logic [3:0] ebe;
      logic [31:0] old, expw;
      int w;
      m = mem_source_t'($urandom_range(6, 8));
      w = $urandom_range(8, 63);
      o = (m == MEM_WRITE32) ? 2'b00 : (m == MEM_WRITE16) ? {1'($urandom), 1'b0} : 2'($urandom);
      old = mem[w];
      ms = m; addr_in = {24'b0, 6'(w), o}; wdata = $urandom;
      case (m)
        MEM_WRITE8:  begin ebe = 4'b1000 >> o; expw = old; expw[31 - 8*o -: 8] = wdata[7:0]; end
        MEM_WRITE16: begin ebe = o[1] ? 4'b0011 : 4'b1100; expw = old; if (o[1]) expw[15:0] = wdata[15:0]; else expw[31:16] = wdata[15:0]; end
        default:     begin ebe = 4'b1111; expw = wdata; end
      endcase
      // one cycle of outside pause: no write may happen
      pause_in = (k % 3 == 0);
      #1;
      if (pause_in) begin
        chk("write held off", {28'b0, bwn}, 0);
        @(posedge clk); #1;
        chk("still first cycle", {31'b0, po}, 1);
        pause_in = 0; #1;
      end
      chk("byte enables", {28'b0, bwn}, {28'b0, ebe});
      @(posedge clk); #1;
      chk("registered byte_we", {28'b0, bw}, {28'b0, ebe});
      chk("no write in second cycle", {28'b0, bwn}, 0);
      @(posedge clk); #1;
      ms = MEM_FETCH;
      chk("memory word", mem[w], expw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
