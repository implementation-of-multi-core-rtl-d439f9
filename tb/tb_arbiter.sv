// tb_arbiter: four cores request the bus. Directed part: a lone request is
// granted in the next cycle; simultaneous requests are served in core-number
// order; a request that arrives later waits behind earlier ones even if its core
// number is lower; with all four requesting all the time the grant rotates
// 1, 2, 4, 8 and busy is the complement of the grant. Random part: cores
// request, hold the bus 1..4 cycles and release, and the grant is compared each
// cycle with a first-come-first-served queue model.
// The arbitration rules checked are the published ones; the request patterns are this
// testbench's choices.
`timescale 1ns/1ps
module tb_arbiter;
  localparam int N = 4;
  logic clk = 0, rst = 1, valid;
  logic [N-1:0] req = 0, gnt, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  arbiter #(.N(N)) dut (.clk(clk), .rst(rst), .req(req), .gnt(gnt), .busy(busy), .valid(valid));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h at %0t", what, got, exp, $time); end
  endtask

  // model state
  int q[$];
  int owner = -1;

  task automatic model_step();
    if (owner >= 0 && !req[owner]) owner = -1;
    for (int i = 0; i < N; i++)
      if (req[i] && owner != i && !(i inside {q})) q.push_back(i);
    if (owner < 0 && q.size() > 0) owner = q.pop_front();
  endtask

  int hold [N];
  int rotations = 0;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // lone request
    req = 4'b0100; #1 chk("no grant yet", gnt, 0);
    @(posedge clk); #1 chk("lone grant", gnt, 4'b0100); chk("busy", busy, 4'b1011); chk("valid", valid, 1);
    // simultaneous requests 0 and 3 while 2 holds the bus
    req = 4'b1101; @(posedge clk); #1 chk("holder keeps", gnt, 4'b0100);
    // core 1 requests later
    req = 4'b1111; @(posedge clk); #1;
    // each step releases whoever holds the bus, so a wrong order is only counted
    req = req & ~gnt; @(posedge clk); #1 chk("core 0 first", gnt, 4'b0001);
    req = req & ~gnt; @(posedge clk); #1 chk("core 3 before later core 1", gnt, 4'b1000);
    req = req & ~gnt; @(posedge clk); #1 chk("core 1 last", gnt, 4'b0010);
    req = req & ~gnt; @(posedge clk); #1 chk("released", gnt, 0); chk("not valid", valid, 0);
    // all request, each holds one cycle then re-requests
    repeat (3) @(posedge clk);
    for (int r = 0; r < 8; r++) begin
      int g;
      req = 4'b1111; @(posedge clk); #1;
      g = $clog2(gnt);
      chk("rotation", gnt, 4'b0001 << (r % 4));
      chk("busy = ~grant", {28'b0, busy}, {28'b0, ~gnt});
      req[g] = 0; @(posedge clk); #1;
      if (gnt == (4'b0001 << ((r + 1) % 4))) rotations++;
    end
    chk("rotations seen", rotations, 8);
    // let the waiting cores finish, one after another
    while (req != 0) begin
      if (gnt != 0) req = req & ~gnt;
      @(posedge clk); #1;
    end
    repeat (2) @(posedge clk); #1;
    // random traffic against the model
    q.delete(); owner = -1;
    for (int i = 0; i < N; i++) hold[i] = 0;
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < N; i++) begin
        if (gnt[i]) begin
          if (hold[i] == 0) hold[i] = $urandom_range(1, 4);
          hold[i]--;
          if (hold[i] == 0) req[i] = 0;
        end else if (!req[i]) req[i] = ($urandom_range(0, 3) == 0);
      end
      model_step();
      @(posedge clk); #1;
      chk("random grant", gnt, owner < 0 ? 0 : (1 << owner));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
