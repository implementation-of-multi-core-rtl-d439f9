// tb_bus_req: every combination of data phase, address region and ack; the
// request must be raised only for a data phase outside the private RAM, and the
// core paused only while such a request is not acknowledged.
// The reference model follows the MIPS I / module behaviour described in its RTL header;
// the random stimulus and the run lengths are this testbench's own choices.
module tb_bus_req;
  logic dp, ack, req, bp;
  logic [31:2] a;
  int checks = 0, failures = 0;

  bus_req dut (.data_phase(dp), .data_address(a), .ack(ack), .req(req), .bus_pause(bp));

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic shared;
      dp = $urandom; ack = $urandom; a = 30'($urandom);
      if (n % 2 == 0) a[31:28] = 4'h0;
      shared = a[31:28] != 0;
      #1;
      checks += 2;
      if (req !== (dp && shared)) begin failures++; $display("FAIL req dp=%b a=%h", dp, a); end
      if (bp !== (dp && shared && !ack)) begin failures++; $display("FAIL pause"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
