// tb_main_bus_mux: random bus signals on four cores; for every one-hot grant
// and for no grant the main bus must carry exactly the granted core's signals.
// The reference model follows the MIPS I / module behaviour described in its RTL header;
// the random stimulus and the run lengths are this testbench's own choices.
module tb_main_bus_mux;
  localparam int N = 4;
  logic [N-1:0] ack;
  logic [N-1:0][31:2] an, ca;
  logic [N-1:0][3:0] bn, cb;
  logic [N-1:0][31:0] dw;
  logic [31:2] o_an, o_ca;
  logic [3:0] o_bn, o_cb;
  logic [31:0] o_dw;
  int checks = 0, failures = 0;

  main_bus_mux #(.N(N)) dut (.ack(ack), .address_next_i(an), .byte_we_next_i(bn), .cpu_address_i(ca),
    .cpu_byte_we_i(cb), .cpu_data_w_i(dw), .address_next(o_an), .byte_we_next(o_bn), .cpu_address(o_ca),
    .cpu_byte_we(o_cb), .cpu_data_w(o_dw));

  initial begin
    for (int n = 0; n < 1000; n++) begin
      int g;
      for (int i = 0; i < N; i++) begin
        an[i] = 30'($urandom); ca[i] = 30'($urandom); bn[i] = 4'($urandom); cb[i] = 4'($urandom); dw[i] = $urandom;
      end
      g = $urandom_range(0, N);
      ack = (g == N) ? '0 : (N'(1) << g);
      #1;
      checks++;
      if (g == N) begin
        if (o_an !== 0 || o_bn !== 0 || o_ca !== 0 || o_cb !== 0 || o_dw !== 0) begin failures++; $display("FAIL idle bus"); end
      end else if (o_an !== an[g] || o_bn !== bn[g] || o_ca !== ca[g] || o_cb !== cb[g] || o_dw !== dw[g]) begin
        failures++; $display("FAIL core %0d", g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
