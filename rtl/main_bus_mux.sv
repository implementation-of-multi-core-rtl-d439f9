// main_bus_mux: connects the bus of the core that holds the grant to the main bus.
//
// Combinational. ack is the arbiter's one-hot grant vector; the next address,
// next byte write enables, registered address and byte enables, and write data
// of the granted core are passed to the main bus. With no grant the main bus
// carries zeros (no write). Word addresses are 30 bits (31:2) as on the cores.
//
// Connecting the granted core's bus to the main bus follows the published
// system; the AND-OR form of the multiplexer is this design's.
module main_bus_mux #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]       ack,
  input  logic [N-1:0][31:2] address_next_i,
  input  logic [N-1:0][3:0]  byte_we_next_i,
  input  logic [N-1:0][31:2] cpu_address_i,
  input  logic [N-1:0][3:0]  cpu_byte_we_i,
  input  logic [N-1:0][31:0] cpu_data_w_i,
  output logic [31:2]        address_next,
  output logic [3:0]         byte_we_next,
  output logic [31:2]        cpu_address,
  output logic [3:0]         cpu_byte_we,
  output logic [31:0]        cpu_data_w
);

  always_comb begin
    address_next = '0;
    byte_we_next = '0;
    cpu_address  = '0;
    cpu_byte_we  = '0;
    cpu_data_w   = '0;
    for (int i = 0; i < N; i++) begin
      if (ack[i]) begin
        address_next = address_next | address_next_i[i];
        byte_we_next = byte_we_next | byte_we_next_i[i];
        cpu_address  = cpu_address  | cpu_address_i[i];
        cpu_byte_we  = cpu_byte_we  | cpu_byte_we_i[i];
        cpu_data_w   = cpu_data_w   | cpu_data_w_i[i];
      end
    end
  end

endmodule
