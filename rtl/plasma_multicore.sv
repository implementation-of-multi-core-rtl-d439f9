// plasma_multicore: NCORES PLASMA-style MIPS I cores that share one main bus.
//
// Each core runs from its own private RAM (LOCAL_WORDS words at 0x0000_0000),
// from which it fetches every instruction without touching the shared bus, so
// the cores only compete for the bus on their loads and stores to shared
// addresses. Those go through the core's request line to the arbiter, which
// grants the bus to one core at a time (first come first served, FIFO order,
// core number breaking ties); the main bus multiplexer then connects the
// granted core's address, byte enables and write data to the main bus. On the
// main bus sit the shared RAM (SHARED_WORDS words at 0x1000_0000) and the
// peripherals at 0x2000_0000: UART data register (+0x00), interrupt mask
// (+0x10), interrupt status (+0x20), GPIO output (+0x30), GPIO input (+0x40)
// and the clock-cycle counter (+0x50). A main-bus access is acted on only while
// the arbiter's valid is high, i.e. while the granted core is still requesting.
// The read data of the bus are registered and returned to every core; each core
// takes them when its own registered address points outside its private RAM.
//
// Interrupt sources: bit 0 UART data available, bit 1 UART transmitter idle,
// bit 2 counter bit COUNTER_IRQ_BIT, bit 3 GPIO input bit 31. The masked
// interrupt goes to all cores; a core takes it only if it has enabled
// interrupts in its COP0 status register.
//
// Timing of one shared access: the core raises its request in the first cycle
// of the load/store and waits; the grant arrives one cycle after the request
// (if the bus is free); in the granted cycle the access is made; the data
// return in the next cycle, when the request is dropped; the arbiter frees the
// bus at the end of that cycle. The private RAMs, the address map, the
// interrupt sources and all sizes are this design's choices: the document gives
// the cores, arbiter, multiplexer and peripheral list, not these details.
//
// Unused on purpose: the arbiter's busy vector and the main bus's registered
// address and byte enables are produced, as in the published arbiter and
// multiplexer diagrams, but the slaves here act on the next address alone and
// nothing waits on busy (a waiting core is already paused by its missing
// grant). Address bits 27:14 are not decoded, so the shared RAM and the
// peripheral block repeat through their 256 MB regions.
module plasma_multicore
  import plasma_pkg::*;
#(
  parameter int unsigned NCORES          = 4,
  parameter int unsigned LOCAL_WORDS     = 2048,
  parameter int unsigned SHARED_WORDS    = 4096,
  parameter int unsigned CLKS_PER_BIT    = 434,
  parameter int unsigned COUNTER_IRQ_BIT = 18
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        uart_read,
  output logic        uart_write,
  input  logic [31:0] gpio_in,
  output logic [31:0] gpio_out
);

  localparam int unsigned LAW = $clog2(LOCAL_WORDS);
  localparam int unsigned SAW = $clog2(SHARED_WORDS);

  logic [NCORES-1:0]       req, gnt, busy;
  logic                    bus_valid;
  logic [NCORES-1:0][31:2] c_address, c_address_next;
  logic [NCORES-1:0][3:0]  c_byte_we, c_byte_we_next;
  logic [NCORES-1:0][31:0] c_data_w;
  logic [31:0]             c_data_r [NCORES];
  logic [31:0]             local_q  [NCORES];
  logic [31:0]             bus_rdata;
  logic                    intr;

  for (genvar i = 0; i < NCORES; i++) begin : g_core
    mlite_cpu u_cpu (
      .clk          (clk),
      .reset_in     (reset),
      .intr_in      (intr),
      .mem_pause    (1'b0),
      .ack          (gnt[i]),
      .data_r       (c_data_r[i]),
      .address      (c_address[i]),
      .address_next (c_address_next[i]),
      .byte_we      (c_byte_we[i]),
      .byte_we_next (c_byte_we_next[i]),
      .data_w       (c_data_w[i]),
      .req          (req[i])
    );

    ram #(.WORDS(LOCAL_WORDS)) u_local_ram (
      .clk   (clk),
      .addr  (c_address_next[i][LAW+1:2]),
      .we    (is_bus_addr(c_address_next[i]) ? 4'b0 : c_byte_we_next[i]),
      .wdata (c_data_w[i]),
      .rdata (local_q[i])
    );

    assign c_data_r[i] = is_bus_addr(c_address[i]) ? bus_rdata : local_q[i];
  end

  arbiter #(.N(NCORES)) u_arbiter (
    .clk   (clk),
    .rst   (reset),
    .req   (req),
    .gnt   (gnt),
    .busy  (busy),
    .valid (bus_valid)
  );

  logic [31:2] bus_address_next, bus_address;
  logic [3:0]  bus_byte_we_next, bus_byte_we;
  logic [31:0] bus_data_w;

  main_bus_mux #(.N(NCORES)) u_main_bus_mux (
    .ack            (gnt),
    .address_next_i (c_address_next),
    .byte_we_next_i (c_byte_we_next),
    .cpu_address_i  (c_address),
    .cpu_byte_we_i  (c_byte_we),
    .cpu_data_w_i   (c_data_w),
    .address_next   (bus_address_next),
    .byte_we_next   (bus_byte_we_next),
    .cpu_address    (bus_address),
    .cpu_byte_we    (bus_byte_we),
    .cpu_data_w     (bus_data_w)
  );

  // ---------------- main bus decode ----------------
  logic [3:0]  region, region_q;
  logic [3:0]  per_sel;
  logic        sel_shared, sel_per, per_wr, per_rd;
  logic [31:0] shared_q, per_q;

  assign region     = bus_address_next[31:28];
  assign per_sel    = bus_address_next[7:4];
  assign sel_shared = bus_valid && region == REGION_SHARED;
  assign sel_per    = bus_valid && region == REGION_PERIPH;
  assign per_wr     = sel_per && bus_byte_we_next != 4'b0;
  assign per_rd     = sel_per && bus_byte_we_next == 4'b0;

  ram #(.WORDS(SHARED_WORDS)) u_shared_ram (
    .clk   (clk),
    .addr  (bus_address_next[SAW+1:2]),
    .we    (sel_shared ? bus_byte_we_next : 4'b0),
    .wdata (bus_data_w),
    .rdata (shared_q)
  );

  // ---------------- peripherals ----------------
  logic [7:0]  uart_rx_data;
  logic        uart_busy, uart_avail;
  logic [7:0]  irq_status, irq_mask;
  logic [31:0] count, gpio_in_q;

  uart #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk          (clk),
    .reset        (reset),
    .enable_read  (per_rd && per_sel == PER_UART),
    .enable_write (per_wr && per_sel == PER_UART),
    .data_in      (bus_data_w[7:0]),
    .data_out     (uart_rx_data),
    .busy_write   (uart_busy),
    .data_avail   (uart_avail),
    .uart_read    (uart_read),
    .uart_write   (uart_write)
  );

  irq_regs #(.NIRQ(8)) u_irq (
    .clk        (clk),
    .rst        (reset),
    .sources    ({4'b0, gpio_in_q[31], count[COUNTER_IRQ_BIT], !uart_busy, uart_avail}),
    .mask_we    (per_wr && per_sel == PER_IRQ_MASK),
    .mask_wdata (bus_data_w[7:0]),
    .status     (irq_status),
    .mask       (irq_mask),
    .intr_out   (intr)
  );

  counter_reg u_counter (
    .clk   (clk),
    .rst   (reset),
    .count (count)
  );

  gpio #(.WIDTH(32)) u_gpio (
    .clk       (clk),
    .rst       (reset),
    .out_we    (per_wr && per_sel == PER_GPIO_OUT),
    .out_wdata (bus_data_w),
    .gpio_out  (gpio_out),
    .gpio_in   (gpio_in),
    .gpio_in_q (gpio_in_q)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      region_q <= '0;
      per_q    <= '0;
    end else begin
      region_q <= region;
      unique case (per_sel)
        PER_UART:       per_q <= {24'b0, uart_rx_data};
        PER_IRQ_MASK:   per_q <= {24'b0, irq_mask};
        PER_IRQ_STATUS: per_q <= {24'b0, irq_status};
        PER_GPIO_OUT:   per_q <= gpio_out;
        PER_GPIO_IN:    per_q <= gpio_in_q;
        PER_COUNTER:    per_q <= count;
        default:        per_q <= '0;
      endcase
    end
  end

  assign bus_rdata = (region_q == REGION_SHARED) ? shared_q : per_q;

  // at most one core holds the bus
  a_one_grant: assert property (@(posedge clk) disable iff (reset) $onehot0(gnt));

endmodule
