// uart: serial port with one transmit and one receive data register.
//
// Frames are 8 data bits, least significant first, with one start bit, one stop
// bit and no parity; every bit lasts CLKS_PER_BIT clock cycles.
// Transmit: enable_write for one cycle loads data_in and starts a frame on
// uart_write (idle high); busy_write stays high until the stop bit is sent, and
// writes while busy are ignored. Receive: uart_read is synchronised with two
// flip-flops; a falling edge starts a frame, each bit is sampled in its middle,
// and a frame with a valid stop bit lands in data_out with data_avail set.
// enable_read (the processor reading the receive register) clears data_avail.
// The frame format is the document's; the bit timing, the mid-bit sampling and
// the default of 434 clocks per bit (57600 baud at 25 MHz) are this design's.
module uart #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       enable_read,
  input  logic       enable_write,
  input  logic [7:0] data_in,
  output logic [7:0] data_out,
  output logic       busy_write,
  output logic       data_avail,
  input  logic       uart_read,
  output logic       uart_write
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  // ---------------- transmitter ----------------
  logic [9:0]    tx_shift;
  logic [3:0]    tx_bits;
  logic [CW-1:0] tx_cnt;

  assign busy_write = tx_bits != 0;
  assign uart_write = busy_write ? tx_shift[0] : 1'b1;

  always_ff @(posedge clk) begin
    if (reset) begin
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
    end else if (!busy_write) begin
      if (enable_write) begin
        tx_shift <= {1'b1, data_in, 1'b0};
        tx_bits  <= 4'd10;
        tx_cnt   <= CW'(CLKS_PER_BIT - 1);
      end
    end else if (tx_cnt == 0) begin
      tx_shift <= {1'b1, tx_shift[9:1]};
      tx_bits  <= tx_bits - 1'b1;
      tx_cnt   <= CW'(CLKS_PER_BIT - 1);
    end else begin
      tx_cnt <= tx_cnt - 1'b1;
    end
  end

  // ---------------- receiver ----------------
  logic [1:0]    rx_sync;
  logic          rx_busy;
  logic [3:0]    rx_bits;
  logic [CW-1:0] rx_cnt;
  logic [8:0]    rx_shift;

  always_ff @(posedge clk) begin
    if (reset) begin
      rx_sync    <= 2'b11;
      rx_busy    <= 1'b0;
      rx_bits    <= '0;
      rx_cnt     <= '0;
      rx_shift   <= '0;
      data_out   <= '0;
      data_avail <= 1'b0;
    end else begin
      rx_sync <= {rx_sync[0], uart_read};
      if (enable_read) data_avail <= 1'b0;
      if (!rx_busy) begin
        if (!rx_sync[1]) begin
          // start bit seen: wait half a bit to reach its middle
          rx_busy <= 1'b1;
          rx_bits <= 4'd0;
          rx_cnt  <= CW'(CLKS_PER_BIT / 2);
        end
      end else if (rx_cnt != 0) begin
        rx_cnt <= rx_cnt - 1'b1;
      end else begin
        rx_cnt <= CW'(CLKS_PER_BIT - 1);
        if (rx_bits == 0 && rx_sync[1]) begin
          rx_busy <= 1'b0;                  // false start
        end else if (rx_bits == 4'd9) begin
          rx_busy <= 1'b0;
          if (rx_sync[1]) begin             // valid stop bit
            data_out   <= rx_shift[8:1];
            data_avail <= 1'b1;
          end
        end else begin
          rx_shift <= {rx_sync[1], rx_shift[8:1]};
          rx_bits  <= rx_bits + 1'b1;
        end
      end
    end
  end

endmodule
