// arbiter: the main bus arbiter of the multi-core system.
//
// It gives the shared bus to one core at a time. A core asks with req[i] and
// keeps asking until it has finished its access; gnt[i] (registered) says that
// it holds the bus. When the bus is free the first core to ask gets it; requests
// that arrive while the bus is in use go into a FIFO in the order they arrive;
// requests that arrive in the same cycle enter the FIFO in core-number order, so
// the lower-numbered core goes first. When the holder drops its request the bus
// goes, in the next cycle, to the core at the head of the FIFO. The FIFO has
// DEPTH entries; DEPTH must be at least N so that every core can wait at once.
//
// busy[i] tells core i that another core holds the bus; valid is high while the
// holder is still requesting, i.e. while a transfer is on the bus. A request
// that is withdrawn before it is granted is a protocol error (asserted).
//
// First-come bus assignment, the FIFO of waiting requests, core-number order for
// simultaneous requests and a FIFO at least as deep as the core count follow the
// published description of the system; the registered grant and the busy/valid
// meaning (read off its arbiter waveform) are this design's choices.
module arbiter #(
  parameter int unsigned N     = 4,
  parameter int unsigned DEPTH = N
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt,
  output logic [N-1:0] busy,
  output logic         valid
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [IW-1:0] fifo [DEPTH];
  logic [CW-1:0] count;
  logic [N-1:0]  waiting;       // core i is in the FIFO
  logic          owned;
  logic [IW-1:0] owner;

  logic [IW-1:0] fifo_n [DEPTH];
  logic [CW-1:0] count_n;
  logic [N-1:0]  waiting_n;
  logic          owned_n;
  logic [IW-1:0] owner_n;

  always_comb begin
    fifo_n    = fifo;
    count_n   = count;
    waiting_n = waiting;
    owned_n   = owned && req[owner];
    owner_n   = owner;
    // new requests join the tail, lowest core number first
    for (int i = 0; i < N; i++) begin
      if (req[i] && !waiting[i] && !(owned && owner == IW'(i)) && count_n < CW'(DEPTH)) begin
        fifo_n[count_n] = IW'(i);
        count_n         = count_n + 1'b1;
        waiting_n[i]    = 1'b1;
      end
    end
    // a free bus goes to the head of the FIFO
    if (!owned_n && count_n != 0) begin
      owned_n   = 1'b1;
      owner_n   = fifo_n[0];
      waiting_n[fifo_n[0]] = 1'b0;
      for (int k = 0; k < DEPTH - 1; k++) fifo_n[k] = fifo_n[k+1];
      count_n   = count_n - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count   <= '0;
      waiting <= '0;
      owned   <= 1'b0;
      owner   <= '0;
      for (int k = 0; k < DEPTH; k++) fifo[k] <= '0;
    end else begin
      fifo    <= fifo_n;
      count   <= count_n;
      waiting <= waiting_n;
      owned   <= owned_n;
      owner   <= owner_n;
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      gnt[i]  = owned && owner == IW'(i);
      busy[i] = owned && owner != IW'(i);
    end
    valid = owned && req[owner];
  end

  initial assert (DEPTH >= N) else $error("arbiter: DEPTH must be at least N");

  // a waiting core keeps its request up until it is granted
  property p_hold_req(int i);
    @(posedge clk) disable iff (rst) waiting[i] |-> req[i];
  endproperty
  for (genvar g = 0; g < N; g++) begin : g_chk
    a_hold_req: assert property (p_hold_req(g));
  end

endmodule
