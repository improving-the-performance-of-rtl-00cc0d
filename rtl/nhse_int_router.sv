// nhse_int_router -- attaches each external interrupt line to one sCPU.
//
// Interrupts share the priority space of the tasks: an interrupt is handled by
// the sCPU it is attached to and so inherits that sCPU's priority. Each line is
// brought through a two-flop synchroniser; a rising edge then produces a
// one-clock IntEv pulse for the sCPU named in `int_map[line]`. Several lines may
// be attached to the same sCPU; their pulses are ORed. The sCPU's own event
// latch (nhse_ready_cell) keeps the event until software clears it.
// Latency: an edge on irq shows on int_ev three clocks later.
//
// The attachment of an interrupt to a single task follows the document; the
// synchroniser, edge detection and the map register per line are this
// design's choices.
module nhse_int_router #(
  parameter int N      = 4,
  parameter int NR_INT = 8,
  localparam int IDW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NR_INT-1:0]        irq,
  input  logic [NR_INT-1:0][IDW-1:0] int_map,
  output logic [N-1:0]             int_ev
);

  logic [NR_INT-1:0] sync1, sync2, prev;
  logic [NR_INT-1:0] rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0;
      sync2 <= '0;
      prev  <= '0;
    end else begin
      sync1 <= irq;
      sync2 <= sync1;
      prev  <= sync2;
    end
  end

  assign rise = sync2 & ~prev;

  logic [N-1:0] hit;

  always_comb begin
    hit = '0;
    for (int l = 0; l < NR_INT; l++)
      if (rise[l]) hit[int_map[l]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) int_ev <= '0;
    else        int_ev <= hit;
  end

endmodule
