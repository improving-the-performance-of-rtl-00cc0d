// nhse_msg -- inter-task communication registers (mrCommReg).
//
// Every sCPU owns NR_COMM 32-bit message registers; register j of sCPU i sits
// at index i*NR_COMM + j. Any sCPU may write any register; the write stores
// the word and, one clock later, gives the owning sCPU a one-clock SynEv pulse
// so that a task waiting for a message is woken. Reads are combinational and
// have no side effect.
//
// The register array and its size NR_REG_INTERTASK_COMM*NR_TASKS follow the
// document; raising SynEv on a write is this design's reading of how messages
// reach the event logic.
module nhse_msg #(
  parameter int N       = 4,
  parameter int NR_COMM = 2,
  localparam int NREG   = N * NR_COMM,
  localparam int AW     = (NREG > 1) ? $clog2(NREG) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] widx,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] ridx,
  output logic [31:0]   rdata,
  output logic [N-1:0]  syn_ev
);

  logic [NREG-1:0][31:0] comm;

  assign rdata = comm[ridx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      comm   <= '0;
      syn_ev <= '0;
    end else begin
      syn_ev <= '0;
      if (we) begin
        comm[widx] <= wdata;
        for (int i = 0; i < N; i++)
          if (int'(widx) / NR_COMM == i) syn_ev[i] <= 1'b1;
      end
    end
  end

endmodule
