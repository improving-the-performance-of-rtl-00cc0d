// nhse_dyn_sched -- dynamic scheduler support: picks by mrPRI instead of index.
//
// Among sCPU1..sCPUn-1 that have work (cand) and a non-zero priority register
// mrPRI, it selects the one with the largest priority value and drives its
// line of the one-hot vector mux[] (the figure's mux1..muxn-1). mux[0] stays 0:
// sCPU0 keeps the highest priority in both scheduling modes and is handled by
// the ID generator. A priority of 0 takes an sCPU out of dynamic selection.
// Equal non-zero priorities are a programming error for which the document
// gives no result; here the lower index wins so the output stays one-hot.
// Purely combinational.
//
// That larger numbers mean higher priority and that 0 means "not eligible" are
// this design's choices.
module nhse_dyn_sched #(
  parameter int N     = 4,
  parameter int PRI_W = 8
) (
  input  logic [N-1:0]            cand,
  input  logic [N-1:0][PRI_W-1:0] pri,
  output logic [N-1:0]            mux
);

  always_comb begin
    logic [PRI_W-1:0] best;
    best = '0;
    mux  = '0;
    for (int i = 1; i < N; i++) begin
      if (cand[i] && pri[i] > best) begin
        best = pri[i];
        mux  = '0;
        mux[i] = 1'b1;
      end
    end
  end

endmodule
