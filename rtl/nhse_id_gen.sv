// nhse_id_gen -- scheduling multiplexers and sCPU ID generator.
//
// For each sCPUi (i >= 1) a multiplexer MUXi chooses, under sel_sch_din, the
// static chain's sCPUi_ready (0) or the dynamic scheduler's mux_i (1). sCPU0
// bypasses the multiplexers and its work flag blocks every other line, so it
// preempts all others in either mode. The resulting vector v is one-hot or
// zero, and the ID generator turns it into a binary number: bit b of the ID
// is the OR of the terms "v[i] and no other v[j]" over every i with bit b set,
// the sum of products printed for ID_Static and ID_Dynamic. The extra top bit
// `idle` is set when no sCPU is selected (ID_Static3/ID_Dynamic3 for n = 8).
// Purely combinational.
//
// The equations follow the document; folding the static and dynamic forms
// into one encoder behind the multiplexers is this design's reading of the
// figure.
module nhse_id_gen #(
  parameter int N    = 4,
  localparam int IDW = (N > 1) ? $clog2(N) : 1
) (
  input  logic           sel_sch_din,
  input  logic [N-1:0]   ready,
  input  logic [N-1:0]   mux_dyn,
  input  logic           scpu_ev0,
  output logic [N-1:0]   sel_vec,
  output logic [IDW-1:0] id,
  output logic           idle
);

  always_comb begin
    sel_vec[0] = ready[0];
    for (int i = 1; i < N; i++)
      sel_vec[i] = (sel_sch_din ? mux_dyn[i] : ready[i]) && !scpu_ev0;
  end

  always_comb begin
    id = '0;
    for (int i = 0; i < N; i++) begin
      logic [N-1:0] others;
      others    = sel_vec;
      others[i] = 1'b0;
      if (sel_vec[i] && !(|others)) id = id | IDW'(i);
    end
    idle = !(|sel_vec);
  end

endmodule
