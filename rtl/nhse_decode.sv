// nhse_decode -- DECODE: turns the selected sCPU ID into pipeline enables.
//
// When Enable is high and an sCPU is selected (idle low), exactly one of the
// en_pipe_sCPUi lines is high, the one whose index equals id; it enables that
// sCPU's program counter, pipeline registers and register file in the
// datapath. Otherwise all lines are low and the pipeline holds. hse_en (the
// nHSE_EN_sCPUi trace of the monitoring waveform) is the OR of all lines.
// Purely combinational.
module nhse_decode #(
  parameter int N    = 4,
  localparam int IDW = (N > 1) ? $clog2(N) : 1
) (
  input  logic           enable,
  input  logic [IDW-1:0] id,
  input  logic           idle,
  output logic [N-1:0]   en_pipe,
  output logic           hse_en
);

  always_comb begin
    en_pipe = '0;
    if (enable && !idle)
      for (int i = 0; i < N; i++)
        en_pipe[i] = (id == IDW'(i));
  end

  assign hse_en = |en_pipe;

endmodule
