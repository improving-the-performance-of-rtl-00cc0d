// nhse_ready_cell -- event latches and ready logic of one sCPU (sCPUi_ready).
//
// Seven event inputs (T, WD, D1, D2, Int, Mutex, Syn; see nhse_pkg) arrive as
// one-clock pulses. An event whose enable bit lr_en[k] is set is caught in the
// latch lr_ev[k] on the rising clock and held until software clears it with
// ev_ack[k] (a new event in the same clock wins over the clear).
// The sCPU has work (scpu_ev, the figure's sCPU_Evi) when it is not stopped by
// mr_stop and either its run flag lr_run is set or any latch is set. It is
// ready (sCPUi_ready) when it has work and no sCPU of higher static priority
// (a lower index, bits [IDX-1:0] of scpu_ev_all) has work, so at most one cell
// of the chain is ready at a time. scpu_ev and ready are combinational from
// the latches, so an event pulse is seen as ready one clock later.
//
// The inputs and outputs follow the scheduler figure; the set/clear rule of
// the latches and the meaning of lr_run are this design's choices.
module nhse_ready_cell
  import nhse_pkg::*;
#(
  parameter int N   = 4,
  parameter int IDX = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ev_vec_t      lr_en,
  input  ev_vec_t      ev_in,
  input  ev_vec_t      ev_ack,
  input  logic         lr_run,
  input  logic         mr_stop,
  input  logic [N-1:0] scpu_ev_all,
  output ev_vec_t      lr_ev,
  output logic         scpu_ev,
  output logic         ready
);

  localparam logic [N-1:0] HIGHER = N'((64'd1 << IDX) - 64'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lr_ev <= '0;
    else        lr_ev <= (lr_ev & ~ev_ack) | (ev_in & lr_en);
  end

  assign scpu_ev = !mr_stop && (lr_run || (|lr_ev));
  assign ready   = scpu_ev && !(|(scpu_ev_all & HIGHER));

endmodule
