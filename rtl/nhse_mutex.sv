// nhse_mutex -- global mutex registers with atomic access (grMutex).
//
// NR_MUTEX mutexes are shared by all sCPUs. Because one pipeline executes one
// sCPU at a time and every operation completes in a single clock, a lock
// attempt is an atomic test-and-set. Operations come from the sCPU named by
// `req_id` (the one currently executing):
//   lock   : free mutex -> taken by req_id, grant = 1; already owned by req_id
//            -> grant = 1; owned by another sCPU -> grant = 0 and req_id is
//            recorded as a waiter of that mutex.
//   unlock : only by the owner. The mutex becomes free and every recorded
//            waiter receives a one-clock MutexEv pulse (next clock), after
//            which it retries its lock. Unlock by a non-owner is ignored.
// `grant` is combinational and valid in the clock of the lock request.
// `state[k]` shows {locked, owner} of mutex k.
//
// The global mutex registers and the MutexEv event follow the document; the
// waiter list, the retry protocol and the read-back layout are this design's.
module nhse_mutex #(
  parameter int N        = 4,
  parameter int NR_MUTEX = 8,
  localparam int IDW     = (N > 1) ? $clog2(N) : 1,
  localparam int MW      = (NR_MUTEX > 1) ? $clog2(NR_MUTEX) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    lock,
  input  logic                    unlock,
  input  logic [MW-1:0]           idx,
  input  logic [IDW-1:0]          req_id,
  output logic                    grant,
  output logic [NR_MUTEX-1:0][IDW:0] state,
  output logic [N-1:0]            mutex_ev
);

  logic [NR_MUTEX-1:0]          locked;
  logic [NR_MUTEX-1:0][IDW-1:0] owner;
  logic [NR_MUTEX-1:0][N-1:0]   waiters;

  assign grant = lock && (!locked[idx] || owner[idx] == req_id);

  always_comb begin
    for (int k = 0; k < NR_MUTEX; k++)
      state[k] = {locked[k], owner[k]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked   <= '0;
      owner    <= '0;
      waiters  <= '0;
      mutex_ev <= '0;
    end else begin
      mutex_ev <= '0;
      if (lock) begin
        if (!locked[idx]) begin
          locked[idx] <= 1'b1;
          owner[idx]  <= req_id;
        end else if (owner[idx] != req_id) begin
          waiters[idx][req_id] <= 1'b1;
        end
      end else if (unlock && locked[idx] && owner[idx] == req_id) begin
        locked[idx]  <= 1'b0;
        mutex_ev     <= waiters[idx];
        waiters[idx] <= '0;
      end
    end
  end

  // lock and unlock come from one instruction and cannot coincide
  assert property (@(posedge clk) disable iff (!rst_n) !(lock && unlock));

endmodule
