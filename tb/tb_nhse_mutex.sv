// tb_nhse_mutex -- self-checking test of the global mutexes.
// A reference model (locked flag, owner, waiter set per mutex) is updated
// next to the block for a scripted sequence and then for random operations;
// grant, the read-back state and the MutexEv pulses are compared with it.
module tb_nhse_mutex;
  localparam int N = 4, NR_MUTEX = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic lock, unlock, grant;
  logic [2:0] idx;
  logic [1:0] req_id;
  logic [NR_MUTEX-1:0][2:0] state;
  logic [N-1:0] mutex_ev;

  nhse_mutex #(.N(N), .NR_MUTEX(NR_MUTEX)) dut (
    .clk, .rst_n, .lock, .unlock, .idx, .req_id, .grant, .state, .mutex_ev);

  bit       m_locked [NR_MUTEX];
  int       m_owner  [NR_MUTEX];
  bit [N-1:0] m_wait [NR_MUTEX];
  int       n_wakeups = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic op(input bit is_lock, input int m, input int who);
    bit exp_grant;
    bit [N-1:0] exp_ev;
    exp_ev = '0;
    lock = is_lock; unlock = !is_lock; idx = 3'(m); req_id = 2'(who);
    #1;
    exp_grant = is_lock && (!m_locked[m] || m_owner[m] == who);
    check(grant == exp_grant, $sformatf("grant %0d for %s m%0d by %0d", grant,
          is_lock ? "lock" : "unlock", m, who));
    if (is_lock) begin
      if (!m_locked[m]) begin m_locked[m] = 1; m_owner[m] = who; end
      else if (m_owner[m] != who) m_wait[m][who] = 1'b1;
    end else if (m_locked[m] && m_owner[m] == who) begin
      m_locked[m] = 0; exp_ev = m_wait[m]; m_wait[m] = '0;
    end
    @(negedge clk);
    lock = 0; unlock = 0;
    check(mutex_ev == exp_ev, $sformatf("mutex_ev %b expected %b", mutex_ev, exp_ev));
    if (exp_ev != '0) n_wakeups++;
    check(state[m] == {m_locked[m], 2'(m_owner[m])} || !m_locked[m] && !state[m][2],
          $sformatf("state of m%0d %h", m, state[m]));
  endtask

  initial begin
    lock = 0; unlock = 0; idx = 0; req_id = 0;
    for (int k = 0; k < NR_MUTEX; k++) begin m_locked[k] = 0; m_owner[k] = 0; m_wait[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    op(1, 3, 1);   // sCPU1 takes m3
    op(1, 3, 2);   // sCPU2 must wait
    op(1, 3, 0);   // sCPU0 must wait
    op(0, 3, 2);   // non-owner unlock ignored
    op(1, 3, 1);   // owner relock granted
    op(0, 3, 1);   // release: wakes sCPU0 and sCPU2
    check(n_wakeups == 1, "release woke the waiters");
    op(1, 3, 2);   // sCPU2 retries and wins
    op(0, 3, 2);
    for (int r = 0; r < 300; r++)
      op($urandom_range(0, 1), $urandom_range(0, NR_MUTEX - 1), $urandom_range(0, N - 1));
    check(n_wakeups > 3, $sformatf("random run produced %0d wake-ups", n_wakeups));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
