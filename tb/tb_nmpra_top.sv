// tb_nmpra_top -- end-to-end test of the hardware scheduler at its default
// size (4 sCPUs, no parameter overrides).
//
// The testbench plays the datapath: it issues COP2 reads and writes in the
// name of whichever sCPU is selected, raises interrupt lines and stores to the
// LED address. A scripted task set walks through every mechanism of the
// scheduler: wait and wake-up by timer, watchdog, both deadlines, an attached
// interrupt, a message and a contended mutex; static preemption; dynamic
// scheduling by mrPRI; stopping sCPUs through cr0MSTOP; the global Enable;
// idle cycles; the error bit for servicing an interrupt that is not active.
// Each selection is compared with the expected sCPU, event
// latencies are checked to the clock (a counter event is seen one clock
// after it fires; a message or mutex release two clocks after the write), and the monitoring counters are read
// back over COP2 and compared with counts the testbench keeps of en_pipe.
// Each mechanism is counted and a mechanism never seen counts as a failure.
module tb_nmpra_top;
  import nhse_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic        enable;
  logic [7:0]  irq;
  logic        cop2_wr, cop2_rd;
  cop2_addr_t  cop2_addr;
  logic [31:0] cop2_wdata, cop2_rdata;
  logic [N-1:0] en_pipe;
  logic [3:0]  task_select;
  logic        hse_en;
  logic        dmem_we;
  logic [31:0] dmem_addr, dmem_wdata;
  logic [15:0] leds;

  nmpra_top dut (.*);

  typedef enum int {
    M_PREEMPT, M_TIMER, M_WATCHDOG, M_DEADLINE1, M_DEADLINE2, M_INTERRUPT,
    M_MESSAGE, M_MUTEX_WAIT, M_MUTEX_WAKE, M_DYNAMIC, M_STOP, M_IDLE,
    M_ENABLE_OFF, M_LED, M_INT_ERROR, M_NUM
  } mech_e;
  int mech [M_NUM];

  // reference counts of the monitoring registers
  int r_run [N], r_sleep [N], r_sleep0;
  always @(posedge clk)
    if (rst_n) begin
      for (int i = 0; i < N; i++) if (en_pipe[i]) r_run[i]++; else r_sleep[i]++;
      if (en_pipe == '0) begin r_sleep0++; mech[M_IDLE]++; end
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  task automatic wr(input cop2_group_e g, input int idx, input logic [31:0] d);
    cop2_wr = 1; cop2_addr = cop2_address(g, 8'(idx)); cop2_wdata = d;
    @(negedge clk);
    cop2_wr = 0;
  endtask

  logic [31:0] q;
  // a COP2 read; for G_MUTEX this is the atomic lock attempt
  task automatic rd(input cop2_group_e g, input int idx);
    cop2_rd = 1; cop2_addr = cop2_address(g, 8'(idx));
    #1 q = cop2_rdata;
    @(negedge clk);
    cop2_rd = 0;
  endtask

  function automatic logic [3:0] sel(input int id);
    return (id < 0) ? 4'b1000 : 4'(id);
  endfunction

  task automatic expect_sel(input int id, input string what);
    check(task_select == sel(id) &&
          en_pipe == ((id < 0 || !enable) ? 4'b0 : 4'(1 << id)),
          $sformatf("%s: task_select %b en_pipe %b, expected sCPU %0d", what,
                    task_select, en_pipe, id));
  endtask

  // wait until sCPU `id` is selected; returns the clocks waited
  task automatic wait_sel(input int id, input int limit, output int waited);
    waited = 0;
    while (task_select != sel(id) && waited < limit) begin
      @(negedge clk);
      waited++;
    end
  endtask

  int w;

  initial begin
    enable = 1; irq = '0; cop2_wr = 0; cop2_rd = 0; cop2_addr = 0; cop2_wdata = 0;
    dmem_we = 0; dmem_addr = 0; dmem_wdata = 0;
    for (int i = 0; i < N; i++) begin r_run[i] = 0; r_sleep[i] = 0; end
    r_sleep0 = 0;
    foreach (mech[k]) mech[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_sel(0, "after reset sCPU0 runs");

    // ---- sCPU0 sets up the task set, then waits ----
    wr(G_EN, 1, 32'(1 << EV_T));
    wr(G_EN, 2, 32'((1 << EV_INT) | (1 << EV_SYN) | (1 << EV_MUTEX)));
    wr(G_EN, 3, 32'((1 << EV_WD) | (1 << EV_D1) | (1 << EV_D2)));
    wr(G_INTMAP, 2, 2);                 // interrupt line 2 -> sCPU2
    wr(G_RUN, 0, 0);                    // sCPU0: wait
    expect_sel(-1, "nobody has work");
    check(!hse_en, "nHSE_EN low while idle");

    // ---- timer: sCPU1 woken 20 clocks after the load, one clock to switch ----
    wr(G_TEV, 1, 20);                   // load taken at this clock
    wait_sel(1, 100, w);
    check(w == 21, $sformatf("timer wake-up after %0d clocks, expected 20 + 1", w));
    if (task_select == sel(1)) mech[M_TIMER]++;
    rd(G_EVACK, 1);
    check(q == 32'(1 << EV_T), "sCPU1 sees its timer event");
    wr(G_EVACK, 1, 32'(1 << EV_T));     // handled: sCPU1 waits again
    expect_sel(-1, "sCPU1 back to wait");
    wr(G_TEV, 1, 0);                    // timer off (sCPU0's job; harmless here)
    wr(G_EVACK, 1, 32'h7F);             // drop a tick that may have been latched

    // ---- deadline 1 wakes sCPU3, an interrupt preempts it with sCPU2 ----
    wr(G_D1, 3, 10);
    wait_sel(3, 100, w);
    check(w == 11, $sformatf("deadline 1 after %0d clocks", w));
    if (task_select == sel(3)) mech[M_DEADLINE1]++;
    irq[2] = 1'b1;
    wait_sel(2, 20, w);
    check(w == 4, $sformatf("interrupt switch after %0d clocks, expected 4", w));
    if (task_select == sel(2)) begin mech[M_INTERRUPT]++; mech[M_PREEMPT]++; end
    irq[2] = 1'b0;
    wr(G_SCHED, 0, 2);                  // clear the error bit set by earlier 7F clears
    rd(G_SCHED, 0);
    check(q == 0, "error bit cleared");
    wr(G_EVACK, 2, 32'(1 << EV_INT));
    rd(G_SCHED, 0);
    check(q == 0, "servicing a latched interrupt is no error");
    expect_sel(3, "sCPU3 resumes after the interrupt task");
    wr(G_EVACK, 3, 32'(1 << EV_D1));
    expect_sel(-1, "sCPU3 done");

    // ---- deadline 2 ----
    wr(G_D2, 3, 5);
    wait_sel(3, 50, w);
    check(w == 6, $sformatf("deadline 2 after %0d clocks", w));
    rd(G_EVACK, 3);
    if (q == 32'(1 << EV_D2)) mech[M_DEADLINE2]++;
    wr(G_EVACK, 3, 32'(1 << EV_D2));

    // ---- watchdog: kicked twice, then left to expire ----
    wr(G_WD, 3, 12);
    repeat (2) begin
      repeat (8) @(negedge clk);
      expect_sel(-1, "kicked watchdog stays quiet");
      wr(G_WD, 3, 12);
    end
    wait_sel(3, 50, w);
    check(w == 13, $sformatf("watchdog expired after %0d clocks", w));
    rd(G_EVACK, 3);
    if (q == 32'(1 << EV_WD)) mech[M_WATCHDOG]++;
    wr(G_WD, 3, 0);
    wr(G_EVACK, 3, 32'h7F);             // clears Int too, which is not latched
    rd(G_SCHED, 0);
    check(q == 2, "error bit after servicing an absent interrupt");
    if (q == 2) mech[M_INT_ERROR]++;
    wr(G_SCHED, 0, 2);

    // ---- message and mutex between sCPU3 (background) and sCPU2 ----
    wr(G_RUN, 3, 1);
    expect_sel(3, "sCPU3 runs in the background");
    rd(G_MUTEX, 1);
    check(q == 1, "sCPU3 takes mutex 1");
    wr(G_COMM, 2 * 2 + 1, 32'hDEC0DE01);   // message to sCPU2, register 1
    expect_sel(3, "SynEv is on its way");
    @(negedge clk);
    expect_sel(2, "message wakes sCPU2 two clocks after the write");
    if (task_select == sel(2)) begin mech[M_MESSAGE]++; mech[M_PREEMPT]++; end
    rd(G_COMM, 5);
    check(q == 32'hDEC0DE01, "sCPU2 reads the message");
    rd(G_MUTEX, 1);
    check(q == 0, "mutex 1 is busy for sCPU2");
    if (q == 0) mech[M_MUTEX_WAIT]++;
    wr(G_EVACK, 2, 32'(1 << EV_SYN));
    expect_sel(3, "sCPU2 waits for the mutex");
    wr(G_MUTEX, 1, 0);                  // sCPU3 releases
    expect_sel(3, "MutexEv is on its way");
    @(negedge clk);
    expect_sel(2, "release wakes sCPU2 two clocks after the unlock");
    rd(G_EVACK, 2);
    if (q == 32'(1 << EV_MUTEX)) mech[M_MUTEX_WAKE]++;
    rd(G_MUTEX, 1);
    check(q == 1, "sCPU2 gets the mutex");
    wr(G_MUTEX, 1, 0);
    wr(G_EVACK, 2, 32'h7F);
    expect_sel(3, "back to sCPU3");

    // ---- dynamic scheduling ----
    wr(G_RUN, 1, 1);
    wr(G_RUN, 2, 1);
    expect_sel(1, "static: lowest index wins");
    wr(G_PRI, 1, 1); wr(G_PRI, 2, 2); wr(G_PRI, 3, 9);
    wr(G_SCHED, 0, 1);
    expect_sel(3, "dynamic: highest mrPRI wins");
    if (task_select == sel(3)) mech[M_DYNAMIC]++;
    wr(G_PRI, 3, 0);
    expect_sel(2, "dynamic: priority 0 drops out");
    wr(G_RUN, 0, 1);
    expect_sel(0, "sCPU0 preempts in dynamic mode too");
    if (task_select == sel(0)) mech[M_PREEMPT]++;
    wr(G_RUN, 0, 0);
    wr(G_SCHED, 0, 0);
    expect_sel(1, "static again");

    // ---- cr0MSTOP ----
    wr(G_MSTOP, 0, 32'h2);
    expect_sel(2, "sCPU1 stopped");
    if (task_select == sel(2)) mech[M_STOP]++;
    wr(G_MSTOP, 0, 32'hF);
    expect_sel(-1, "all sCPUs stopped");
    wr(G_MSTOP, 0, 32'h0);
    expect_sel(1, "restarted");

    // ---- Enable ----
    enable = 0;
    #1 expect_sel(1, "Enable low gates en_pipe");
    if (en_pipe == '0 && task_select == sel(1)) mech[M_ENABLE_OFF]++;
    repeat (3) @(negedge clk);
    enable = 1;

    // ---- LEDs ----
    dmem_we = 1; dmem_addr = 32'h3000_0000; dmem_wdata = 32'h0000_A5C3;
    @(negedge clk);
    dmem_we = 0;
    check(leds == 16'hA5C3, "LED store");
    if (leds == 16'hA5C3) mech[M_LED]++;

    // ---- monitoring registers against the reference counts ----
    for (int i = 0; i < N; i++) begin
      cop2_addr = cop2_address(G_CNTRUN, 8'(i));
      #1 check(cop2_rdata == 32'(r_run[i]), $sformatf("mrCntRun[%0d] %0d expected %0d",
                                                  i, cop2_rdata, r_run[i]));
      cop2_addr = cop2_address(G_CNTSLEEP, 8'(i));
      #1 check(cop2_rdata == 32'(r_sleep[i]), $sformatf("mrCntSleep[%0d] %0d expected %0d",
                                                    i, cop2_rdata, r_sleep[i]));
    end
    cop2_addr = cop2_address(G_SLEEP0, 8'd0);
    #1 check(cop2_rdata == 32'(r_sleep0), $sformatf("mr0CntSleep %0d expected %0d",
                                                cop2_rdata, r_sleep0));

    for (int k = 0; k < M_NUM; k++) begin
      $display("mechanism %s: %0d", mech_e'(k), mech[k]);
      check(mech[k] > 0, $sformatf("mechanism %s never happened", mech_e'(k)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
