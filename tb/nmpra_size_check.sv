// nmpra_size_check -- scheduler exercise for one sCPU count, used by
// tb_nmpra_sizes to run the same checks on several configurations.
//
// Instantiates nmpra_top with N sCPUs and, after `rst_n` rises, checks:
// the idle code (top bit of task_select), the static priority chain for
// random sets of runnable sCPUs, the dynamic choice for random priorities,
// a timer wake-up of the lowest-priority sCPU, and the monitoring counters
// (for every sCPU run + sleep = clocks; sum of run counters + mr0CntSleep =
// clocks). Raises `done` and reports its check and failure counts.
module nmpra_size_check
  import nhse_pkg::*;
#(
  parameter int N = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int IDW = (N > 1) ? $clog2(N) : 1;
  localparam int TSW = ((IDW < 3) ? 3 : IDW) + 1;

  logic        cop2_wr = 0, cop2_rd = 0;
  cop2_addr_t  cop2_addr = 0;
  logic [31:0] cop2_wdata = 0, cop2_rdata;
  logic [N-1:0] en_pipe;
  logic [TSW-1:0] task_select;
  logic        hse_en;
  logic [15:0] leds;

  nmpra_top #(.N(N)) dut (
    .clk, .rst_n, .enable(1'b1), .irq(8'h00),
    .cop2_wr, .cop2_rd, .cop2_addr, .cop2_wdata, .cop2_rdata,
    .en_pipe, .task_select, .hse_en,
    .dmem_we(1'b0), .dmem_addr(32'h0), .dmem_wdata(32'h0), .leds);

  int clocks = 0;
  always @(posedge clk) if (rst_n) clocks <= clocks + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL (N=%0d): %s", N, what); end
  endtask

  task automatic wr(input cop2_group_e g, input int idx, input logic [31:0] d);
    cop2_wr = 1; cop2_addr = cop2_address(g, 8'(idx)); cop2_wdata = d;
    @(negedge clk);
    cop2_wr = 0;
  endtask

  function automatic logic [TSW-1:0] code(input int id);
    return (id < 0) ? TSW'(1) << (TSW - 1) : TSW'(id);
  endfunction

  task automatic expect_id(input int id, input string what);
    check(task_select == code(id) &&
          en_pipe == ((id < 0) ? '0 : N'(1) << id),
          $sformatf("%s: task_select %0h en_pipe %b, expected %0d", what,
                    task_select, en_pipe, id));
  endtask

  initial begin
    logic [N-1:0] run;
    int pri [N];
    done = 0; checks = 0; failures = 0;
    @(posedge rst_n);
    @(negedge clk);
    expect_id(0, "reset");
    wr(G_RUN, 0, 0);
    expect_id(-1, "idle code");
    // static chain
    for (int r = 0; r < 40; r++) begin
      int exp;
      run = N'($urandom);
      for (int i = 0; i < N; i++) wr(G_RUN, i, 32'(run[i]));
      exp = -1;
      for (int i = N - 1; i >= 0; i--) if (run[i]) exp = i;
      expect_id(exp, $sformatf("static, runnable %b", run));
    end
    // dynamic
    wr(G_SCHED, 0, 1);
    for (int r = 0; r < 40; r++) begin
      int exp, best;
      run = N'($urandom);
      for (int i = 0; i < N; i++) begin
        pri[i] = $urandom_range(0, 7);
        wr(G_RUN, i, 32'(run[i]));
        wr(G_PRI, i, 32'(pri[i]));
      end
      exp = -1; best = 0;
      for (int i = 1; i < N; i++) if (run[i] && pri[i] > best) begin best = pri[i]; exp = i; end
      if (run[0]) exp = 0;
      expect_id(exp, $sformatf("dynamic, runnable %b", run));
    end
    wr(G_SCHED, 0, 0);
    for (int i = 0; i < N; i++) wr(G_RUN, i, 0);
    // timer wake-up of the last sCPU
    wr(G_EN, N - 1, 32'(1 << EV_T));
    wr(G_TEV, N - 1, 7);
    repeat (7) @(negedge clk);
    expect_id(-1, "timer not yet latched");
    @(negedge clk);                     // pulse after 7 clocks, latched at the 8th
    expect_id(N - 1, "timer wake-up of the lowest-priority sCPU");
    wr(G_TEV, N - 1, 0);
    wr(G_EVACK, N - 1, 32'h7F);
    expect_id(-1, "idle again");
    // monitoring counters
    begin
      int sum_run;
      sum_run = 0;
      for (int i = 0; i < N; i++) begin
        logic [31:0] r, s;
        cop2_addr = cop2_address(G_CNTRUN, 8'(i));   #1 r = cop2_rdata;
        cop2_addr = cop2_address(G_CNTSLEEP, 8'(i)); #1 s = cop2_rdata;
        check(r + s == 32'(clocks), $sformatf("sCPU%0d run+sleep %0d, clocks %0d", i, r + s, clocks));
        sum_run += int'(r);
      end
      cop2_addr = cop2_address(G_SLEEP0, 8'd0); #1;
      check(sum_run + int'(cop2_rdata) == clocks, "sum of run counters + mr0CntSleep");
    end
    done = 1;
  end
endmodule
