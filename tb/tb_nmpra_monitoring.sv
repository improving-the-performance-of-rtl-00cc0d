// tb_nmpra_monitoring -- the monitoring-counter run of the source design.
//
// Replays the sequence shown there for four sCPUs: sCPU2 executes; then the
// pipeline enable drops while task_select still names sCPU2 (the CPU as a
// whole does not run); then sCPU1 is scheduled. In every clock of each phase
// the counters must move as the source describes: the executing sCPU's
// mrCntRun advances and its mrCntSleep holds, every other sCPU's mrCntSleep
// advances and its mrCntRun holds; while nothing is enabled all mrCntSleep and
// mr0CntSleep advance and all mrCntRun hold.
module tb_nmpra_monitoring;
  import nhse_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        enable = 1;
  logic        cop2_wr = 0, cop2_rd = 0;
  cop2_addr_t  cop2_addr = 0;
  logic [31:0] cop2_wdata = 0, cop2_rdata;
  logic [N-1:0] en_pipe;
  logic [3:0]  task_select;
  logic        hse_en;
  logic [15:0] leds;

  nmpra_top dut (.clk, .rst_n, .enable, .irq(8'h00), .cop2_wr, .cop2_rd, .cop2_addr,
                 .cop2_wdata, .cop2_rdata, .en_pipe, .task_select, .hse_en,
                 .dmem_we(1'b0), .dmem_addr(32'h0), .dmem_wdata(32'h0), .leds);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input cop2_group_e g, input int idx, input logic [31:0] d);
    cop2_wr = 1; cop2_addr = cop2_address(g, 8'(idx)); cop2_wdata = d;
    @(negedge clk);
    cop2_wr = 0;
  endtask

  // run `n` clocks with sCPU `runner` executing (-1: none) and check deltas
  task automatic phase(input int runner, input int n, input string name);
    logic [N-1:0][31:0] r0, s0;
    logic [31:0] z0;
    for (int c = 0; c < n; c++) begin
      r0 = dut.cnt_run; s0 = dut.cnt_sleep; z0 = dut.cnt0_sleep;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        check(dut.cnt_run[i] == r0[i] + 32'(i == runner),
              $sformatf("%s: mrCntRun[%0d] %h after %h", name, i, dut.cnt_run[i], r0[i]));
        check(dut.cnt_sleep[i] == s0[i] + 32'(i != runner),
              $sformatf("%s: mrCntSleep[%0d] %h after %h", name, i, dut.cnt_sleep[i], s0[i]));
      end
      check(dut.cnt0_sleep == z0 + 32'(runner < 0), $sformatf("%s: mr0CntSleep", name));
      check(hse_en == (runner >= 0), $sformatf("%s: nHSE_EN_sCPUi", name));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    phase(0, 5, "sCPU0 after reset");
    wr(G_RUN, 2, 1);
    wr(G_RUN, 0, 0);
    check(task_select == 4'd2, "sCPU2 selected");
    phase(2, 40, "sCPU2 executes");
    enable = 0;                                       // sCPU2 stops executing
    #1;
    check(task_select == 4'd2 && en_pipe == '0, "task_select stays 2, no enable");
    phase(-1, 20, "pipeline disabled");
    enable = 1;
    wr(G_RUN, 1, 1);                                  // sCPU1 scheduled
    check(task_select == 4'd1, "sCPU1 selected");
    phase(1, 40, "sCPU1 executes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
