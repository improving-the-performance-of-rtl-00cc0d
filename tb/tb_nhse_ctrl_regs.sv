// tb_nhse_ctrl_regs -- self-checking test of the COP2 register block.
// Checks the reset values, writes and reads back every configuration group,
// checks that each strobe group raises exactly the addressed strobe for one
// clock and that reads of the unit groups return the read-back inputs.
module tb_nhse_ctrl_regs;
  import nhse_pkg::*;
  localparam int N = 4, NR_INT = 8, NR_COMM = 2, NR_MUTEX = 8, PRI_W = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cop2_wr, cop2_rd;
  cop2_addr_t cop2_addr;
  logic [31:0] cop2_wdata, cop2_rdata;
  ev_vec_t [N-1:0] lr_en, ev_ack, lr_ev;
  logic [N-1:0] lr_run, tev_load, wd_load, d1_load, d2_load;
  logic [31:0] cr0_mstop, cnt0_sleep, comm_rdata;
  logic sel_dyn, comm_we, mutex_lock, mutex_unlock, mutex_grant;
  logic [N-1:0][PRI_W-1:0] mr_pri;
  logic [NR_INT-1:0][1:0] int_map;
  logic [N-1:0][31:0] tev_period, wd_period, d1_period, d2_period, cnt_run, cnt_sleep;

  nhse_ctrl_regs #(.N(N), .NR_INT(NR_INT), .NR_COMM(NR_COMM), .NR_MUTEX(NR_MUTEX),
                   .PRI_W(PRI_W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input cop2_group_e g, input int idx, input logic [31:0] d);
    @(negedge clk);
    cop2_wr = 1; cop2_addr = cop2_address(g, 8'(idx)); cop2_wdata = d;
    @(negedge clk);
    cop2_wr = 0;
  endtask

  // combinational read: present the address, let the read mux settle
  logic [31:0] q;
  task automatic rd(input cop2_group_e g, input int idx);
    cop2_addr = cop2_address(g, 8'(idx));
    #1 q = cop2_rdata;
  endtask

  initial begin
    cop2_wr = 0; cop2_rd = 0; cop2_addr = 0; cop2_wdata = 0;
    mutex_grant = 0; comm_rdata = 32'hC0FFEE00; cnt0_sleep = 32'h1234;
    for (int i = 0; i < N; i++) begin
      lr_ev[i] = ev_vec_t'(i + 1);
      tev_period[i] = 32'h100 + i; wd_period[i] = 32'h200 + i;
      d1_period[i] = 32'h300 + i;  d2_period[i] = 32'h400 + i;
      cnt_run[i] = 32'h500 + i;    cnt_sleep[i] = 32'h600 + i;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(lr_run == 4'b0001, "only sCPU0 runs after reset");
    check(lr_en == '0 && cr0_mstop == 0 && !sel_dyn && mr_pri == '0, "reset values");
    // configuration groups
    for (int i = 0; i < N; i++) begin
      wr(G_EN, i, 32'h7F - i);
      wr(G_PRI, i, 32'(10 * i + 1));
      wr(G_RUN, i, 32'(i % 2));
    end
    for (int i = 0; i < N; i++) begin
      #1;
      rd(G_EN, i); check(lr_en[i] == ev_vec_t'(7'h7F - 7'(i)) && q == 32'h7F - i, $sformatf("lr_en[%0d]", i));
      rd(G_PRI, i); check(mr_pri[i] == PRI_W'(10 * i + 1) && q == 32'(10 * i + 1), "mrPRI");
      rd(G_RUN, i); check(lr_run[i] == i[0] && q == 32'(i % 2), "lr_run");
    end
    wr(G_MSTOP, 0, 32'h0000000F);
    rd(G_MSTOP, 0); check(cr0_mstop == 32'hF && q == 32'hF, "cr0MSTOP");
    wr(G_SCHED, 0, 1);
    rd(G_SCHED, 0); check(sel_dyn && q == 1, "dynamic mode");
    for (int l = 0; l < NR_INT; l++) wr(G_INTMAP, l, 32'(3 - l % 4));
    for (int l = 0; l < NR_INT; l++) begin
      rd(G_INTMAP, l); check(int_map[l] == 2'(3 - l % 4) && q == 32'(3 - l % 4), "int map");
    end
    // out-of-range index is ignored and reads 0
    wr(G_PRI, 9, 32'h55);
    rd(G_PRI, 9); check(q == 0 && mr_pri[1] == 8'd11, "out-of-range index");
    // strobes
    begin
      static cop2_group_e gs [5] = '{G_TEV, G_WD, G_D1, G_D2, G_EVACK};
      foreach (gs[k])
        for (int i = 0; i < N; i++) begin
          cop2_wr = 1; cop2_addr = cop2_address(gs[k], 8'(i)); cop2_wdata = 32'h7F;
          #1;
          check(tev_load == ((gs[k] == G_TEV) ? 4'(1 << i) : 4'b0), "tev_load");
          check(wd_load  == ((gs[k] == G_WD)  ? 4'(1 << i) : 4'b0), "wd_load");
          check(d1_load  == ((gs[k] == G_D1)  ? 4'(1 << i) : 4'b0), "d1_load");
          check(d2_load  == ((gs[k] == G_D2)  ? 4'(1 << i) : 4'b0), "d2_load");
          for (int j = 0; j < N; j++)
            check(ev_ack[j] == ((gs[k] == G_EVACK && i == j) ? 7'h7F : 7'h0), "ev_ack");
          check(!comm_we && !mutex_lock && !mutex_unlock, "no stray strobe");
          @(negedge clk);
          cop2_wr = 0;
          #1 check(tev_load == 0 && wd_load == 0 && ev_ack == '0, "strobe lasts one clock");
        end
    end
    cop2_wr = 1; cop2_addr = cop2_address(G_COMM, 8'd5); #1 check(comm_we, "comm_we");
    cop2_addr = cop2_address(G_MUTEX, 8'd2); #1 check(mutex_unlock && !mutex_lock, "unlock strobe");
    cop2_wr = 0; cop2_rd = 1; #1 check(mutex_lock && !mutex_unlock, "lock strobe on read");
    mutex_grant = 1; #1 check(cop2_rdata == 1, "grant read back");
    @(negedge clk); cop2_rd = 0;
    // read-back groups
    for (int i = 0; i < N; i++) begin
      rd(G_TEV, i); check(q == 32'h100 + i, "timer period");
      rd(G_WD, i); check(q == 32'h200 + i, "watchdog period");
      rd(G_D1, i); check(q == 32'h300 + i, "deadline 1");
      rd(G_D2, i); check(q == 32'h400 + i, "deadline 2");
      rd(G_EVACK, i); check(q == 32'(i + 1), "latched events");
      rd(G_CNTRUN, i); check(q == 32'h500 + i, "mrCntRun");
      rd(G_CNTSLEEP, i); check(q == 32'h600 + i, "mrCntSleep");
    end
    rd(G_SLEEP0, 0); check(q == 32'h1234, "mr0CntSleep");
    rd(G_COMM, 3); check(q == 32'hC0FFEE00, "message register");
    // error bit: the G_EVACK writes above cleared Int with no Int latched
    rd(G_SCHED, 0); check(q == 3, "error bit set by servicing an absent interrupt");
    wr(G_SCHED, 0, 3);
    rd(G_SCHED, 0); check(q == 1 && sel_dyn, "error bit cleared, mode kept");
    lr_ev[2][EV_INT] = 1'b1;
    wr(G_EVACK, 2, 32'(1 << EV_INT));
    rd(G_SCHED, 0); check(q == 1, "no error when the interrupt is latched");
    wr(G_EVACK, 1, 32'(1 << EV_T));
    rd(G_SCHED, 0); check(q == 1, "no error for other events");
    wr(G_EVACK, 9, 32'(1 << EV_INT));
    rd(G_SCHED, 0); check(q == 1, "no error for an out-of-range index");
    wr(G_EVACK, 1, 32'(1 << EV_INT));
    rd(G_SCHED, 0); check(q == 3, "error for an absent interrupt");
    wr(G_SCHED, 0, 1);
    rd(G_SCHED, 0); check(q == 3, "writing 0 to the error bit keeps it");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
