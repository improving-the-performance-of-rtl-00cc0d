// nmpra_top -- hardware scheduler (nHSE) of the nMPRA processor with its
// memory-mapped LED port.
//
// The nMPRA processor replicates the program counter, pipeline registers and
// register file of one MIPS32 pipeline N times; each copy is a semiprocessor
// sCPUi that runs one task. This block decides, every clock, which sCPU the
// pipeline executes, and drives one en_pipe_sCPUi enable per copy.
//
//   events logic   per-sCPU timer (mrTEV reload), watchdog and two deadline
//                  counters, interrupt lines attached to sCPUs, global mutexes
//                  (MutexEv) and message registers (SynEv)
//   ready cells    latch the enabled events of each sCPU; static priority
//                  chain (lower index wins) gives sCPUi_ready
//   dyn. scheduler alternative choice by the mrPRI registers
//   ID generator   static/dynamic multiplexers (sel_sch_din) and encoder
//   DECODE         ID -> one-hot en_pipe, gated by `enable`
//   monitor        mrCntRun / mrCntSleep per sCPU and mr0CntSleep
//   control regs   COP2 register bus used by the kernel services
//
// Interface: the datapath (not part of this RTL) issues COP2 reads and writes
// on cop2_* (see nhse_pkg for the address map) in the name of the sCPU that is
// executing, and receives en_pipe / task_select. Its data-memory stores are
// also brought here so that the LED register can decode them.
// Timing: an event pulse from a source is latched on a rising clock; the new
// selection appears on en_pipe and task_select right after that clock, so a
// context switch costs one clock. task_select is {idle, id} with the idle
// flag in the top bit of a field at least 4 bits wide, so that for up to eight
// sCPUs it is bit 3 (nHSE_Task_Select[3:0] of the monitoring waveform, and
// ID_Static3 / ID_Dynamic3 of the ID equations); with N = 4 bit 2 is
// always 0.
//
// The block structure, the event set, the register names and the ID equations
// follow the document; the bus, address map, widths not given there and the
// reset state are this design's choices (see README).
module nmpra_top
  import nhse_pkg::*;
#(
  parameter int N        = 4,
  parameter int NR_INT   = 8,
  parameter int NR_MUTEX = 8,
  parameter int NR_COMM  = 2,
  parameter int PRI_W    = 8,
  parameter int LED_W    = 16,
  localparam int IDW     = (N > 1) ? $clog2(N) : 1,
  localparam int MW      = (NR_MUTEX > 1) ? $clog2(NR_MUTEX) : 1,
  localparam int CW      = (N * NR_COMM > 1) ? $clog2(N * NR_COMM) : 1,
  localparam int TSW     = ((IDW < 3) ? 3 : IDW) + 1   // task_select width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [NR_INT-1:0] irq,
  // COP2 (kernel services) bus from the datapath
  input  logic              cop2_wr,
  input  logic              cop2_rd,
  input  cop2_addr_t        cop2_addr,
  input  logic [31:0]       cop2_wdata,
  output logic [31:0]       cop2_rdata,
  // pipeline selection
  output logic [N-1:0]      en_pipe,
  output logic [TSW-1:0]    task_select,
  output logic              hse_en,
  // data-memory store port of the datapath, LEDs
  input  logic              dmem_we,
  input  logic [31:0]       dmem_addr,
  input  logic [31:0]       dmem_wdata,
  output logic [LED_W-1:0]  leds
);

  // cr0MSTOP holds one stop bit per sCPU in 32 bits
  if (N < 2 || N > 32) begin : g_bad_n
    $error("nmpra_top: N must be between 2 and 32");
  end

  // ---------------- configuration ----------------
  ev_vec_t [N-1:0]            lr_en, ev_ack, lr_ev, ev_in;
  logic [N-1:0]               lr_run;
  logic [31:0]                cr0_mstop;
  logic                       sel_dyn;
  logic [N-1:0][PRI_W-1:0]    mr_pri;
  logic [NR_INT-1:0][IDW-1:0] int_map;
  logic [N-1:0]               tev_load, wd_load, d1_load, d2_load;
  logic                       comm_we, mutex_lock, mutex_unlock, mutex_grant;
  logic [N-1:0][31:0]         tev_period, wd_period, d1_period, d2_period;
  logic [N-1:0][31:0]         cnt_run, cnt_sleep;
  logic [31:0]                cnt0_sleep, comm_rdata;
  logic [NR_MUTEX-1:0][IDW:0] mutex_state;   // status only, not read back

  // ---------------- events ----------------
  logic [N-1:0] t_ev, wd_ev, d1_ev, d2_ev, int_ev, mutex_ev, syn_ev;

  // ---------------- scheduling ----------------
  logic [N-1:0]   scpu_ev, ready, mux_dyn, sel_vec;
  logic [IDW-1:0] id;
  logic           idle;

  nhse_ctrl_regs #(.N(N), .NR_INT(NR_INT), .NR_COMM(NR_COMM),
                   .NR_MUTEX(NR_MUTEX), .PRI_W(PRI_W)) u_ctrl (
    .clk, .rst_n,
    .cop2_wr, .cop2_rd, .cop2_addr, .cop2_wdata, .cop2_rdata,
    .lr_en, .lr_run, .cr0_mstop, .sel_dyn, .mr_pri, .int_map,
    .tev_load, .wd_load, .d1_load, .d2_load, .ev_ack,
    .comm_we, .mutex_lock, .mutex_unlock,
    .tev_period, .wd_period, .d1_period, .d2_period,
    .lr_ev, .cnt_run, .cnt_sleep, .cnt0_sleep, .comm_rdata, .mutex_grant
  );

  for (genvar i = 0; i < N; i++) begin : g_scpu
    logic [31:0] unused_t, unused_wd, unused_d1, unused_d2;

    nhse_countdown #(.W(32), .PERIODIC(1'b1)) u_timer (
      .clk, .rst_n, .load(tev_load[i]), .load_val(cop2_wdata),
      .period(tev_period[i]), .count(unused_t), .ev(t_ev[i]));
    nhse_countdown #(.W(32), .PERIODIC(1'b1)) u_wdog (
      .clk, .rst_n, .load(wd_load[i]), .load_val(cop2_wdata),
      .period(wd_period[i]), .count(unused_wd), .ev(wd_ev[i]));
    nhse_countdown #(.W(32), .PERIODIC(1'b0)) u_dl1 (
      .clk, .rst_n, .load(d1_load[i]), .load_val(cop2_wdata),
      .period(d1_period[i]), .count(unused_d1), .ev(d1_ev[i]));
    nhse_countdown #(.W(32), .PERIODIC(1'b0)) u_dl2 (
      .clk, .rst_n, .load(d2_load[i]), .load_val(cop2_wdata),
      .period(d2_period[i]), .count(unused_d2), .ev(d2_ev[i]));

    always_comb begin
      ev_in[i]           = '0;
      ev_in[i][EV_T]     = t_ev[i];
      ev_in[i][EV_WD]    = wd_ev[i];
      ev_in[i][EV_D1]    = d1_ev[i];
      ev_in[i][EV_D2]    = d2_ev[i];
      ev_in[i][EV_INT]   = int_ev[i];
      ev_in[i][EV_MUTEX] = mutex_ev[i];
      ev_in[i][EV_SYN]   = syn_ev[i];
    end

    nhse_ready_cell #(.N(N), .IDX(i)) u_ready (
      .clk, .rst_n, .lr_en(lr_en[i]), .ev_in(ev_in[i]), .ev_ack(ev_ack[i]),
      .lr_run(lr_run[i]), .mr_stop(cr0_mstop[i]), .scpu_ev_all(scpu_ev),
      .lr_ev(lr_ev[i]), .scpu_ev(scpu_ev[i]), .ready(ready[i]));
  end

  nhse_int_router #(.N(N), .NR_INT(NR_INT)) u_int (
    .clk, .rst_n, .irq, .int_map, .int_ev);

  nhse_mutex #(.N(N), .NR_MUTEX(NR_MUTEX)) u_mutex (
    .clk, .rst_n, .lock(mutex_lock), .unlock(mutex_unlock),
    .idx(cop2_addr[MW-1:0]), .req_id(id), .grant(mutex_grant),
    .state(mutex_state), .mutex_ev);

  nhse_msg #(.N(N), .NR_COMM(NR_COMM)) u_msg (
    .clk, .rst_n, .we(comm_we), .widx(cop2_addr[CW-1:0]), .wdata(cop2_wdata),
    .ridx(cop2_addr[CW-1:0]), .rdata(comm_rdata), .syn_ev);

  nhse_dyn_sched #(.N(N), .PRI_W(PRI_W)) u_dyn (
    .cand(scpu_ev), .pri(mr_pri), .mux(mux_dyn));

  nhse_id_gen #(.N(N)) u_idgen (
    .sel_sch_din(sel_dyn), .ready, .mux_dyn, .scpu_ev0(scpu_ev[0]),
    .sel_vec, .id, .idle);

  nhse_decode #(.N(N)) u_dec (
    .enable, .id, .idle, .en_pipe, .hse_en);

  assign task_select = {idle, (TSW-1)'(id)};

  nhse_monitor #(.N(N)) u_mon (
    .clk, .rst_n, .en_pipe, .cnt_run, .cnt_sleep, .cnt0_sleep);

  led_io #(.LED_W(LED_W)) u_led (
    .clk, .rst_n, .we(dmem_we), .addr(dmem_addr), .wdata(dmem_wdata), .leds);

endmodule
