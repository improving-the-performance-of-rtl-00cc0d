// nhse_ctrl_regs -- scheduler control registers on the COP2 bus.
//
// The scheduler is MIPS coprocessor 2; the datapath reaches it through a
// simple register bus (kernel services): cop2_wr/cop2_rd with a 12-bit
// address {group, index} and 32-bit data. The groups are listed in nhse_pkg.
// This block holds the configuration registers (event enables lr_en, run
// flags lr_run, dynamic priorities mrPRI, cr0MSTOP, the scheduling mode and
// the interrupt attachment map), turns accesses to the other groups into
// one-clock strobes for the units that own them (timer, watchdog and deadline
// loads, event clears, message writes, mutex lock/unlock) and selects the
// read data. Writes take effect on the rising clock; reads are combinational,
// in the clock of cop2_rd. Accesses with an index beyond the group's size
// are ignored and read 0.
// Reset: only sCPU0 has its run flag set, so that it alone starts after
// reset; all other registers clear (static scheduling, nothing stopped).
// Error bit: the document asks for a bit that signals servicing an interrupt
// when none is active. Here it is set when software clears the Int event of
// an sCPU (G_EVACK write with the Int bit) while that event is not latched;
// it reads as bit 1 of G_SCHED and is cleared by writing 1 to that bit.
//
// The register names follow the document; the address map, the bus and the
// reset values are this design's choices.
module nhse_ctrl_regs
  import nhse_pkg::*;
#(
  parameter int N        = 4,
  parameter int NR_INT   = 8,
  parameter int NR_COMM  = 2,
  parameter int NR_MUTEX = 8,
  parameter int PRI_W    = 8,
  localparam int IDW     = (N > 1) ? $clog2(N) : 1,
  localparam int IW      = (NR_INT > 1) ? $clog2(NR_INT) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // COP2 bus
  input  logic                        cop2_wr,
  input  logic                        cop2_rd,
  input  cop2_addr_t                  cop2_addr,
  input  logic [31:0]                 cop2_wdata,
  output logic [31:0]                 cop2_rdata,
  // configuration
  output ev_vec_t [N-1:0]             lr_en,
  output logic [N-1:0]                lr_run,
  output logic [31:0]                 cr0_mstop,
  output logic                        sel_dyn,
  output logic [N-1:0][PRI_W-1:0]     mr_pri,
  output logic [NR_INT-1:0][IDW-1:0]  int_map,
  // strobes
  output logic [N-1:0]                tev_load,
  output logic [N-1:0]                wd_load,
  output logic [N-1:0]                d1_load,
  output logic [N-1:0]                d2_load,
  output ev_vec_t [N-1:0]             ev_ack,
  output logic                        comm_we,
  output logic                        mutex_lock,
  output logic                        mutex_unlock,
  // read-back from the units
  input  logic [N-1:0][31:0]          tev_period,
  input  logic [N-1:0][31:0]          wd_period,
  input  logic [N-1:0][31:0]          d1_period,
  input  logic [N-1:0][31:0]          d2_period,
  input  ev_vec_t [N-1:0]             lr_ev,
  input  logic [N-1:0][31:0]          cnt_run,
  input  logic [N-1:0][31:0]          cnt_sleep,
  input  logic [31:0]                 cnt0_sleep,
  input  logic [31:0]                 comm_rdata,
  input  logic                        mutex_grant
);

  cop2_group_e grp;
  logic [7:0]  idx;
  logic        in_n, in_int, in_comm, in_mutex;
  logic [IDW-1:0] ni;   // index into the per-sCPU registers
  logic [IW-1:0]  ii;   // index into the interrupt map
  logic        int_err; // interrupt serviced while none was active
  logic        ack_int; // data bit that clears the Int event

  assign ack_int  = cop2_wdata[5'(EV_INT)];

  assign grp      = cop2_group_e'(cop2_addr[11:8]);
  assign idx      = cop2_addr[7:0];
  assign ni       = idx[IDW-1:0];
  assign ii       = idx[IW-1:0];
  assign in_n     = 32'(idx) < N;
  assign in_int   = 32'(idx) < NR_INT;
  assign in_comm  = 32'(idx) < N * NR_COMM;
  assign in_mutex = 32'(idx) < NR_MUTEX;

  // ---- configuration registers ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lr_en     <= '0;
      lr_run    <= N'(1);
      cr0_mstop <= '0;
      sel_dyn   <= 1'b0;
      mr_pri    <= '0;
      int_map   <= '0;
    end else if (cop2_wr) begin
      unique case (grp)
        G_EN:     if (in_n)   lr_en[ni]   <= cop2_wdata[NEV-1:0];
        G_RUN:    if (in_n)   lr_run[ni]  <= cop2_wdata[0];
        G_PRI:    if (in_n)   mr_pri[ni]  <= cop2_wdata[PRI_W-1:0];
        G_MSTOP:              cr0_mstop    <= cop2_wdata;
        G_SCHED:              sel_dyn      <= cop2_wdata[0];
        G_INTMAP: if (in_int) int_map[ii] <= cop2_wdata[IDW-1:0];
        default: ;
      endcase
    end
  end

  // ---- error bit: interrupt serviced while none is active ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      int_err <= 1'b0;
    else if (cop2_wr && grp == G_EVACK && in_n && ack_int &&
             !lr_ev[ni][EV_INT])
      int_err <= 1'b1;
    else if (cop2_wr && grp == G_SCHED && cop2_wdata[1])
      int_err <= 1'b0;
  end

  // ---- strobes ----
  always_comb begin
    tev_load     = '0;
    wd_load      = '0;
    d1_load      = '0;
    d2_load      = '0;
    ev_ack       = '0;
    comm_we      = cop2_wr && grp == G_COMM  && in_comm;
    mutex_lock   = cop2_rd && grp == G_MUTEX && in_mutex;
    mutex_unlock = cop2_wr && grp == G_MUTEX && in_mutex;
    if (cop2_wr && in_n) begin
      case (grp)
        G_TEV:   tev_load[ni] = 1'b1;
        G_WD:    wd_load[ni]  = 1'b1;
        G_D1:    d1_load[ni]  = 1'b1;
        G_D2:    d2_load[ni]  = 1'b1;
        G_EVACK: ev_ack[ni]   = cop2_wdata[NEV-1:0];
        default: ;
      endcase
    end
  end

  // ---- read data ----
  always_comb begin
    cop2_rdata = '0;
    unique case (grp)
      G_EN:       if (in_n)     cop2_rdata = 32'(lr_en[ni]);
      G_RUN:      if (in_n)     cop2_rdata = 32'(lr_run[ni]);
      G_TEV:      if (in_n)     cop2_rdata = tev_period[ni];
      G_PRI:      if (in_n)     cop2_rdata = 32'(mr_pri[ni]);
      G_MSTOP:                  cop2_rdata = cr0_mstop;
      G_SCHED:                  cop2_rdata = 32'({int_err, sel_dyn});
      G_WD:       if (in_n)     cop2_rdata = wd_period[ni];
      G_D1:       if (in_n)     cop2_rdata = d1_period[ni];
      G_D2:       if (in_n)     cop2_rdata = d2_period[ni];
      G_INTMAP:   if (in_int)   cop2_rdata = 32'(int_map[ii]);
      G_EVACK:    if (in_n)     cop2_rdata = 32'(lr_ev[ni]);
      G_COMM:     if (in_comm)  cop2_rdata = comm_rdata;
      G_MUTEX:    if (in_mutex) cop2_rdata = 32'(mutex_grant);
      G_CNTRUN:   if (in_n)     cop2_rdata = cnt_run[ni];
      G_CNTSLEEP: if (in_n)     cop2_rdata = cnt_sleep[ni];
      G_SLEEP0:                 cop2_rdata = cnt0_sleep;
    endcase
  end

  // a COP2 instruction either reads or writes
  assert property (@(posedge clk) disable iff (!rst_n) !(cop2_wr && cop2_rd));

endmodule
