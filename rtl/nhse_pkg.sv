// nhse_pkg -- types and constants shared by the hardware scheduler (nHSE).
//
// Each semiprocessor (sCPUi) owns seven event sources, the same set for all of
// them: timer (T), watchdog (WD), two deadlines (D1, D2), interrupt (Int),
// mutex (Mutex) and synchronisation/message (Syn). The order of the bits in an
// event vector follows the order in which the scheduler figure lists them.
//
// The coprocessor-2 (COP2) register map is this design's own: a 12-bit
// address whose upper four bits select a register group and whose lower eight
// bits select the sCPU, interrupt line, mutex or message register.
package nhse_pkg;

  localparam int NEV = 7;               // event kinds per sCPU

  typedef enum logic [2:0] {
    EV_T     = 3'd0,
    EV_WD    = 3'd1,
    EV_D1    = 3'd2,
    EV_D2    = 3'd3,
    EV_INT   = 3'd4,
    EV_MUTEX = 3'd5,
    EV_SYN   = 3'd6
  } ev_kind_e;

  typedef logic [NEV-1:0] ev_vec_t;

  // COP2 address: {group[3:0], index[7:0]}
  localparam int COP2_AW = 12;
  typedef logic [COP2_AW-1:0] cop2_addr_t;

  // COP2 register groups (address bits [11:8])
  typedef enum logic [3:0] {
    G_EN       = 4'h0,  // lr_en*  of sCPU[idx]     (7 event enables)       RW
    G_RUN      = 4'h1,  // lr_run  of sCPU[idx]                            RW
    G_TEV      = 4'h2,  // mrTEV   reload value of timer[idx]              RW
    G_PRI      = 4'h3,  // mrPRI   dynamic priority of sCPU[idx]           RW
    G_MSTOP    = 4'h4,  // cr0MSTOP, bit i stops sCPUi                     RW
    G_SCHED    = 4'h5,  // bit 0: sel_sch_din (1 = dynamic); bit 1: error W1C
    G_WD       = 4'h6,  // watchdog period of sCPU[idx]; a write restarts  RW
    G_D1       = 4'h7,  // deadline 1 of sCPU[idx]; a write arms it        RW
    G_D2       = 4'h8,  // deadline 2 of sCPU[idx]; a write arms it        RW
    G_INTMAP   = 4'h9,  // sCPU that interrupt line [idx] is attached to   RW
    G_EVACK    = 4'hA,  // read: latched events of sCPU[idx]; write: clear W1C
    G_COMM     = 4'hB,  // mrCommReg[idx]; a write raises SynEv at owner   RW
    G_MUTEX    = 4'hC,  // read: try to lock grMutex[idx]; write: unlock
    G_CNTRUN   = 4'hD,  // mrCntRun[idx]                                   RO
    G_CNTSLEEP = 4'hE,  // mrCntSleep[idx]                                 RO
    G_SLEEP0   = 4'hF   // mr0CntSleep                                     RO
  } cop2_group_e;

  function automatic cop2_addr_t cop2_address(cop2_group_e g, logic [7:0] idx);
    return {g, idx};
  endfunction

endpackage
