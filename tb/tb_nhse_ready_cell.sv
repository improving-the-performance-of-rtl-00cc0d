// tb_nhse_ready_cell -- self-checking test of one sCPU's event latches.
// Four cells are chained as in the scheduler (each sees the work flags of the
// others). Random event pulses, enables, clears, run and stop flags are
// applied; a reference model of the latches, the work flags and the
// priority chain is updated every clock and compared with all outputs.
module tb_nhse_ready_cell;
  import nhse_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_latched = 0, n_blocked = 0, n_stopped = 0;

  ev_vec_t [N-1:0] lr_en, ev_in, ev_ack, lr_ev;
  logic [N-1:0] lr_run, mr_stop, scpu_ev, ready;

  for (genvar i = 0; i < N; i++) begin : g
    nhse_ready_cell #(.N(N), .IDX(i)) dut (
      .clk, .rst_n, .lr_en(lr_en[i]), .ev_in(ev_in[i]), .ev_ack(ev_ack[i]),
      .lr_run(lr_run[i]), .mr_stop(mr_stop[i]), .scpu_ev_all(scpu_ev),
      .lr_ev(lr_ev[i]), .scpu_ev(scpu_ev[i]), .ready(ready[i]));
  end

  ev_vec_t m_ev [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare();
    logic [N-1:0] w, r;
    for (int i = 0; i < N; i++) begin
      w[i] = !mr_stop[i] && (lr_run[i] || m_ev[i] != '0);
      check(lr_ev[i] == m_ev[i], $sformatf("lr_ev[%0d] %b expected %b", i, lr_ev[i], m_ev[i]));
    end
    r = '0;
    for (int i = 0; i < N; i++) begin
      if (w[i]) begin r[i] = 1'b1; break; end
    end
    check(scpu_ev == w, $sformatf("scpu_ev %b expected %b", scpu_ev, w));
    check(ready == r, $sformatf("ready %b expected %b", ready, r));
    for (int i = 1; i < N; i++) if (w[i] && !r[i]) n_blocked++;
    for (int i = 0; i < N; i++) if (mr_stop[i] && (lr_run[i] || m_ev[i] != '0)) n_stopped++;
  endtask

  initial begin
    lr_en = '0; ev_in = '0; ev_ack = '0; lr_run = '0; mr_stop = '0;
    for (int i = 0; i < N; i++) m_ev[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    // directed: sCPU2 enabled for timer only; timer and mutex pulses arrive
    lr_en[2] = ev_vec_t'(1 << EV_T);
    ev_in[2] = ev_vec_t'((1 << EV_T) | (1 << EV_MUTEX));
    @(negedge clk);
    ev_in = '0;
    m_ev[2] = ev_vec_t'(1 << EV_T);
    compare();
    check(ready == 4'b0100, "enabled timer event makes sCPU2 ready one clock later");
    // sCPU0 runs: sCPU2 is preempted
    lr_run[0] = 1; #1 compare();
    check(ready == 4'b0001, "sCPU0 preempts");
    lr_run[0] = 0;
    // clear
    ev_ack[2] = ev_vec_t'(1 << EV_T); @(negedge clk); ev_ack = '0;
    m_ev[2] = '0; compare();
    // random
    for (int c = 0; c < 3000; c++) begin
      for (int i = 0; i < N; i++) begin
        lr_en[i]  = ev_vec_t'($urandom);
        ev_in[i]  = ($urandom_range(0, 3) == 0) ? ev_vec_t'($urandom) : '0;
        ev_ack[i] = ($urandom_range(0, 2) == 0) ? ev_vec_t'($urandom) : '0;
      end
      lr_run  = ($urandom_range(0, 3) == 0) ? N'($urandom) : '0;
      mr_stop = ($urandom_range(0, 3) == 0) ? N'($urandom) : '0;
      #1 compare();
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if ((ev_in[i] & lr_en[i]) != '0) n_latched++;
        m_ev[i] = (m_ev[i] & ~ev_ack[i]) | (ev_in[i] & lr_en[i]);
      end
    end
    check(n_latched > 0 && n_blocked > 0 && n_stopped > 0, "all cases reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
