// tb_nhse_dyn_sched -- self-checking test of the dynamic priority choice.
// Random candidate sets and priority registers (with deliberate ties and
// zeros) are applied; the reference picks, among sCPU1..N-1 with work and a
// non-zero priority, the largest priority, the lowest index on a tie.
module tb_nhse_dyn_sched;
  localparam int N = 4, PRI_W = 8;
  int checks = 0, failures = 0;
  logic [N-1:0] cand, mux;
  logic [N-1:0][PRI_W-1:0] pri;

  nhse_dyn_sched #(.N(N), .PRI_W(PRI_W)) dut (.cand, .pri, .mux);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // directed: sCPU3 priority 9 beats sCPU1 priority 5
    cand = 4'b1010; pri = '0; pri[1] = 5; pri[3] = 9;
    #1 check(mux == 4'b1000, "higher priority wins");
    pri[3] = 0;
    #1 check(mux == 4'b0010, "priority 0 is not eligible");
    cand = 4'b0001; pri[0] = 200;
    #1 check(mux == 4'b0000, "sCPU0 is never chosen here");
    for (int r = 0; r < 5000; r++) begin
      int best, win;
      cand = N'($urandom);
      for (int i = 0; i < N; i++) pri[i] = PRI_W'($urandom_range(0, 4));
      best = 0; win = -1;
      for (int i = 1; i < N; i++)
        if (cand[i] && int'(pri[i]) > best) begin best = pri[i]; win = i; end
      #1 check(mux == ((win < 0) ? '0 : N'(1) << win),
               $sformatf("cand %b pri %p: mux %b", cand, pri, mux));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
