// tb_nhse_monitor -- self-checking test of the run/sleep cycle counters.
// Drives a random schedule (one sCPU or none per clock) and keeps reference
// counts; after every clock mrCntRun, mrCntSleep and mr0CntSleep must match.
// Also checks that run + sleep equals the number of clocks for every sCPU.
module tb_nhse_monitor;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] en_pipe;
  logic [N-1:0][31:0] cnt_run, cnt_sleep;
  logic [31:0] cnt0_sleep;

  nhse_monitor #(.N(N)) dut (.clk, .rst_n, .en_pipe, .cnt_run, .cnt_sleep, .cnt0_sleep);

  int r_run [N], r_sleep [N], r0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    en_pipe = '0;
    for (int i = 0; i < N; i++) begin r_run[i] = 0; r_sleep[i] = 0; end
    r0 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 1; c <= 2000; c++) begin
      int s;
      s = $urandom_range(0, N);          // N means idle
      en_pipe = (s == N) ? '0 : N'(1) << s;
      @(negedge clk);
      for (int i = 0; i < N; i++) if (en_pipe[i]) r_run[i]++; else r_sleep[i]++;
      if (en_pipe == '0) r0++;
      for (int i = 0; i < N; i++) begin
        check(cnt_run[i] == 32'(r_run[i]), $sformatf("run[%0d] %0d vs %0d", i, cnt_run[i], r_run[i]));
        check(cnt_sleep[i] == 32'(r_sleep[i]), $sformatf("sleep[%0d]", i));
        check(cnt_run[i] + cnt_sleep[i] == 32'(c), "run + sleep = clocks");
      end
      check(cnt0_sleep == 32'(r0), "mr0CntSleep");
    end
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
