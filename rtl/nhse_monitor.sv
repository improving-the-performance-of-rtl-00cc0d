// nhse_monitor -- processor-cycle monitoring registers.
//
// On every clock, for each sCPUi: mrCntRun[i] counts up if en_pipe[i] is high
// (the sCPU executes this cycle), otherwise mrCntSleep[i] counts up. The global
// mr0CntSleep counts the clocks in which no en_pipe line is high, i.e. the CPU
// as a whole does not run. All counters are 32 bits wide, wrap around and
// clear on reset. A counter's new value is visible the clock after the cycle
// it counts.
//
// The three kinds of register and their meaning follow the document and its
// monitoring waveform.
module nhse_monitor #(
  parameter int N = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        en_pipe,
  output logic [N-1:0][31:0]  cnt_run,
  output logic [N-1:0][31:0]  cnt_sleep,
  output logic [31:0]         cnt0_sleep
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_run    <= '0;
      cnt_sleep  <= '0;
      cnt0_sleep <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (en_pipe[i]) cnt_run[i]   <= cnt_run[i] + 32'd1;
        else            cnt_sleep[i] <= cnt_sleep[i] + 32'd1;
      end
      if (!(|en_pipe)) cnt0_sleep <= cnt0_sleep + 32'd1;
    end
  end

endmodule
