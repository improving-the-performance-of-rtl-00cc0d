// tb_nhse_msg -- self-checking test of the inter-task message registers.
// Writes random words to random registers, checks that the owner (index
// divided by NR_COMM) gets exactly one SynEv pulse the clock after the write,
// and reads every register back against a reference array.
module tb_nhse_msg;
  localparam int N = 4, NR_COMM = 2, NREG = N * NR_COMM;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we;
  logic [2:0] widx, ridx;
  logic [31:0] wdata, rdata;
  logic [N-1:0] syn_ev;
  logic [31:0] ref_mem [NREG];

  nhse_msg #(.N(N), .NR_COMM(NR_COMM)) dut (
    .clk, .rst_n, .we, .widx, .wdata, .ridx, .rdata, .syn_ev);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 0; widx = 0; ridx = 0; wdata = 0;
    for (int k = 0; k < NREG; k++) ref_mem[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < NREG; k++) begin
      ridx = 3'(k); #1 check(rdata == 0, "registers clear after reset");
    end
    @(negedge clk);
    for (int r = 0; r < 200; r++) begin
      int k;
      k = $urandom_range(0, NREG - 1);
      we = 1; widx = 3'(k); wdata = $urandom;
      ref_mem[k] = wdata;
      @(negedge clk);
      we = 0;
      check(syn_ev == N'(1) << (k / NR_COMM),
            $sformatf("write to %0d: syn_ev %b", k, syn_ev));
      @(negedge clk);
      check(syn_ev == '0, "syn_ev lasts one clock");
      ridx = 3'($urandom_range(0, NREG - 1));
      #1 check(rdata == ref_mem[ridx], $sformatf("read %0d: %h", ridx, rdata));
    end
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
