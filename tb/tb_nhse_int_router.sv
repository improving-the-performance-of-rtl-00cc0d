// tb_nhse_int_router -- self-checking test of interrupt attachment.
// Attaches lines to sCPUs, raises lines and checks that exactly the attached
// sCPU sees a single one-clock IntEv pulse three clocks after the rising edge,
// that a held line does not repeat, and that several lines on one sCPU OR.
module tb_nhse_int_router;
  localparam int N = 4, NR_INT = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NR_INT-1:0]        irq;
  logic [NR_INT-1:0][1:0]   int_map;
  logic [N-1:0]             int_ev;

  nhse_int_router #(.N(N), .NR_INT(NR_INT)) dut (.clk, .rst_n, .irq, .int_map, .int_ev);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // raise `lines`, watch 6 clocks; expect pulse on `exp` at the 3rd clock only
  task automatic pulse(input logic [NR_INT-1:0] lines, input logic [N-1:0] exp);
    irq = irq | lines;
    for (int c = 1; c <= 6; c++) begin
      @(negedge clk);
      check(int_ev == ((c == 3) ? exp : '0),
            $sformatf("lines %b clock %0d: int_ev %b expected %b", lines, c, int_ev,
                      (c == 3) ? exp : '0));
    end
  endtask

  initial begin
    irq = '0;
    for (int l = 0; l < NR_INT; l++) int_map[l] = 2'(l % N);   // line l -> sCPU l mod 4
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    pulse(8'b0000_0001, 4'b0001);
    pulse(8'b0000_0100, 4'b0100);
    // line 0 is still high: no repeat; line 7 -> sCPU3
    pulse(8'b1000_0000, 4'b1000);
    irq = '0; repeat (4) @(negedge clk);
    check(int_ev == '0, "falling edges give no event");
    // remap: lines 1 and 5 both to sCPU2, raised together
    int_map[1] = 2'd2; int_map[5] = 2'd2;
    pulse(8'b0010_0010, 4'b0100);
    irq = '0; repeat (4) @(negedge clk);
    // lines to different sCPUs at once
    pulse(8'b0000_1011, 4'b1101);  // 0->0, 1->2, 3->3
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
