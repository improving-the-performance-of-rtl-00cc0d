// tb_nmpra_sizes -- the scheduler in the other sCPU counts the source design
// mentions (2, 8, 16 and 32; 4 is the default and is covered by tb_nmpra_top).
// Each configuration runs the same checks (nmpra_size_check) side by side.
module tb_nmpra_sizes;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d2, d8, d16, d32;
  int   c2, c8, c16, c32, f2, f8, f16, f32;

  nmpra_size_check #(.N(2))  u_n2  (.clk, .rst_n, .done(d2),  .checks(c2),  .failures(f2));
  nmpra_size_check #(.N(8))  u_n8  (.clk, .rst_n, .done(d8),  .checks(c8),  .failures(f8));
  nmpra_size_check #(.N(16)) u_n16 (.clk, .rst_n, .done(d16), .checks(c16), .failures(f16));
  nmpra_size_check #(.N(32)) u_n32 (.clk, .rst_n, .done(d32), .checks(c32), .failures(f32));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d2 && d8 && d16 && d32);
    $display("N=2: %0d checks, N=8: %0d, N=16: %0d, N=32: %0d", c2, c8, c16, c32);
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c8 + c16 + c32, f2 + f8 + f16 + f32);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c8 + c16 + c32, f2 + f8 + f16 + f32 + 1);
    $finish;
  end
endmodule
