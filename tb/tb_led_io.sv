// tb_led_io -- self-checking test of the memory-mapped LED register.
// Random stores, a quarter of them to the LED device address space, the
// others elsewhere (memory, other I/O devices); the LEDs must follow only the
// LED stores.
module tb_led_io;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_hits = 0;

  logic we;
  logic [31:0] addr, wdata;
  logic [15:0] leds, exp;

  led_io #(.LED_W(16)) dut (.clk, .rst_n, .we, .addr, .wdata, .leds);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 0; addr = 0; wdata = 0; exp = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(leds == 0, "LEDs clear after reset");
    for (int r = 0; r < 500; r++) begin
      we = ($urandom_range(0, 3) != 0);
      addr = $urandom;
      if ($urandom_range(0, 3) == 0) begin addr[29] = 1'b1; addr[28:26] = 3'b100; end
      wdata = $urandom;
      if (we && addr[29] && addr[28:26] == 3'b100) begin exp = wdata[15:0]; n_hits++; end
      @(negedge clk);
      check(leds == exp, $sformatf("store %h to %h: leds %h expected %h", wdata, addr, leds, exp));
    end
    check(n_hits > 10, "LED stores happened");
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
