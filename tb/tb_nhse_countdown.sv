// tb_nhse_countdown -- self-checking test of the reloadable event counter.
// A periodic and a one-shot instance are loaded with known periods; the test
// records the clock on which each event pulse appears and compares it with
// the load clock plus the period (one-shot: one pulse only). It also checks
// that a reload restarts the count (watchdog kick) and that 0 switches the
// counter off.
module tb_nhse_countdown;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic        ld_p, ld_o;
  logic [31:0] val;
  logic [31:0] per_p, per_o, cnt_p, cnt_o;
  logic        ev_p, ev_o;

  nhse_countdown #(.W(32), .PERIODIC(1'b1)) dut_p (
    .clk, .rst_n, .load(ld_p), .load_val(val), .period(per_p), .count(cnt_p), .ev(ev_p));
  nhse_countdown #(.W(32), .PERIODIC(1'b0)) dut_o (
    .clk, .rst_n, .load(ld_o), .load_val(val), .period(per_o), .count(cnt_o), .ev(ev_o));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  // the load is taken on the edge after which cyc == t0; the event is then
  // visible after the edge on which cyc == t0 + period
  task automatic expect_events(input int t0, input int period, input int n,
                               input bit periodic);
    int seen_p, seen_o;
    seen_p = 0; seen_o = 0;
    repeat (period * (n + 1) - 1) begin
      @(negedge clk);
      if (periodic && ev_p) begin
        seen_p++;
        check(cyc - t0 == period * seen_p, $sformatf("periodic event at %0d", cyc - t0));
      end
      if (!periodic && ev_o) begin
        seen_o++;
        check(cyc - t0 == period, $sformatf("one-shot event at %0d", cyc - t0));
      end
    end
    if (periodic) check(seen_p == n, $sformatf("periodic event count %0d", seen_p));
    else          check(seen_o == 1, $sformatf("one-shot event count %0d", seen_o));
  endtask

  initial begin
    ld_p = 0; ld_o = 0; val = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(ev_p == 0 && ev_o == 0, "no event after reset");
    // periodic, period 5, four periods
    ld_p = 1; val = 5; @(negedge clk); ld_p = 0;
    check(per_p == 5, "period register");
    expect_events(cyc, 5, 4, 1'b1);
    // one-shot, 7 clocks
    ld_o = 1; val = 7; @(negedge clk); ld_o = 0;
    expect_events(cyc, 7, 3, 1'b0);
    // switch the periodic counter off
    ld_p = 1; val = 0; @(negedge clk); ld_p = 0;
    begin
      int cnt;
      cnt = 0;
      repeat (20) begin @(negedge clk); if (ev_p) cnt++; end
      check(cnt == 0, "counter off after loading 0");
    end
    // watchdog: period 6, kicked every 4 clocks -> never expires
    ld_p = 1; val = 6; @(negedge clk); ld_p = 0;
    begin
      int cnt;
      cnt = 0;
      repeat (5) begin
        repeat (3) begin @(negedge clk); if (ev_p) cnt++; end
        ld_p = 1; @(negedge clk); ld_p = 0; if (ev_p) cnt++;
      end
      check(cnt == 0, "kicked watchdog does not expire");
    end
    // then left alone it expires 6 clocks after the last kick
    expect_events(cyc, 6, 1, 1'b1);
    // period 1: an event every clock
    ld_p = 1; val = 1; @(negedge clk); ld_p = 0;
    expect_events(cyc, 1, 5, 1'b1);
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
