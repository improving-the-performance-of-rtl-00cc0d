// tb_nhse_decode -- self-checking test of the pipeline-enable decoder.
// Every combination of enable, idle and ID: exactly the addressed en_pipe line
// must be high when enabled and not idle, none otherwise.
module tb_nhse_decode;
  int checks = 0, failures = 0;
  logic enable, idle, hse_en;
  logic [1:0] id;
  logic [3:0] en_pipe;

  nhse_decode #(.N(4)) dut (.enable, .id, .idle, .en_pipe, .hse_en);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 2; i++)
        for (int d = 0; d < 4; d++) begin
          logic [3:0] exp;
          enable = e[0]; idle = i[0]; id = 2'(d);
          exp = (e == 1 && i == 0) ? 4'(1 << d) : 4'b0;
          #1;
          check(en_pipe == exp, $sformatf("en%0d idle%0d id%0d: %b", e, i, d, en_pipe));
          check(hse_en == (exp != 0), "hse_en");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
