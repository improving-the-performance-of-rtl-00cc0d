// tb_nhse_id_gen -- self-checking test of the multiplexers and ID generator.
// N = 4: every combination of mode, ready vector, dynamic vector and sCPU0
// work flag, against a reference that applies the selection rule and a plain
// one-hot-to-binary conversion. N = 8: the static-mode ID bit 0 and the idle
// bit are also compared with the sum-of-products equations written out term
// by term, for every one-hot or empty ready vector.
module tb_nhse_id_gen;
  int checks = 0, failures = 0;

  logic sel4, ev0_4;
  logic [3:0] rdy4, dyn4, vec4;
  logic [1:0] id4;
  logic idle4;
  nhse_id_gen #(.N(4)) dut4 (.sel_sch_din(sel4), .ready(rdy4), .mux_dyn(dyn4),
                             .scpu_ev0(ev0_4), .sel_vec(vec4), .id(id4), .idle(idle4));

  logic [7:0] rdy8, vec8;
  logic [2:0] id8;
  logic idle8;
  nhse_id_gen #(.N(8)) dut8 (.sel_sch_din(1'b0), .ready(rdy8), .mux_dyn(8'h00),
                             .scpu_ev0(rdy8[0]), .sel_vec(vec8), .id(id8), .idle(idle8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int m = 0; m < 2; m++)
      for (int r = 0; r < 16; r++)
        for (int d = 0; d < 16; d++)
          for (int e = 0; e < 2; e++) begin
            logic [3:0] v;
            int n1, pos;
            sel4 = m[0]; rdy4 = 4'(r); dyn4 = 4'(d); ev0_4 = e[0];
            v[0] = rdy4[0];
            for (int i = 1; i < 4; i++) v[i] = (m ? dyn4[i] : rdy4[i]) && !e[0];
            n1 = 0; pos = 0;
            for (int i = 0; i < 4; i++) if (v[i]) begin n1++; pos = i; end
            #1;
            check(vec4 == v, $sformatf("m%0d r%b d%b e%0d: vec %b", m, rdy4, dyn4, e, vec4));
            check(idle4 == (n1 == 0), "idle");
            if (n1 == 1) check(id4 == 2'(pos), $sformatf("id %0d expected %0d", id4, pos));
            if (n1 > 1)  check(id4 == 2'd0, "several lines: no product term is true");
          end
    // the printed equations for n = 8, static mode
    for (int k = -1; k < 8; k++) begin
      logic r0, r1, r2, r3, r4, r5, r6, r7, eq0, eq3;
      rdy8 = (k < 0) ? 8'h00 : 8'(1 << k);
      {r7, r6, r5, r4, r3, r2, r1, r0} = rdy8;
      eq0 = (!r0 &&  r1 && !r2 && !r3 && !r4 && !r5 && !r6 && !r7) ||
            (!r0 && !r1 && !r2 &&  r3 && !r4 && !r5 && !r6 && !r7) ||
            (!r0 && !r1 && !r2 && !r3 && !r4 &&  r5 && !r6 && !r7) ||
            (!r0 && !r1 && !r2 && !r3 && !r4 && !r5 && !r6 &&  r7);
      eq3 = !r0 && !r1 && !r2 && !r3 && !r4 && !r5 && !r6 && !r7;
      #1;
      check(id8[0] == eq0, $sformatf("ID_Static0 for ready %b", rdy8));
      check(idle8 == eq3, $sformatf("ID_Static3 for ready %b", rdy8));
      if (k >= 0) check(id8 == 3'(k), $sformatf("id8 %0d expected %0d", id8, k));
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
