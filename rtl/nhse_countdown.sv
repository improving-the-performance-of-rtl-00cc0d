// nhse_countdown -- reloadable down-counter behind the time-type events.
//
// One instance serves one sCPU as its timer (TEv), its watchdog (WDEv) or one
// of its two deadlines (D1Ev, D2Ev). A `load` pulse copies `load_val` into both
// the period register and the counter; a value of 0 switches the counter off.
// While active the counter decreases by one per clock; on the clock where it
// would reach zero it raises `ev` for exactly one cycle. With PERIODIC = 1 it
// then restarts from the period (timer, watchdog), with PERIODIC = 0 it stops
// (deadline). The event therefore appears `load_val` clocks after the load.
// A watchdog is kicked by loading it again before it expires.
//
// The document gives one reload register per sCPU (mrTEVi) and a 32-bit timer
// array; the periodic/one-shot split and the watchdog and deadline use of the
// same counter are this design's choices.
module nhse_countdown #(
  parameter int  W        = 32,
  parameter bit  PERIODIC = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] load_val,
  output logic [W-1:0] period,
  output logic [W-1:0] count,
  output logic         ev
);

  logic active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period <= '0;
      count  <= '0;
      active <= 1'b0;
      ev     <= 1'b0;
    end else begin
      ev <= 1'b0;
      if (load) begin
        period <= load_val;
        count  <= load_val;
        active <= (load_val != '0);
      end else if (active) begin
        if (count == W'(1)) begin
          ev <= 1'b1;
          if (PERIODIC) begin
            count <= period;
          end else begin
            count  <= '0;
            active <= 1'b0;
          end
        end else begin
          count <= count - W'(1);
        end
      end
    end
  end

endmodule
