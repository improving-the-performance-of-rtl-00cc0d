// led_io -- memory-mapped LED output register of the SoC.
//
// A data-memory store whose address has bit 29 set (the input/output space)
// and bits [28:26] equal to 3'b100 (the LED device) writes the low LED_W bits
// of the store data into the LED register on the rising clock. Other stores
// are ignored. The register clears on reset and drives the board LEDs.
//
// The address decode follows the document; the width of 16 (the LED count of
// the board used) and the clear on reset are this design's choices.
module led_io #(
  parameter int LED_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [31:0]      addr,
  input  logic [31:0]      wdata,
  output logic [LED_W-1:0] leds
);

  logic sel;
  assign sel = addr[29] && (addr[28:26] == 3'b100);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         leds <= '0;
    else if (we && sel) leds <= wdata[LED_W-1:0];
  end

endmodule
