// uart_prescaler: bit-period timer of the UART.
//
// Divides the system clock down to the serial bit rate. A counter runs
// from 0 to DIV-1 and wraps; `tick` is high for the one cycle in which the
// counter holds DIV-1 (so ticks are DIV cycles apart), and `half` is high
// for the one cycle in which it holds DIV/2-1 (half a bit period after the
// counter was cleared). While `clear` is high the counter is held at 0 and
// neither output fires (for DIV >= 4), so the first tick after `clear` falls comes exactly
// DIV cycles after the last cycle with `clear` high.
//
// The transmitter and receiver each own one of these. The document calls
// this the "prescaler logic" of the UART but gives no detail; the counter
// form and the half-period output for the receiver are this design's
// choice. The default DIV of 434 is 50 MHz / 115200 baud, rounded.
module uart_prescaler #(
  parameter int unsigned DIV = 434
) (
  input  logic clk,
  input  logic rst,    // synchronous, active high
  input  logic clear,  // hold counter at zero
  output logic tick,   // one cycle per bit period
  output logic half    // one cycle, half a bit period after clear
);

  localparam int unsigned W = $clog2(DIV);
  localparam logic [W-1:0] LAST = W'(DIV - 1);
  localparam logic [W-1:0] MID  = W'(DIV / 2 - 1);

  logic [W-1:0] count;

  always_ff @(posedge clk) begin
    if (rst || clear)        count <= '0;
    else if (count == LAST)  count <= '0;
    else                     count <= count + 1'b1;
  end

  // Both outputs decode the counter only, so a caller may feed them back
  // into `clear` without a combinational loop. With the counter held at 0
  // and DIV >= 4, neither fires while `clear` is high.
  assign tick = (count == LAST);
  assign half = (count == MID);

  initial begin
    assert (DIV >= 4) else $error("uart_prescaler: DIV must be at least 4");
  end

endmodule
