// uart_pkg: types and constants shared by the UART transmitter, receiver
// and top level.
//
// A UART frame, as used throughout this design, is: the line idles high,
// one start bit (low), DATA_BITS data bits sent least significant bit
// first, an optional parity bit, and one stop bit (high). The frame
// layout (start, 8 data bits, optional parity, stop) follows the
// document; the bit order, the parity encodings and the single stop bit
// width are this design's choices.
package uart_pkg;

  // Number of data bits per frame (the document's frame carries 8).
  localparam int unsigned DATA_BITS = 8;

  // Parity mode of a frame. NONE omits the parity bit entirely.
  typedef enum logic [1:0] {
    PARITY_NONE = 2'd0,
    PARITY_EVEN = 2'd1,
    PARITY_ODD  = 2'd2
  } parity_e;

  // Value of the parity bit for a data byte: with EVEN the total number of
  // ones in data+parity is even, with ODD it is odd. Unused for NONE.
  function automatic logic parity_bit(input logic [DATA_BITS-1:0] d,
                                      input parity_e mode);
    return (mode == PARITY_ODD) ? ~(^d) : (^d);
  endfunction

  // Bits in one frame including start and stop.
  function automatic int unsigned frame_bits(input parity_e mode);
    return (mode == PARITY_NONE) ? DATA_BITS + 2 : DATA_BITS + 3;
  endfunction

  // Clock cycles per bit for a given clock and baud rate, rounded to the
  // nearest integer.
  function automatic int unsigned baud_div(input int unsigned clk_hz,
                                           input int unsigned baud);
    return (clk_hz + baud / 2) / baud;
  endfunction

endpackage
