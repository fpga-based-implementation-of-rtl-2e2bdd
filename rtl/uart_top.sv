// uart_top: UART control module for a board with switches, push buttons
// and LEDs (the "UART" entity).
//
// A push of key[0] sends the byte set on switch[7:0] as one UART frame on
// TD; the byte being sent is shown on the green LEDs Tledg. Frames arriving
// on RD are received and each good byte is shown on the red LEDs
// Rledr[7:0]. Wiring TD back to RD gives the loopback test: the red LEDs
// then repeat the switch setting after one frame time.
//
// How it works: key[0] (active low, as board push buttons are) is
// synchronised and its press edge is found. A press while the transmitter
// is idle loads the switch byte into the Tdata register and sets the
// one-cycle Tstart pulse, which starts the transmitter; the same pulse
// copies Tdata to the green LED register. The receiver's `valid` pulse
// copies its byte into the red LED register. A press while a frame is
// still being sent is ignored.
//
// Timing: TD goes low (start bit) on the fourth clock edge after key[0]
// goes low: two synchroniser stages, the Tstart register and the
// transmitter's output register. One frame takes
// frame_bits(PARITY) * DIV cycles; with the defaults (50 MHz clock,
// 115200 baud, no parity) that is 10 * 434 = 4340 cycles, 86.8 us.
// In loopback Rledr changes at the middle of the stop bit, about
// 9.5 * 434 + 5 cycles after the press.
//
// From the document: the port names and widths, the 50 MHz clock, the key
// trigger, the Tstart, Tdata, Tledg and Rledr registers and the
// transmitter/receiver pair. This design's own choices: key[0] as the
// trigger, the rst_n input, 115200 baud, the key synchroniser and edge
// detection, and leaving key[3:1], switch[9:8] unused and Rledr[9:8] at 0
// (the receiver delivers 8 bits; the board has 10 red LEDs).
//
// Lint notes: key[3:1], switch[9:8] and the receiver's busy and err outputs
// are deliberately unused (the board provides the extra inputs; errors
// only keep Rledr unchanged). The port name `switch` is a C++ keyword but
// is kept because it is the board-level name of these inputs.
module uart_top
  import uart_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200,
  parameter parity_e     PARITY = PARITY_NONE
) (
  input  logic       clock,
  input  logic       rst_n,    // active-low reset, synchronous
  input  logic [3:0] key,      // push buttons, low while pressed
  input  logic [9:0] switch,   // switch[7:0]: byte to send
  input  logic       RD,       // serial receive line
  output logic       TD,       // serial transmit line
  output logic [9:0] Rledr,    // red LEDs: last byte received
  output logic [7:0] Tledg     // green LEDs: last byte sent
);

  localparam int unsigned DIV = baud_div(CLK_HZ, BAUD);

  logic                 rst;
  logic [1:0]           key_sync;
  logic                 key_prev;
  logic                 press;
  logic                 Tstart;
  logic [DATA_BITS-1:0] Tdata;
  logic                 tx_busy;
  logic                 rx_busy, rx_valid, rx_err;
  logic [DATA_BITS-1:0] rx_data;

  assign rst = !rst_n;

  // key[0] synchroniser and press-edge detector (high -> low)
  always_ff @(posedge clock) begin
    if (rst) begin
      key_sync <= 2'b11;
      key_prev <= 1'b1;
    end else begin
      key_sync <= {key_sync[0], key[0]};
      key_prev <= key_sync[1];
    end
  end
  assign press = key_prev && !key_sync[1];

  // Transmit request and data registers
  always_ff @(posedge clock) begin
    if (rst) begin
      Tstart <= 1'b0;
      Tdata  <= '0;
      Tledg  <= '0;
    end else begin
      Tstart <= press && !tx_busy && !Tstart;
      if (press && !tx_busy && !Tstart) Tdata <= switch[DATA_BITS-1:0];
      if (Tstart) Tledg <= Tdata;
    end
  end

  uart_transmitter #(.DIV(DIV), .PARITY(PARITY)) C1 (
    .clk  (clock),
    .rst  (rst),
    .start(Tstart),
    .data (Tdata),
    .busy (tx_busy),
    .tline(TD)
  );

  uart_receiver #(.DIV(DIV), .PARITY(PARITY)) C2 (
    .clk  (clock),
    .rst  (rst),
    .rline(RD),
    .busy (rx_busy),
    .data (rx_data),
    .valid(rx_valid),
    .err  (rx_err)
  );

  // Red LED register: last good received byte
  always_ff @(posedge clock) begin
    if (rst)           Rledr[7:0] <= '0;
    else if (rx_valid) Rledr[7:0] <= rx_data;
  end
  assign Rledr[9:8] = '0;

  // Tstart only fires when the transmitter can accept it.
  a_start_idle: assert property (@(posedge clock) disable iff (rst)
                                 Tstart |-> !tx_busy);

endmodule
