// uart_receiver: serial-to-parallel half of the UART.
//
// Watches `rline` and, when no reception is in progress, starts on a
// falling edge (idle high to start bit low). Half a bit period later it
// looks at the line again: if it is back high the edge was a glitch and
// the receiver returns to idle; otherwise the start bit is confirmed and
// each following bit is sampled in its middle, one bit period apart. The
// data bits (least significant first) are shifted into a data buffer.
// After the parity bit (if PARITY is not PARITY_NONE) the stop bit is
// sampled. A frame with a high stop bit and correct parity is good: the
// buffer is copied to `data` and `valid` pulses for one cycle. Otherwise
// `err` pulses for one cycle and `data` keeps its previous value.
//
// Timing: `rline` passes through a two-flop synchroniser first (it comes
// from outside the clock domain), which delays everything by two cycles.
// `busy` rises two cycles after the falling edge reaches `rline`. `valid` or
// `err` fires, and `busy` falls, at the middle of the stop bit, so a
// following frame's start edge is never missed. Receiver and transmitter
// must use the same DIV and PARITY.
//
// Ports clk, rline, busy and data are those of the document's receiver,
// and the rule that reception starts only when no communication is active
// is the document's. The synchroniser, mid-bit sampling, glitch check, the
// reset input and the `valid`/`err` outputs are this design's own choices.
module uart_receiver
  import uart_pkg::*;
#(
  parameter int unsigned DIV    = 434,          // clock cycles per bit
  parameter parity_e     PARITY = PARITY_NONE
) (
  input  logic                 clk,
  input  logic                 rst,    // synchronous, active high
  input  logic                 rline,  // serial input, idles high
  output logic                 busy,   // a frame is being received
  output logic [DATA_BITS-1:0] data,   // last good byte
  output logic                 valid,  // one-cycle pulse: new byte on data
  output logic                 err     // one-cycle pulse: bad stop/parity
);

  typedef enum logic [2:0] {
    S_IDLE, S_START, S_DATA, S_PARITY, S_STOP
  } state_e;

  state_e                       state;
  logic [1:0]                   sync;     // synchroniser stages
  logic                         line;     // synchronised line
  logic                         line_d;   // line one cycle earlier
  logic [DATA_BITS-1:0]         buffer;
  logic [$clog2(DATA_BITS)-1:0] bit_idx;
  logic                         par_ok;
  logic                         tick, half;

  assign line = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync   <= 2'b11;
      line_d <= 1'b1;
    end else begin
      sync   <= {sync[0], rline};
      line_d <= line;
    end
  end

  // The counter restarts at the falling edge and again once the start bit
  // has been confirmed, so every later tick lands mid-bit.
  uart_prescaler #(.DIV(DIV)) u_prescaler (
    .clk  (clk),
    .rst  (rst),
    .clear((state == S_IDLE) || (state == S_START && half)),
    .tick (tick),
    .half (half)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      buffer  <= '0;
      bit_idx <= '0;
      par_ok  <= 1'b1;
      data    <= '0;
      valid   <= 1'b0;
      err     <= 1'b0;
    end else begin
      valid <= 1'b0;
      err   <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (line_d && !line) state <= S_START;
        end
        S_START: begin
          if (half) begin
            if (!line) begin
              bit_idx <= '0;
              state   <= S_DATA;
            end else begin
              state   <= S_IDLE;        // glitch, not a start bit
            end
          end
        end
        S_DATA: begin
          if (tick) begin
            buffer <= {line, buffer[DATA_BITS-1:1]};
            if (bit_idx == $clog2(DATA_BITS)'(DATA_BITS - 1))
              state <= (PARITY == PARITY_NONE) ? S_STOP : S_PARITY;
            else
              bit_idx <= bit_idx + 1'b1;
          end
        end
        S_PARITY: begin
          if (tick) begin
            par_ok <= (line == parity_bit(buffer, PARITY));
            state  <= S_STOP;
          end
        end
        S_STOP: begin
          if (tick) begin
            if (line && (par_ok || PARITY == PARITY_NONE)) begin
              data  <= buffer;
              valid <= 1'b1;
            end else begin
              err   <= 1'b1;
            end
            par_ok <= 1'b1;
            state  <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_one_outcome: assert property (@(posedge clk) disable iff (rst)
                                  !(valid && err));

endmodule
