// uart_transmitter: parallel-to-serial half of the UART.
//
// When `start` is high while the transmitter is idle, the byte on `data`
// is copied into an internal data buffer and sent on `tline` as one frame:
// start bit (0), the 8 data bits least significant first, a parity bit if
// PARITY is not PARITY_NONE, and a stop bit (1). `tline` idles high and is
// driven from a register, so it is glitch free.
//
// Timing: `start` is sampled on a rising clock edge; from that edge
// `tline` carries the start bit and `busy` is high. Every bit lasts exactly
// DIV clock cycles, so `busy` stays high for frame_bits(PARITY)*DIV cycles
// and falls on the edge that ends the stop bit. `start` is ignored while
// `busy` is high. The next frame can start on the cycle `busy` is low.
//
// Ports clk, start, data, busy and tline are those of the document's
// transmitter; the buffer-plus-control structure follows its block diagram.
// The reset input, the bit order, the parity options and the state machine
// are this design's own choices.
module uart_transmitter
  import uart_pkg::*;
#(
  parameter int unsigned DIV    = 434,          // clock cycles per bit
  parameter parity_e     PARITY = PARITY_NONE
) (
  input  logic                 clk,
  input  logic                 rst,    // synchronous, active high
  input  logic                 start,  // request to send `data`
  input  logic [DATA_BITS-1:0] data,
  output logic                 busy,   // a frame is on the line
  output logic                 tline   // serial output, idles high
);

  typedef enum logic [2:0] {
    S_IDLE, S_START, S_DATA, S_PARITY, S_STOP
  } state_e;

  state_e                   state;
  logic [DATA_BITS-1:0]     buffer;   // shift register, LSB goes out first
  logic [$clog2(DATA_BITS)-1:0] bit_idx;
  logic                     par;
  logic                     tick;
  logic                     half_unused;

  uart_prescaler #(.DIV(DIV)) u_prescaler (
    .clk  (clk),
    .rst  (rst),
    .clear(state == S_IDLE),
    .tick (tick),
    .half (half_unused)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      tline   <= 1'b1;
      buffer  <= '0;
      bit_idx <= '0;
      par     <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            buffer  <= data;
            par     <= parity_bit(data, PARITY);
            bit_idx <= '0;
            tline   <= 1'b0;              // start bit
            state   <= S_START;
          end
        end
        S_START: begin
          if (tick) begin
            tline <= buffer[0];           // first data bit
            state <= S_DATA;
          end
        end
        S_DATA: begin
          if (tick) begin
            buffer <= buffer >> 1;
            if (bit_idx == $clog2(DATA_BITS)'(DATA_BITS - 1)) begin
              if (PARITY == PARITY_NONE) begin
                tline <= 1'b1;            // stop bit
                state <= S_STOP;
              end else begin
                tline <= par;
                state <= S_PARITY;
              end
            end else begin
              tline   <= buffer[1];
              bit_idx <= bit_idx + 1'b1;
            end
          end
        end
        S_PARITY: begin
          if (tick) begin
            tline <= 1'b1;                // stop bit
            state <= S_STOP;
          end
        end
        S_STOP: begin
          if (tick) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // The line must be high whenever no frame is being sent.
  a_idle_high: assert property (@(posedge clk) disable iff (rst)
                                (state == S_IDLE) |-> tline);

endmodule
