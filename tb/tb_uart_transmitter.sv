// tb_uart_transmitter: self-checking test of the UART transmitter.
//
// Three transmitters (no parity, even parity, odd parity) with DIV = 8 are
// driven by the same start/data. For every byte the testbench builds the
// expected frame itself and checks `tline` on every clock cycle of the
// frame, so both bit values and the exact bit boundaries are tested
// (each bit must last DIV cycles). `busy` must be high for exactly
// frame_bits * DIV cycles. A second start pulse during a frame must be
// ignored. Bytes: 0x49 (the switch setting of the board test), 0x00, 0xFF
// and random values.
module tb_uart_transmitter;
  import uart_pkg::*;
  localparam int unsigned DIV = 8;

  logic       clk = 1'b0;
  logic       rst, start;
  logic [7:0] data;
  logic [2:0] busy, tline;
  int checks = 0, failures = 0;

  uart_transmitter #(.DIV(DIV), .PARITY(PARITY_NONE)) dut_n
    (.clk, .rst, .start, .data, .busy(busy[0]), .tline(tline[0]));
  uart_transmitter #(.DIV(DIV), .PARITY(PARITY_EVEN)) dut_e
    (.clk, .rst, .start, .data, .busy(busy[1]), .tline(tline[1]));
  uart_transmitter #(.DIV(DIV), .PARITY(PARITY_ODD))  dut_o
    (.clk, .rst, .start, .data, .busy(busy[2]), .tline(tline[2]));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected frame for mode m (0 none, 1 even, 2 odd), bit k.
  function automatic logic frame_bit(input int m, input logic [7:0] d, input int k);
    int nbits;
    int ones;
    nbits = (m == 0) ? 10 : 11;
    ones  = $countones(d);
    if (k == 0) return 1'b0;                   // start
    if (k <= 8) return d[k-1];                 // data, LSB first
    if (k == nbits - 1) return 1'b1;           // stop
    return (m == 1) ? logic'(ones % 2) : logic'((ones + 1) % 2);  // parity
  endfunction

  task automatic send(input logic [7:0] d);
    @(negedge clk);
    start = 1'b1; data = d;
    @(negedge clk);          // accepted on the edge just passed
    start = 1'b0; data = ~d;
    for (int c = 0; c <= 11 * DIV; c++) begin
      for (int m = 0; m < 3; m++) begin
        int nbits;
        nbits = (m == 0) ? 10 : 11;
        if (c < nbits * DIV) begin
          check(tline[m], frame_bit(m, d, c / DIV), $sformatf("tline mode %0d bit %0d", m, c / DIV));
          check(busy[m], 1'b1, $sformatf("busy mode %0d", m));
        end else begin
          check(tline[m], 1'b1, $sformatf("idle line mode %0d", m));
          check(busy[m], 1'b0, $sformatf("busy low mode %0d", m));
        end
      end
      if (c == 2 * DIV + 1) start = 1'b1;        // ignored while busy
      else start = 1'b0;
      @(negedge clk);
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; data = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(&tline, 1'b1, "line idles high after reset");
    check(|busy, 1'b0, "not busy after reset");
    send(8'h49);
    send(8'h00);
    send(8'hFF);
    repeat (20) send(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
