// tb_uart_prescaler: self-checking test of the bit-period timer.
//
// Runs the prescaler with DIV = 10 and checks, cycle by cycle against a
// reference count kept in the testbench, that `tick` fires exactly every
// DIV cycles, that `half` fires DIV/2 cycles after `clear` is released,
// that nothing fires while `clear` is held, and that `clear` restarts the
// period. Also checks an odd divider (DIV = 7).
module tb_uart_prescaler;
  logic clk = 1'b0;
  logic rst, clear;
  logic tick, half, tick7, half7;
  int   checks = 0, failures = 0;

  uart_prescaler #(.DIV(10)) dut  (.clk, .rst, .clear, .tick, .half);
  uart_prescaler #(.DIV(7))  dut7 (.clk, .rst, .clear, .tick(tick7), .half(half7));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    rst = 1'b1; clear = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // clear held: no output
    repeat (20) begin
      @(negedge clk);
      check(tick, 1'b0, "tick while clear");
      check(half, 1'b0, "half while clear");
    end
    // release clear: after k cycles counter = k, tick when k%10==9
    @(negedge clk); clear = 1'b0;
    n = 0;
    repeat (45) begin
      // during this cycle the counter holds n mod DIV
      check(tick,  (n % 10) == 9, "tick period 10");
      check(half,  (n % 10) == 4, "half position 10");
      check(tick7, (n % 7) == 6,  "tick period 7");
      check(half7, (n % 7) == 2,  "half position 7");
      @(negedge clk); n++;
    end
    // restart in the middle of a period
    clear = 1'b1;
    @(negedge clk);
    check(tick, 1'b0, "tick during clear");
    clear = 1'b0; n = 0;
    repeat (25) begin
      check(tick, (n % 10) == 9, "tick after restart");
      check(half, (n % 10) == 4, "half after restart");
      @(negedge clk); n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
