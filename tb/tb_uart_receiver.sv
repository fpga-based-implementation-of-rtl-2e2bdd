// tb_uart_receiver: self-checking test of the UART receiver.
//
// Three receivers (no parity, even parity, odd parity) with DIV = 16 each
// get their own serial line, driven bit by bit by the testbench from
// frames it builds itself. Checked for every mode:
//  - good frames deliver the byte on `data` with exactly one `valid`
//    pulse and no `err`, at the middle of the stop bit (+ synchroniser
//    delay), and `busy` is high in the middle of the frame;
//  - back-to-back frames with no idle time between them are all received;
//  - a frame with a low stop bit, or (with parity) a wrong parity bit,
//    gives one `err` pulse and leaves `data` unchanged;
//  - a low glitch shorter than half a bit starts no reception;
//  - a falling edge inside a frame does not restart reception.
module tb_uart_receiver;
  import uart_pkg::*;
  localparam int unsigned DIV = 16;

  logic       clk = 1'b0;
  logic       rst;
  logic [2:0] line, busy, valid, err;
  logic [7:0] data [3];
  int checks = 0, failures = 0;
  int n_valid [3], n_err [3];
  int last_valid_time [3];
  int cyc = 0;
  logic [7:0] rxq [3][$];

  uart_receiver #(.DIV(DIV), .PARITY(PARITY_NONE)) dut_n
    (.clk, .rst, .rline(line[0]), .busy(busy[0]), .data(data[0]), .valid(valid[0]), .err(err[0]));
  uart_receiver #(.DIV(DIV), .PARITY(PARITY_EVEN)) dut_e
    (.clk, .rst, .rline(line[1]), .busy(busy[1]), .data(data[1]), .valid(valid[1]), .err(err[1]));
  uart_receiver #(.DIV(DIV), .PARITY(PARITY_ODD))  dut_o
    (.clk, .rst, .rline(line[2]), .busy(busy[2]), .data(data[2]), .valid(valid[2]), .err(err[2]));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int m = 0; m < 3; m++) begin
      if (!rst && valid[m]) begin
        n_valid[m]++;
        last_valid_time[m] = cyc;
        rxq[m].push_back(data[m]);
      end
      if (!rst && err[m])   n_err[m]++;
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int nbits(input int m);
    return (m == 0) ? 10 : 11;
  endfunction

  // Bit k of a frame; flip_par / low_stop corrupt the frame.
  function automatic logic frame_bit(input int m, input logic [7:0] d, input int k,
                                     input bit flip_par, input bit low_stop);
    int ones;
    ones = $countones(d);
    if (k == 0) return 1'b0;
    if (k <= 8) return d[k-1];
    if (k == nbits(m) - 1) return !low_stop;
    return ((m == 1) ? logic'(ones % 2) : logic'((ones + 1) % 2)) ^ flip_par;
  endfunction

  // Drive one frame on line m; returns the cycle count at its falling edge.
  task automatic drive(input int m, input logic [7:0] d, input bit flip_par,
                       input bit low_stop, output int t_edge);
    @(negedge clk);
    t_edge = cyc;
    for (int k = 0; k < nbits(m); k++) begin
      line[m] = frame_bit(m, d, k, flip_par, low_stop);
      for (int c = 0; c < DIV; c++) begin
        if (k == 4 && c == DIV / 2) check(busy[m], $sformatf("busy mid-frame mode %0d", m));
        @(negedge clk);
      end
    end
    line[m] = 1'b1;
  endtask

  task automatic good_frame(input int m, input logic [7:0] d, input bit gap);
    int v0, e0, t;
    v0 = n_valid[m]; e0 = n_err[m];
    drive(m, d, 1'b0, 1'b0, t);
    if (gap) repeat (DIV) @(negedge clk);
    else repeat (3) @(negedge clk);
    check(n_valid[m] == v0 + 1, $sformatf("one valid mode %0d byte %02x", m, d));
    check(n_err[m] == e0, $sformatf("no err mode %0d", m));
    check(data[m] == d, $sformatf("data mode %0d: got %02x expected %02x", m, data[m], d));
    // valid at the middle of the stop bit, plus 2-3 cycles of synchroniser
    // and edge detection
    check(last_valid_time[m] - t >= (nbits(m) - 1) * DIV + DIV / 2 &&
          last_valid_time[m] - t <= (nbits(m) - 1) * DIV + DIV / 2 + 4,
          $sformatf("valid timing mode %0d: %0d cycles", m, last_valid_time[m] - t));
  endtask

  task automatic bad_frame(input int m, input logic [7:0] d, input bit flip_par, input bit low_stop);
    int v0, e0, t;
    logic [7:0] prev_data;
    v0 = n_valid[m]; e0 = n_err[m]; prev_data = data[m];
    drive(m, d, flip_par, low_stop, t);
    repeat (DIV) @(negedge clk);
    check(n_valid[m] == v0, $sformatf("no valid on bad frame mode %0d", m));
    check(n_err[m] == e0 + 1, $sformatf("one err on bad frame mode %0d", m));
    check(data[m] == prev_data, $sformatf("data kept on bad frame mode %0d", m));
  endtask

  task automatic glitch(input int m);
    int v0, e0;
    v0 = n_valid[m]; e0 = n_err[m];
    @(negedge clk);
    line[m] = 1'b0;
    repeat (DIV / 4) @(negedge clk);
    line[m] = 1'b1;
    repeat (DIV) @(negedge clk);
    check(!busy[m], $sformatf("glitch rejected mode %0d", m));
    repeat (12 * DIV) @(negedge clk);
    check(n_valid[m] == v0 && n_err[m] == e0, $sformatf("glitch gives no frame mode %0d", m));
  endtask

  initial begin
    rst = 1'b1; line = '1;
    for (int m = 0; m < 3; m++) begin n_valid[m] = 0; n_err[m] = 0; last_valid_time[m] = 0; end
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (4) @(negedge clk);
    for (int m = 0; m < 3; m++) begin
      check(!busy[m] && data[m] == 8'h00, "idle after reset");
      good_frame(m, 8'h49, 1'b1);
      good_frame(m, 8'h00, 1'b1);
      good_frame(m, 8'hFF, 1'b1);
      // back to back: the next start bit follows the stop bit directly
      begin
        logic [7:0] sent [$];
        int t;
        rxq[m].delete();
        for (int i = 0; i < 10; i++) begin
          sent.push_back(8'($urandom));
          drive(m, sent[i], 1'b0, 1'b0, t);
        end
        repeat (DIV) @(negedge clk);
        check(rxq[m].size() == 10, $sformatf("back-to-back count mode %0d: %0d", m, rxq[m].size()));
        for (int i = 0; i < 10 && i < rxq[m].size(); i++)
          check(rxq[m][i] == sent[i], $sformatf("back-to-back byte %0d mode %0d", i, m));
      end
      repeat (2 * DIV) @(negedge clk);
      good_frame(m, 8'hA5, 1'b1);
      bad_frame(m, 8'h3C, 1'b0, 1'b1);            // low stop bit
      repeat (2 * DIV) @(negedge clk);           // line back high, no edge yet
      if (m != 0) bad_frame(m, 8'h5A, 1'b1, 1'b0); // wrong parity
      good_frame(m, 8'hC3, 1'b1);
      glitch(m);
      good_frame(m, 8'($urandom), 1'b1);
    end
    $display("valid: %0d %0d %0d  err: %0d %0d %0d",
             n_valid[0], n_valid[1], n_valid[2], n_err[0], n_err[1], n_err[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
