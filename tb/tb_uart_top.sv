// tb_uart_top: end-to-end test of the UART top level at its default
// parameters (50 MHz clock, 115200 baud, no parity: 434 cycles per bit).
//
// TD is looped back to RD, as on the board with the two GPIO pins shorted,
// except while the testbench drives RD itself. Sequence:
//  1. switch = 0x49, press key[0]: the frame on TD is checked bit by bit
//     in the middle of each bit, Tledg must show 0x49 at once and Rledr
//     must show 0x49 after one frame time (checked against its expected
//     cycle window);
//  2. a second press while the frame is on the line must be ignored;
//  3. random bytes are sent and received the same way;
//  4. with the loop opened, a frame with a low stop bit and a short glitch
//     are driven on RD: Rledr must not change.
// It counts how often each mechanism happened (frame sent, frame received,
// press ignored while busy, bad frame rejected, glitch rejected) and fails
// if one never did.
module tb_uart_top;
  localparam int DIV = 434;       // 50e6 / 115200, rounded
  localparam int NBITS = 10;

  logic       clock = 1'b0;
  logic       rst_n;
  logic [3:0] key;
  logic [9:0] switch;
  logic       RD, TD;
  logic [9:0] Rledr;
  logic [7:0] Tledg;
  logic       loop, ext_rd;
  int checks = 0, failures = 0;
  int n_sent = 0, n_recv = 0, n_ignored = 0, n_bad = 0, n_glitch = 0;
  int cyc = 0;

  uart_top dut (.clock, .rst_n, .key, .switch, .RD, .TD, .Rledr, .Tledg);

  assign RD = loop ? TD : ext_rd;

  always #10 clock = ~clock;      // 50 MHz
  always @(posedge clock) cyc <= cyc + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Press key[0] with `value` on the switches, check the frame on TD and
  // the LEDs. If `poke` is set, press again during the frame with another
  // value, which must be ignored.
  task automatic send(input logic [7:0] value, input bit poke);
    int t_press, t_edge, t_rx;
    logic [7:0] old_r;
    old_r = Rledr[7:0];
    @(negedge clock);
    switch = {2'b11, value};
    key[0] = 1'b0;
    t_press = cyc;
    // wait for the start bit
    while (TD) @(negedge clock);
    t_edge = cyc;
    n_sent++;
    check(t_edge - t_press <= 4, $sformatf("start latency %0d", t_edge - t_press));
    check(Tledg == value, $sformatf("Tledg %02x expected %02x", Tledg, value));
    repeat (20) @(negedge clock);
    key[0] = 1'b1;
    switch = {2'b00, ~value};
    // sample every bit in its middle
    for (int k = 0; k < NBITS; k++) begin
      logic exp;
      exp = (k == 0) ? 1'b0 : (k == NBITS - 1) ? 1'b1 : value[k-1];
      while (cyc < t_edge + k * DIV + DIV / 2) begin
        if (poke && k == 3 && cyc == t_edge + 3 * DIV) key[0] = 1'b0;
        if (poke && k == 3 && cyc == t_edge + 3 * DIV + 50) key[0] = 1'b1;
        @(negedge clock);
      end
      check(TD == exp, $sformatf("TD bit %0d of %02x", k, value));
    end
    // the red LEDs follow at the middle of the stop bit
    t_rx = -1;
    while (cyc < t_edge + NBITS * DIV + 20) begin
      if (t_rx < 0 && Rledr[7:0] == value && (Rledr[7:0] != old_r || cyc > t_edge + (NBITS - 1) * DIV))
        t_rx = cyc;
      @(negedge clock);
    end
    check(Rledr == {2'b00, value}, $sformatf("Rledr %03x expected %02x", Rledr, value));
    if (Rledr[7:0] == value) n_recv++;
    if (value != old_r)
      check(t_rx >= t_edge + (NBITS - 1) * DIV + DIV / 2 && t_rx <= t_edge + (NBITS - 1) * DIV + DIV / 2 + 6,
            $sformatf("Rledr update %0d cycles after start bit", t_rx - t_edge));
    check(Tledg == value, "Tledg holds the byte sent");
    if (poke) begin
      // an accepted second press would start a new frame now
      repeat (3 * DIV) @(negedge clock);
      check(TD == 1'b1, "press during frame ignored");
      check(Tledg == value, "Tledg unchanged by ignored press");
      if (TD == 1'b1 && Tledg == value) n_ignored++;
    end
  endtask

  task automatic drive_rd_frame(input logic [7:0] value, input bit low_stop);
    for (int k = 0; k < NBITS; k++) begin
      ext_rd = (k == 0) ? 1'b0 : (k == NBITS - 1) ? !low_stop : value[k-1];
      repeat (DIV) @(negedge clock);
    end
    ext_rd = 1'b1;
  endtask

  initial begin
    rst_n = 1'b0; key = 4'hF; switch = '0; loop = 1'b1; ext_rd = 1'b1;
    repeat (5) @(negedge clock);
    rst_n = 1'b1;
    repeat (5) @(negedge clock);
    check(TD == 1'b1 && Rledr == '0 && Tledg == '0, "idle after reset");

    send(8'h49, 1'b0);              // the board test value, 01001001
    send(8'hB6, 1'b1);              // with a press while busy
    for (int i = 0; i < 5; i++) send(8'($urandom), 1'b0);

    // open the loop and feed RD from the testbench
    loop = 1'b0;
    begin
      logic [7:0] keep;
      keep = Rledr[7:0];
      drive_rd_frame(~keep, 1'b1);  // low stop bit
      repeat (4 * DIV) @(negedge clock);
      check(Rledr[7:0] == keep, "bad frame does not reach Rledr");
      if (Rledr[7:0] == keep) n_bad++;
      ext_rd = 1'b0;                // glitch, shorter than half a bit
      repeat (DIV / 4) @(negedge clock);
      ext_rd = 1'b1;
      repeat (12 * DIV) @(negedge clock);
      check(Rledr[7:0] == keep, "glitch does not reach Rledr");
      if (Rledr[7:0] == keep) n_glitch++;
      drive_rd_frame(8'h5C, 1'b0);  // a good frame from outside
      repeat (DIV) @(negedge clock);
      check(Rledr[7:0] == 8'h5C, "external frame received");
      if (Rledr[7:0] == 8'h5C) n_recv++;
    end

    $display("mechanisms: sent=%0d received=%0d ignored_press=%0d bad_frame=%0d glitch=%0d",
             n_sent, n_recv, n_ignored, n_bad, n_glitch);
    check(n_sent > 0, "frame sent");
    check(n_recv > 0, "frame received");
    check(n_ignored > 0, "press ignored while busy");
    check(n_bad > 0, "bad frame rejected");
    check(n_glitch > 0, "glitch rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
