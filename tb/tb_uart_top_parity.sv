// tb_uart_top_parity: loopback test of the UART top level with the parity
// bit enabled (even and odd), at 50 MHz and 115200 baud.
//
// Two tops, one per parity mode, each with TD wired back to RD. For each
// byte the 11-bit frame on TD is checked in the middle of every bit
// against a frame built by the testbench, and Rledr must show the byte
// afterwards. Then the loop is opened and a frame with the wrong parity
// bit is driven on RD: Rledr must keep its value.
module tb_uart_top_parity;
  import uart_pkg::*;
  localparam int DIV = 434;
  localparam int NBITS = 11;

  logic       clock = 1'b0;
  logic       rst_n;
  logic [3:0] key;
  logic [9:0] switch;
  logic [1:0] RD, TD, loop, ext_rd;
  logic [9:0] Rledr [2];
  logic [7:0] Tledg [2];
  int checks = 0, failures = 0, cyc = 0;

  uart_top #(.PARITY(PARITY_EVEN)) dut_e
    (.clock, .rst_n, .key, .switch, .RD(RD[0]), .TD(TD[0]), .Rledr(Rledr[0]), .Tledg(Tledg[0]));
  uart_top #(.PARITY(PARITY_ODD)) dut_o
    (.clock, .rst_n, .key, .switch, .RD(RD[1]), .TD(TD[1]), .Rledr(Rledr[1]), .Tledg(Tledg[1]));

  assign RD[0] = loop[0] ? TD[0] : ext_rd[0];
  assign RD[1] = loop[1] ? TD[1] : ext_rd[1];

  always #10 clock = ~clock;
  always @(posedge clock) cyc <= cyc + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic fbit(input int m, input logic [7:0] v, input int k, input bit flip);
    if (k == 0) return 1'b0;
    if (k <= 8) return v[k-1];
    if (k == 9) return ((m == 0) ? (^v) : ~(^v)) ^ flip;
    return 1'b1;
  endfunction

  task automatic send(input logic [7:0] value);
    int t_edge;
    @(negedge clock);
    switch = {2'b00, value};
    key[0] = 1'b0;
    while (TD[0]) @(negedge clock);
    t_edge = cyc;
    repeat (10) @(negedge clock);
    key[0] = 1'b1;
    for (int k = 0; k < NBITS; k++) begin
      while (cyc < t_edge + k * DIV + DIV / 2) @(negedge clock);
      for (int m = 0; m < 2; m++)
        check(TD[m] == fbit(m, value, k, 1'b0), $sformatf("TD mode %0d bit %0d of %02x", m, k, value));
    end
    repeat (DIV) @(negedge clock);
    for (int m = 0; m < 2; m++)
      check(Rledr[m][7:0] == value && Tledg[m] == value, $sformatf("LEDs mode %0d byte %02x", m, value));
  endtask

  initial begin
    rst_n = 1'b0; key = 4'hF; switch = '0; loop = 2'b11; ext_rd = 2'b11;
    repeat (5) @(negedge clock);
    rst_n = 1'b1;
    repeat (5) @(negedge clock);
    send(8'h49);
    send(8'h01);
    send(8'($urandom));
    send(8'($urandom));
    // wrong parity from outside: rejected
    loop = 2'b00;
    begin
      logic [7:0] keep [2];
      keep[0] = Rledr[0][7:0]; keep[1] = Rledr[1][7:0];
      for (int k = 0; k < NBITS; k++) begin
        for (int m = 0; m < 2; m++) ext_rd[m] = fbit(m, 8'h77, k, 1'b1);
        repeat (DIV) @(negedge clock);
      end
      ext_rd = 2'b11;
      repeat (2 * DIV) @(negedge clock);
      for (int m = 0; m < 2; m++)
        check(Rledr[m][7:0] == keep[m], $sformatf("wrong parity rejected mode %0d", m));
      // the same byte with correct parity is accepted
      for (int k = 0; k < NBITS; k++) begin
        for (int m = 0; m < 2; m++) ext_rd[m] = fbit(m, 8'h77, k, 1'b0);
        repeat (DIV) @(negedge clock);
      end
      ext_rd = 2'b11;
      repeat (2 * DIV) @(negedge clock);
      for (int m = 0; m < 2; m++)
        check(Rledr[m][7:0] == 8'h77, $sformatf("right parity accepted mode %0d", m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
