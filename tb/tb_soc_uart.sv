// tb_soc_uart: self-checking testbench of the UART.
// Checks the reset bit time (50 MHz / 115200 = 434 clocks), reprograms it to
// 8 clocks per bit at run time, then: sends random bytes and decodes the tx
// line with a reference receiver written here (start bit, 8 data bits LSB
// first, stop bit, sampled mid-bit, start bit exactly 8 clocks long); drives random
// frames into rx and checks the received byte, rx_valid, the overrun flag
// and clearing through the status register; checks that a write while busy
// is ignored.
module tb_soc_uart;
  import wb_pkg::*;
  localparam int DAT_W = 24, DIV = 8;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic             cs, we, tx, rx;
  logic [1:0]       adr;
  logic [DAT_W-1:0] wdat, rdat;

  int checks = 0, failures = 0;

  soc_uart dut (.clk(clk), .rst(rst), .cs_i(cs), .we_i(we), .adr_i(adr), .dat_i(wdat),
                .dat_o(rdat), .tx_o(tx), .rx_i(rx));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic wr(input logic [1:0] a, input logic [DAT_W-1:0] d);
    @(negedge clk); cs = 1; we = 1; adr = a; wdat = d;
    @(negedge clk); cs = 0; we = 0;
  endtask

  task automatic rd(input logic [1:0] a, output logic [DAT_W-1:0] d);
    @(negedge clk); cs = 1; we = 0; adr = a; #1; d = rdat;
    @(negedge clk); cs = 0;
  endtask

  // reference receiver on tx: returns the byte, the length of the start bit
  // in clocks (the byte's bit 0 is 1, so the start bit ends with a rising
  // edge) and the stop bit value, sampled in the middle of each bit
  task automatic catch_tx(output logic [7:0] b, output int len, output bit stop_ok);
    int t0;
    while (tx) @(posedge clk);
    t0 = $time / 10;
    while (!tx) @(posedge clk);
    len = $time / 10 - t0;
    repeat (DIV / 2) @(posedge clk);
    b[0] = tx;
    for (int i = 1; i < 8; i++) begin
      repeat (DIV) @(posedge clk);
      b[i] = tx;
    end
    repeat (DIV) @(posedge clk);
    stop_ok = tx;
  endtask

  task automatic send_rx(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); rx = f[i];
      repeat (DIV - 1) @(negedge clk);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DAT_W-1:0] d;
    logic [7:0] b, got;
    int len;
    bit stop_ok;
    cs = 0; we = 0; adr = 0; wdat = 0; rx = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    rd(UART_DIV, d);
    check(d == 434, $sformatf("reset bit time %0d", d));
    check(tx == 1'b1, "tx idles high");
    wr(UART_DIV, DIV);
    rd(UART_DIV, d);
    check(d == DIV, "bit time reprogrammed");

    // transmit
    for (int n = 0; n < 12; n++) begin
      b = 8'($urandom) | 8'h01;
      fork
        catch_tx(got, len, stop_ok);
        begin
          wr(UART_DATA, DAT_W'(b));
          rd(UART_STATUS, d);
          check(d[0] == 1'b1, "tx_busy while sending");
          wr(UART_DATA, DAT_W'(~b));       // ignored: still busy
        end
      join
      check(got == b, $sformatf("tx byte %h, expected %h", got, b));
      check(stop_ok, "stop bit");
      check(len == DIV, $sformatf("start bit %0d clocks, expected %0d", len, DIV));
      repeat (DIV / 2 + 1) @(negedge clk);   // rest of the stop bit
      rd(UART_STATUS, d);
      check(d[0] == 1'b0, "tx idle after frame");
    end

    // receive
    for (int n = 0; n < 12; n++) begin
      b = 8'($urandom);
      send_rx(b);
      repeat (4) @(negedge clk);
      rd(UART_STATUS, d);
      check(d[1] == 1'b1 && d[2] == 1'b0, "rx_valid, no overrun");
      rd(UART_DATA, d);
      check(d[7:0] == b, $sformatf("rx byte %h, expected %h", d[7:0], b));
      wr(UART_STATUS, '0);
      rd(UART_STATUS, d);
      check(d[1] == 1'b0, "rx_valid cleared");
    end
    // overrun: two frames without clearing
    send_rx(8'h11);
    send_rx(8'h22);
    repeat (4) @(negedge clk);
    rd(UART_STATUS, d);
    check(d[2:1] == 2'b11, "overrun flagged");
    rd(UART_DATA, d);
    check(d[7:0] == 8'h22, "newest byte kept");
    wr(UART_STATUS, '0);
    rd(UART_STATUS, d);
    check(d[2:1] == 2'b00, "flags cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
