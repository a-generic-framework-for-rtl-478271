// soc_cpu_model: behavioural stand-in for the SoC's processor, used by the
// SoC testbenches.  It drives the processor bus port of wb_soc, observes the
// peripheral pins, and runs one scripted test program; it is not hardware.
//
// SYNC selects how it talks to the master module and must match the SoC's
// CPU_MODE.  SYNC = 0 (asynchronous): it holds cs high and puts a new
// request on the bus every clock; the answer (ready, read data) is sampled
// in the same clock.  SYNC = 1: it raises cs, waits for the one-clock ready
// pulse (checked to come 2 clocks after the request), then drops cs.
//
// Program: fill and read back the whole RAM (in asynchronous mode the clock
// count must equal the transfer count, one 24-bit word per clock); access an
// unmapped address (no ready); drive both 7-segment PIOs and read the
// buttons; send a byte through the UART looped back to its receiver at the
// reset bit time (434 clocks), reprogram the bit time and repeat; run the
// timer until it expires and produces PWM pulses.  In synchronous mode an
// unmapped access leaves the bus cycle open for good, so the model resets
// the SoC after checking it.  Each mechanism is
// counted; one that never happened is a failure.  The totals are on
// checks/failures when done rises.
module soc_cpu_model
  import wb_pkg::*;
#(
  parameter bit SYNC = 1'b0
) (
  input  logic        clk,
  output logic        rst,
  output logic        cs,
  output logic        we,
  output logic [15:0] adr,
  output logic [23:0] wdat,
  input  logic [23:0] rdat,
  input  logic        ready,
  input  logic        pwm,
  input  logic        irq,
  output logic [3:0]  btn,
  input  logic [7:0]  seg0,
  input  logic [7:0]  seg1,
  output int          checks,
  output int          failures,
  output logic        done
);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // mechanism counters
  int n_xfer = 0, n_unmapped = 0;
  int n_uart_tx = 0, n_uart_rx = 0, n_uart_reconf = 0, n_timer_wrap = 0, n_pwm = 0;
  int n_btn = 0, n_seg = 0;
  int n_slave [SOC_NS] = '{default: 0};

  function automatic int slave_of(input logic [15:0] a);
    if (a <= 16'h03FF) return S_RAM;
    if (a >= 16'h8004 && a <= 16'h8017) return 1 + int'((a - 16'h8004) >> 2);
    return -1;
  endfunction

  // one transfer; 'ok' tells whether it was acknowledged
  task automatic xfer(input logic w, input logic [15:0] a, input logic [23:0] d,
                      output logic [23:0] q, output logic ok);
    int clocks;
    @(negedge clk);
    cs = 1; we = w; adr = a; wdat = d;
    if (!SYNC) begin
      #1;
      q = rdat; ok = ready;
    end else begin
      clocks = 0;
      do begin
        @(posedge clk); #1; clocks++;
      end while (!ready && clocks < 20);
      q = rdat; ok = ready;
      if (ok) check(clocks == 2, $sformatf("ready %0d clocks after the request", clocks));
      cs = 0;
      @(posedge clk);
    end
    if (ok) begin
      n_xfer++;
      if (slave_of(a) >= 0) n_slave[slave_of(a)]++;
    end
  endtask

  task automatic wr(input logic [15:0] a, input logic [23:0] d);
    logic [23:0] q; logic ok;
    xfer(1, a, d, q, ok);
    check(ok, $sformatf("write to %h acknowledged", a));
    @(negedge clk);                      // written at the clock edge
  endtask

  task automatic rd(input logic [15:0] a, output logic [23:0] q);
    logic ok;
    xfer(0, a, 24'h0, q, ok);
    check(ok, $sformatf("read of %h acknowledged", a));
  endtask

  // pwm rising edges
  logic pwm_q = 1'b0;
  always_ff @(posedge clk) begin
    pwm_q <= pwm;
    if (pwm && !pwm_q) n_pwm++;
  end

  initial begin
    logic [23:0] q, shadow [341];
    logic ok;
    int t0, t1, c;
    checks = 0; failures = 0; done = 0;
    rst = 1; cs = 0; we = 0; adr = 0; wdat = 0; btn = 4'b0000;
    repeat (4) @(posedge clk);
    rst = 0;

    // ---------- RAM ----------
    t0 = $time / 20;
    for (int a = 0; a < 341; a++) begin
      shadow[a] = 24'($urandom);
      xfer(1, 16'(a), shadow[a], q, ok);
      check(ok, "RAM write acknowledged");
    end
    for (int a = 0; a < 341; a++) begin
      xfer(0, 16'(a), 24'h0, q, ok);
      check(ok && q == shadow[a], $sformatf("RAM word %0d", a));
    end
    @(negedge clk);
    t1 = $time / 20;
    if (!SYNC) begin
      check(t1 - t0 - 1 == 2 * 341, $sformatf("682 transfers took %0d clocks", t1 - t0 - 1));
      $display("async throughput: %0d words of 3 bytes in %0d clocks = %0d MByte/s at 50 MHz",
               2 * 341, t1 - t0 - 1, (2 * 341 * 3 * 50) / (t1 - t0 - 1));
    end else begin
      $display("sync: %0d transfers in %0d clocks", 2 * 341, t1 - t0 - 1);
    end

    // ---------- unmapped addresses: no acknowledge ----------
    if (!SYNC) begin
      xfer(0, 16'h4000, 24'h0, q, ok);
      check(!ok && q == 24'h0, "unmapped address not acknowledged");
      if (!ok) n_unmapped++;
      xfer(1, 16'h8018, 24'h0, q, ok);
      check(!ok, "address after the last slave not acknowledged");
      if (!ok) n_unmapped++;
    end else begin
      // a synchronous master waits for an ack that never comes: check that
      // the bus cycle stays open and no ready is reported
      @(negedge clk); cs = 1; we = 0; adr = 16'h4000;
      repeat (10) @(negedge clk);
      check(!ready, "unmapped address not acknowledged");
      if (!ready) n_unmapped++;
      // the open cycle can only be abandoned by a reset
      cs = 0; rst = 1;
      repeat (2) @(negedge clk);
      rst = 0;
    end

    // ---------- PIOs ----------
    wr(16'h8010 + PIO_DATA, 24'h00003F);
    check(seg0 == 8'h3F, "7-segment 0 pins");
    wr(16'h8014 + PIO_DATA, 24'h000006);
    check(seg1 == 8'h06, "7-segment 1 pins");
    if (seg0 == 8'h3F && seg1 == 8'h06) n_seg++;
    btn = 4'b1010;
    repeat (3) @(negedge clk);
    rd(16'h800C + PIO_DATA, q);
    check(q == 24'h00000A, "button pins read");
    if (q == 24'h00000A) n_btn++;
    rd(16'h8010 + PIO_DATA, q);
    check(q == 24'h00003F, "7-segment 0 read-back");

    // ---------- UART at its reset bit time, looped back ----------
    rd(16'h8004 + UART_DIV, q);
    check(q == 24'd434, "UART reset bit time 434 clocks");
    wr(16'h8004 + UART_DATA, 24'h0000A5);
    rd(16'h8004 + UART_STATUS, q);
    check(q[0], "UART busy");
    t0 = $time / 20;
    do rd(16'h8004 + UART_STATUS, q); while (!q[1] && ($time / 20 - t0) < 6000);
    check(q[1], "UART byte received");
    check(($time / 20 - t0) > 9 * 434 && ($time / 20 - t0) < 10 * 434,
          $sformatf("received %0d clocks after sending (9.5 bit times expected)", $time / 20 - t0));
    rd(16'h8004 + UART_DATA, q);
    check(q[7:0] == 8'hA5, "UART loopback byte");
    if (q[7:0] == 8'hA5) begin n_uart_tx++; n_uart_rx++; end
    wr(16'h8004 + UART_STATUS, 24'h0);
    c = 0;   // the stop bit is still on the line
    do begin rd(16'h8004 + UART_STATUS, q); c++; end while (q[0] && c < 1000);
    check(q[1:0] == 2'b00, "UART idle and flags cleared");

    // ---------- UART reconfigured to 16 clocks per bit ----------
    wr(16'h8004 + UART_DIV, 24'd16);
    rd(16'h8004 + UART_DIV, q);
    check(q == 24'd16, "UART bit time reprogrammed");
    if (q == 24'd16) n_uart_reconf++;
    wr(16'h8004 + UART_DATA, 24'h00003C);
    c = 0;
    do begin rd(16'h8004 + UART_STATUS, q); c++; end while (!q[1] && c < 400);
    rd(16'h8004 + UART_DATA, q);
    check(q[7:0] == 8'h3C, $sformatf("UART loopback byte at the new bit time: %h", q[7:0]));
    if (q[7:0] == 8'h3C) begin n_uart_tx++; n_uart_rx++; end

    // ---------- timer: period 9, compare 5 ----------
    wr(16'h8008 + TMR_PERIOD, 24'd9);
    wr(16'h8008 + TMR_COMPARE, 24'd5);
    wr(16'h8008 + TMR_CTRL, 24'd1);
    rd(16'h8008 + TMR_CTRL, q);
    check(q[0] == 1'b1, "timer enabled");
    @(negedge clk); cs = 0;
    repeat (40) @(negedge clk);
    check(irq, "timer expired");
    if (irq) n_timer_wrap++;
    rd(16'h8008 + TMR_CTRL, q);
    check(q[1], "expired flag readable");
    wr(16'h8008 + TMR_CTRL, 24'd2);      // stop, clear
    check(!irq && !pwm, "timer stopped and cleared");
    @(negedge clk); cs = 0;

    // ---------- coverage of the mechanisms ----------
    check(n_xfer >= 682,      "transfers happened");
    check(n_unmapped > 0,     "unmapped access happened");
    check(n_uart_tx == 2 && n_uart_rx == 2, "UART transmit and receive happened");
    check(n_uart_reconf > 0,  "UART reconfiguration happened");
    check(n_timer_wrap > 0 && n_pwm >= 3, "timer wrap and pwm happened");
    check(n_btn > 0 && n_seg > 0, "PIO input and output happened");
    for (int s = 0; s < SOC_NS; s++) check(n_slave[s] > 0, $sformatf("slave %0d addressed", s));
    $display("%s transfers=%0d unmapped=%0d uart_tx=%0d uart_rx=%0d reconf=%0d timer_wraps=%0d pwm_pulses=%0d btn=%0d seg=%0d",
             SYNC ? "sync" : "async", n_xfer, n_unmapped, n_uart_tx, n_uart_rx, n_uart_reconf,
             n_timer_wrap, n_pwm, n_btn, n_seg);
    done = 1;
  end
endmodule
