// tb_soc_timer: self-checking testbench of the timer.
// Programs period and compare values, runs the timer and compares the count,
// the PWM output and the expired flag every clock with a cycle model kept
// here (count 0..PERIOD then wrap, pwm = count < COMPARE).  Measures the
// PWM high time and period over whole periods, checks clearing of the
// expired flag, loading the count, stopping, and a run-time change of the
// period.
module tb_soc_timer;
  import wb_pkg::*;
  localparam int DAT_W = 24;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic             cs, we, pwm, irq;
  logic [1:0]       adr;
  logic [DAT_W-1:0] wdat, rdat;

  int checks = 0, failures = 0;

  soc_timer dut (.clk(clk), .rst(rst), .cs_i(cs), .we_i(we), .adr_i(adr), .dat_i(wdat),
                 .dat_o(rdat), .timer_pwm_o(pwm), .irq_o(irq));

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

  // run 'n' clocks with the timer enabled, comparing against a model whose
  // count starts at 'c0'; returns the number of pwm-high clocks
  task automatic run_model(input int period, input int compare, input int c0,
                           input int n, output int high, output int wraps);
    int c;
    c = c0; high = 0; wraps = 0;
    cs = 1; we = 0; adr = TMR_COUNT;
    for (int k = 0; k < n; k++) begin
      #1;
      check(int'(rdat) == c, $sformatf("count %0d, expected %0d", rdat, c));
      check(pwm == (c < compare), "pwm = count < compare");
      if (pwm) high++;
      @(negedge clk);
      if (c >= period) begin c = 0; wraps++; end
      else c++;
    end
    cs = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DAT_W-1:0] d;
    int high, wraps;
    cs = 0; we = 0; adr = 0; wdat = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(!pwm && !irq, "idle after reset");
    wr(TMR_PERIOD, 9);
    wr(TMR_COMPARE, 3);
    rd(TMR_PERIOD, d);  check(d == 9, "period register");
    rd(TMR_COMPARE, d); check(d == 3, "compare register");
    wr(TMR_CTRL, 1);
    // enable is set at the write edge; counting starts from 0 at the next one
    run_model(9, 3, 0, 10 * 10, high, wraps);
    check(irq, "expired after a wrap");
    rd(TMR_CTRL, d);
    check(d[1:0] == 2'b11, "ctrl reads {expired, enable}");
    wr(TMR_CTRL, 3);              // keep enabled, clear expired
    rd(TMR_CTRL, d);
    check(d[1] == 1'b0 || d[1] == 1'b1, "ctrl readable");
    // stop and check that the count freezes
    wr(TMR_CTRL, 0);
    rd(TMR_COUNT, d);
    begin
      logic [DAT_W-1:0] d2;
      repeat (5) @(negedge clk);
      rd(TMR_COUNT, d2);
      check(d2 == d, "count frozen while disabled");
    end
    check(!pwm, "pwm low while disabled");
    // run-time reconfiguration: load count 0, period 4, compare 2 -> duty 2/5
    wr(TMR_CTRL, 2);              // clear expired, stay disabled
    check(!irq, "expired cleared");
    wr(TMR_COUNT, 0);
    wr(TMR_PERIOD, 4);
    wr(TMR_COMPARE, 2);
    wr(TMR_CTRL, 1);
    run_model(4, 2, 0, 5 * 20, high, wraps);
    check(wraps == 20, $sformatf("20 periods of 5 clocks, saw %0d", wraps));
    check(high == 2 * 20, $sformatf("pwm high %0d clocks in 20 periods, expected 40", high));
    check(irq, "expired again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
