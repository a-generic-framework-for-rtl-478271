// tb_wb_soc_sync: end-to-end testbench of the SoC built with a synchronous
// master module (CPU_MODE = WB_SYNC), all other parameters at their
// defaults.  soc_cpu_model runs the same program as for the asynchronous
// build, but waits for each registered transfer's ready pulse and checks
// that it comes 2 clocks after the request; an unmapped access is checked to
// stay unanswered.  The UART is looped back (tx to rx).
module tb_wb_soc_sync;
  logic clk = 1'b0;
  always #10 clk = ~clk;   // 50 MHz

  logic        rst, cs, we, ready, tx, pwm, irq, done;
  logic [15:0] adr;
  logic [23:0] wdat, rdat;
  logic [3:0]  btn;
  logic [7:0]  seg0, seg1;
  int          checks, failures;

  wb_soc #(.CPU_MODE(wb_pkg::WB_SYNC)) dut (
    .clk(clk), .rst(rst), .cpu_cs_i(cs), .cpu_we_i(we),
    .cpu_adr_i(adr), .cpu_dat_i(wdat), .cpu_dat_o(rdat), .cpu_ready_o(ready),
    .uart_tx_o(tx), .uart_rx_i(tx), .timer_pwm_o(pwm), .timer_irq_o(irq),
    .btn_i(btn), .seg0_o(seg0), .seg1_o(seg1));

  soc_cpu_model #(.SYNC(1'b1)) cpu (
    .clk(clk), .rst(rst), .cs(cs), .we(we), .adr(adr), .wdat(wdat), .rdat(rdat),
    .ready(ready), .pwm(pwm), .irq(irq), .btn(btn), .seg0(seg0), .seg1(seg1),
    .checks(checks), .failures(failures), .done(done));

  initial begin
    fork
      begin @(posedge clk); wait (done === 1'b1); end
      begin
        #10ms;
        $display("FAIL: watchdog");
        failures++;
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
