// tb_wb_soc: end-to-end testbench of the case-study SoC at its default
// parameters (16-bit addresses, 24-bit data, asynchronous master, 50 MHz
// clock, 115200 baud).  The processor is replaced by soc_cpu_model, which
// holds cs high and issues one request per clock; the UART is looped back
// (tx to rx).  The model fills and reads back the RAM at one word per clock
// (682 transfers in 682 clocks, 150 MByte/s at 50 MHz), tries unmapped
// addresses, drives the PIOs, sends UART bytes at two bit times and runs the
// timer; it counts each mechanism and fails if one never happened.
module tb_wb_soc;
  logic clk = 1'b0;
  always #10 clk = ~clk;   // 50 MHz

  logic        rst, cs, we, ready, tx, pwm, irq, done;
  logic [15:0] adr;
  logic [23:0] wdat, rdat;
  logic [3:0]  btn;
  logic [7:0]  seg0, seg1;
  int          checks, failures;

  wb_soc dut (
    .clk(clk), .rst(rst), .cpu_cs_i(cs), .cpu_we_i(we),
    .cpu_adr_i(adr), .cpu_dat_i(wdat), .cpu_dat_o(rdat), .cpu_ready_o(ready),
    .uart_tx_o(tx), .uart_rx_i(tx), .timer_pwm_o(pwm), .timer_irq_o(irq),
    .btn_i(btn), .seg0_o(seg0), .seg1_o(seg1));

  soc_cpu_model #(.SYNC(1'b0)) cpu (
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
