// tb_wb_soc_widths: runs the SoC with 16-bit and 32-bit data paths (the
// other widths of the data-path sweep; 24 bits is covered by tb_wb_soc).
// For each width the processor port, in asynchronous mode with cs held
// high, fills the whole 1 KByte RAM (1024*8/W words) and reads it back at
// one transfer per clock, then writes a 7-segment PIO.  Checked: every read
// value, the RAM depth implied by the width, and the clock count (bytes per
// clock = W/8).
module tb_wb_soc_widths;
  logic clk = 1'b0, rst = 1'b1;
  always #10 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // 16-bit instance
  logic        cs16, we16, rdy16, tx16;
  logic [15:0] adr16, wd16, rd16;
  logic [7:0]  s0_16, s1_16;
  wb_soc #(.DAT_W(16)) soc16 (
    .clk(clk), .rst(rst), .cpu_cs_i(cs16), .cpu_we_i(we16),
    .cpu_adr_i(adr16), .cpu_dat_i(wd16), .cpu_dat_o(rd16), .cpu_ready_o(rdy16),
    .uart_tx_o(tx16), .uart_rx_i(tx16), .timer_pwm_o(), .timer_irq_o(),
    .btn_i(4'h0), .seg0_o(s0_16), .seg1_o(s1_16));

  // 32-bit instance
  logic        cs32, we32, rdy32, tx32;
  logic [15:0] adr32;
  logic [31:0] wd32, rd32;
  logic [7:0]  s0_32, s1_32;
  wb_soc #(.DAT_W(32)) soc32 (
    .clk(clk), .rst(rst), .cpu_cs_i(cs32), .cpu_we_i(we32),
    .cpu_adr_i(adr32), .cpu_dat_i(wd32), .cpu_dat_o(rd32), .cpu_ready_o(rdy32),
    .uart_tx_o(tx32), .uart_rx_i(tx32), .timer_pwm_o(), .timer_irq_o(),
    .btn_i(4'h0), .seg0_o(s0_32), .seg1_o(s1_32));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] sh16 [512];
    logic [31:0] sh32 [256];
    int t0, acks;
    cs16 = 0; we16 = 0; adr16 = 0; wd16 = 0;
    cs32 = 0; we32 = 0; adr32 = 0; wd32 = 0;
    repeat (4) @(posedge clk);
    rst = 0;

    // ---- 16 bit: 512 words ----
    t0 = $time / 20; acks = 0;
    for (int a = 0; a < 512; a++) begin
      @(negedge clk); cs16 = 1; we16 = 1; adr16 = 16'(a); wd16 = 16'($urandom); sh16[a] = wd16;
      #1; if (rdy16) acks++;
    end
    for (int a = 0; a < 512; a++) begin
      @(negedge clk); we16 = 0; adr16 = 16'(a);
      #1; if (rdy16) acks++;
      check(rd16 == sh16[a], "16-bit RAM read-back");
    end
    check(acks == 1024 && ($time / 20 - t0) == 1024, "16 bit: 1024 transfers in 1024 clocks (2 bytes/clock)");
    @(negedge clk); adr16 = 16'h0200; #1;
    check(!rdy16 || rd16 == 16'h0, "16 bit: word 512 is past the 1 KByte RAM");
    @(negedge clk); we16 = 1; adr16 = 16'h8010; wd16 = 16'h00F0;
    @(negedge clk); we16 = 0; cs16 = 0;
    check(s0_16 == 8'hF0, "16 bit: 7-segment PIO written");

    // ---- 32 bit: 256 words ----
    t0 = $time / 20; acks = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); cs32 = 1; we32 = 1; adr32 = 16'(a); wd32 = $urandom; sh32[a] = wd32;
      #1; if (rdy32) acks++;
    end
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); we32 = 0; adr32 = 16'(a);
      #1; if (rdy32) acks++;
      check(rd32 == sh32[a], "32-bit RAM read-back");
    end
    check(acks == 512 && ($time / 20 - t0) == 512, "32 bit: 512 transfers in 512 clocks (4 bytes/clock)");
    @(negedge clk); adr32 = 16'h0100; #1;
    check(rd32 == 32'h0, "32 bit: word 256 is past the 1 KByte RAM");
    @(negedge clk); we32 = 1; adr32 = 16'h8014; wd32 = 32'h0000_000F;
    @(negedge clk); we32 = 0; cs32 = 0;
    check(s1_32 == 8'h0F, "32 bit: 7-segment PIO written");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
