// tb_wb_slave: self-checking testbench of the Wishbone slave module.
// Drives random bus and core signals and compares every output with the
// slave equations worked out here (cs = cyc & stb, ack = cs & slave_ready,
// low address bits to the core, read data only while selected).  Then runs a
// read with three wait states (slave_ready low for three clocks) and checks
// that ack appears exactly in the clock slave_ready rises.
module tb_wb_slave;
  localparam int ADR_W = 16, DAT_W = 24, SADR_W = 4, TG = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              cyc, stb, we, ack, ip_cs, ip_we, ip_ready;
  logic [ADR_W-1:0]  adr;
  logic [DAT_W-1:0]  wdat, rdat, ip_wdat, ip_rdat;
  logic [TG-1:0]     tga, tgc, tgd, rtgd, ip_tga, ip_tgc, ip_tgd, ip_rtgd;
  logic [SADR_W-1:0] ip_adr;

  int checks = 0, failures = 0;

  wb_slave #(.ADR_W(ADR_W), .DAT_W(DAT_W), .SADR_W(SADR_W),
             .TGA_W(TG), .TGD_W(TG), .TGC_W(TG)) dut (
    .cyc_i(cyc), .stb_i(stb), .we_i(we), .adr_i(adr), .dat_i(wdat),
    .tga_i(tga), .tgc_i(tgc), .tgd_i(tgd),
    .ack_o(ack), .dat_o(rdat), .tgd_o(rtgd),
    .ip_cs_o(ip_cs), .ip_we_o(ip_we), .ip_adr_o(ip_adr), .ip_dat_o(ip_wdat),
    .ip_dat_i(ip_rdat), .ip_ready_i(ip_ready),
    .ip_tga_o(ip_tga), .ip_tgc_o(ip_tgc), .ip_tgd_o(ip_tgd), .ip_tgd_i(ip_rtgd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int waits;
    for (int n = 0; n < 500; n++) begin
      cyc = 1'($urandom); stb = 1'($urandom); we = 1'($urandom);
      adr = ADR_W'($urandom); wdat = DAT_W'($urandom); ip_rdat = DAT_W'($urandom);
      tga = TG'($urandom); tgc = TG'($urandom); tgd = TG'($urandom); ip_rtgd = TG'($urandom);
      ip_ready = 1'($urandom);
      #1;
      check(ip_cs == (cyc && stb), "cs = cyc & stb");
      check(ack == (cyc && stb && ip_ready), "ack = cs & slave_ready");
      check(ip_adr == adr[SADR_W-1:0], "core address");
      check(ip_we == we && ip_wdat == wdat, "we and write data");
      check(ip_tga == tga && ip_tgc == tgc && ip_tgd == tgd, "tags to core");
      check(rdat == ((cyc && stb) ? ip_rdat : '0), "read data");
      check(rtgd == ((cyc && stb) ? ip_rtgd : '0), "read data tag");
      @(posedge clk);
    end
    // read with three wait states
    @(negedge clk);
    cyc = 1; stb = 1; we = 0; ip_ready = 0; adr = 16'h0005; ip_rdat = 24'hABCDEF;
    waits = 0;
    for (int c = 0; c < 6; c++) begin
      if (c == 3) ip_ready = 1;
      #1;
      if (!ack) waits++;
      check(ack == (c >= 3), "ack follows slave_ready in wait-state read");
      @(negedge clk);
    end
    check(waits == 3, "three wait states seen");
    check(rdat == 24'hABCDEF, "wait-state read data");
    cyc = 0; stb = 0; #1;
    check(!ack && !ip_cs, "ack and cs drop with cyc/stb");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
