// tb_wb_master: self-checking testbench of the Wishbone master module.
// Asynchronous mode: random core and bus values, every output compared with
// the pass-through equations (cyc = stb = cs, ready = ack, read data = bus
// data).  Synchronous mode: a slave model in this file acknowledges after a
// chosen number of wait states and returns data derived from the address;
// each transfer's bus signals, read data, tags and its length (ready after
// 2 clocks plus the wait states, idle again one clock later) are checked.  The mode is switched at run time between
// the two phases and back.
module tb_wb_master;
  import wb_pkg::*;
  localparam int ADR_W = 16, DAT_W = 24, TG = 2;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  wb_mode_e mode;
  logic             ip_cs, ip_we, ip_ready, cyc, stb, we, ack;
  logic [ADR_W-1:0] ip_adr, adr;
  logic [DAT_W-1:0] ip_wdat, ip_rdat, wdat, rdat;
  logic [TG-1:0]    ip_tga, ip_tgc, ip_tgd, ip_rtgd, tga, tgc, tgd, rtgd;

  int checks = 0, failures = 0;

  wb_master #(.ADR_W(ADR_W), .DAT_W(DAT_W), .TGA_W(TG), .TGD_W(TG), .TGC_W(TG)) dut (
    .clk(clk), .rst(rst), .mode_i(mode),
    .ip_cs_i(ip_cs), .ip_we_i(ip_we), .ip_adr_i(ip_adr), .ip_dat_i(ip_wdat),
    .ip_dat_o(ip_rdat), .ip_ready_o(ip_ready),
    .ip_tga_i(ip_tga), .ip_tgc_i(ip_tgc), .ip_tgd_i(ip_tgd), .ip_tgd_o(ip_rtgd),
    .cyc_o(cyc), .stb_o(stb), .we_o(we), .adr_o(adr), .dat_o(wdat),
    .tga_o(tga), .tgc_o(tgc), .tgd_o(tgd), .ack_i(ack), .dat_i(rdat), .tgd_i(rtgd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  function automatic logic [DAT_W-1:0] model_data(input logic [ADR_W-1:0] a);
    return DAT_W'({a, 8'h5A}) ^ DAT_W'(24'h00FF00);
  endfunction

  // bus side: random values (async phase) or a slave model (sync phase)
  logic             model_on = 1'b0;
  logic             ack_a;
  logic [DAT_W-1:0] rdat_a;
  logic [TG-1:0]    rtgd_a;
  int               wait_n = 0, stb_cnt = 0;
  always_ff @(posedge clk) begin
    if (cyc && stb && !ack) stb_cnt <= stb_cnt + 1;
    else                    stb_cnt <= 0;
  end
  assign ack  = model_on ? (cyc && stb && (stb_cnt >= wait_n)) : ack_a;
  assign rdat = model_on ? model_data(adr) : rdat_a;
  assign rtgd = model_on ? TG'(adr[1:0] ^ 2'b11) : rtgd_a;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ip_cs = 0; ip_we = 0; ip_adr = 0; ip_wdat = 0; ip_tga = 0; ip_tgc = 0; ip_tgd = 0;
    ack_a = 0; rdat_a = 0; rtgd_a = 0;
    mode = WB_ASYNC;
    repeat (3) @(posedge clk);
    rst = 0;

    // ---------- asynchronous mode: combinational mapping ----------
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      ip_cs = 1'($urandom); ip_we = 1'($urandom); ip_adr = ADR_W'($urandom);
      ip_wdat = DAT_W'($urandom); ip_tga = TG'($urandom); ip_tgc = TG'($urandom);
      ip_tgd = TG'($urandom); ack_a = 1'($urandom); rdat_a = DAT_W'($urandom);
      rtgd_a = TG'($urandom);
      #1;
      check(cyc == ip_cs && stb == ip_cs, "async cyc/stb = cs");
      check(we == ip_we && adr == ip_adr && wdat == ip_wdat, "async we/adr/dat");
      check(tga == ip_tga && tgc == ip_tgc && tgd == ip_tgd, "async tags out");
      check(ip_ready == ack_a && ip_rdat == rdat_a && ip_rtgd == rtgd_a, "async response");
    end

    // ---------- switch to synchronous mode ----------
    @(negedge clk);
    ip_cs = 0; model_on = 1; mode = WB_SYNC;
    @(negedge clk);
    check(!cyc && !stb, "sync idle");

    for (int n = 0; n < 40; n++) begin
      logic [ADR_W-1:0] a;
      logic [DAT_W-1:0] d;
      logic [TG-1:0]    ta, tc, td;
      logic             w;
      int cycles;
      a = ADR_W'($urandom); d = DAT_W'($urandom); w = 1'($urandom);
      ta = TG'($urandom); tc = TG'($urandom); td = TG'($urandom);
      wait_n = n % 4;
      @(negedge clk);
      ip_cs = 1; ip_we = w; ip_adr = a; ip_wdat = d; ip_tga = ta; ip_tgc = tc; ip_tgd = td;
      cycles = 0;
      do begin
        @(posedge clk);
        #1;
        cycles++;
        // the core changes its inputs while the cycle runs: must not leak
        ip_adr = ADR_W'($urandom); ip_wdat = DAT_W'($urandom); ip_we = 1'($urandom);
        if (cyc) begin
          check(stb && adr == a && wdat == d && we == w, "sync bus request registered");
          check(tga == ta && tgc == tc && tgd == td, "sync tags registered");
        end
      end while (!ip_ready && cycles < 20);
      check(ip_rdat == model_data(a), "sync read data");
      check(ip_rtgd == TG'(a[1:0] ^ 2'b11), "sync read data tag");
      // ready follows 2 + wait-state clocks after the request; the DONE
      // clock makes a transfer 3 + wait-state clocks long
      check(cycles == 2 + wait_n, $sformatf("sync ready after %0d clocks, expected %0d", cycles, 2 + wait_n));
      check(!cyc && !stb, "cyc/stb low after ack");
      ip_cs = 0;
      @(posedge clk);
      #1;
      check(!ip_ready && !cyc, "ready is a single-clock pulse, back to idle");
    end

    // ---------- back to asynchronous ----------
    @(negedge clk);
    mode = WB_ASYNC; model_on = 0; ip_cs = 1; ack_a = 1; rdat_a = 24'h123456;
    #1;
    check(cyc && ip_ready && ip_rdat == 24'h123456, "async again after mode switch");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
