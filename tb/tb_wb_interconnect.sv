// tb_wb_interconnect: self-checking testbench of the Wishbone interconnect
// with 2 masters, 3 slaves and 2-bit tags.  Address table: slave 0 at
// 0x0000-0x00FF, slave 1 at 0x0100-0x010F, slave 2 at 0x0200-0x0203.
// Each clock both masters present random requests; a reference model here
// (round-robin arbitration with cycle locking, address table as ranges)
// predicts which master owns the bus and which slave is addressed.  Checked:
// cyc/stb reach only the addressed slave, the owner's we/address/data/tags
// are on the bus, the slave's ack/data/data tag reach only the owner, and an
// unmapped address is not acknowledged.  Slaves answer with data and a data
// tag derived from their index and the address, as a status signal carried
// as a tag would.
module tb_wb_interconnect;
  localparam int ADR_W = 16, DAT_W = 24, TG = 2, NM = 2, NS = 3;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [NM-1:0]            m_cyc, m_stb, m_we, m_ack;
  logic [NM-1:0][ADR_W-1:0] m_adr;
  logic [NM-1:0][DAT_W-1:0] m_dat, m_rdat;
  logic [NM-1:0][TG-1:0]    m_tga, m_tgc, m_tgd, m_rtgd;
  logic [NS-1:0]            s_cyc, s_stb, s_ack;
  logic                     s_we;
  logic [ADR_W-1:0]         s_adr;
  logic [DAT_W-1:0]         s_dat;
  logic [TG-1:0]            s_tga, s_tgc, s_tgd;
  logic [NS-1:0][DAT_W-1:0] s_rdat;
  logic [NS-1:0][TG-1:0]    s_rtgd;

  int checks = 0, failures = 0;

  wb_interconnect #(.ADR_W(ADR_W), .DAT_W(DAT_W), .TGA_W(TG), .TGD_W(TG), .TGC_W(TG),
                    .NM(NM), .NS(NS),
                    .BASE({32'h0200, 32'h0100, 32'h0000}),
                    .MASK({32'hFFFC, 32'hFFF0, 32'hFF00})) dut (
    .clk(clk), .rst(rst),
    .m_cyc_i(m_cyc), .m_stb_i(m_stb), .m_we_i(m_we), .m_adr_i(m_adr), .m_dat_i(m_dat),
    .m_tga_i(m_tga), .m_tgc_i(m_tgc), .m_tgd_i(m_tgd),
    .m_ack_o(m_ack), .m_dat_o(m_rdat), .m_tgd_o(m_rtgd),
    .s_cyc_o(s_cyc), .s_stb_o(s_stb), .s_we_o(s_we), .s_adr_o(s_adr), .s_dat_o(s_dat),
    .s_tga_o(s_tga), .s_tgc_o(s_tgc), .s_tgd_o(s_tgd),
    .s_ack_i(s_ack), .s_dat_i(s_rdat), .s_tgd_i(s_rtgd));

  // slave models: answer at once, except slave 1 which needs stb for 2 clocks
  int s1_cnt = 0;
  always_ff @(posedge clk) s1_cnt <= (s_stb[1] && !s_ack[1]) ? s1_cnt + 1 : 0;
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      s_rdat[s] = DAT_W'({8'(s + 1), s_adr});
      s_rtgd[s] = TG'(s);
    end
    s_ack[0] = s_cyc[0] & s_stb[0];
    s_ack[1] = s_cyc[1] & s_stb[1] & (s1_cnt >= 1);
    s_ack[2] = s_cyc[2] & s_stb[2];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  function automatic int slave_of(input logic [ADR_W-1:0] a);
    if (a <= 16'h00FF)                  return 0;
    if (a >= 16'h0100 && a <= 16'h010F) return 1;
    if (a >= 16'h0200 && a <= 16'h0203) return 2;
    return -1;
  endfunction

  int  r_owner = 0, r_last = NM - 1;
  bit  r_locked = 0;
  function automatic int ref_grant(input logic [NM-1:0] r);
    if (r_locked && r[r_owner]) return r_owner;
    for (int k = 1; k <= NM; k++) if (r[(r_last + k) % NM]) return (r_last + k) % NM;
    return -1;
  endfunction

  function automatic logic [ADR_W-1:0] rand_adr();
    case ($urandom % 4)
      0: return ADR_W'($urandom % 256);
      1: return ADR_W'(16'h0100 + $urandom % 16);
      2: return ADR_W'(16'h0200 + $urandom % 4);
      default: return ADR_W'($urandom);
    endcase
  endfunction

  int acks_seen = 0, waits_seen = 0, unmapped_seen = 0, m_switches = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g, s, prev_g;
    m_cyc = '0; m_stb = '0; m_we = '0; m_adr = '0; m_dat = '0;
    m_tga = '0; m_tgc = '0; m_tgd = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    prev_g = -1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int m = 0; m < NM; m++) begin
        // a master holds its request until acknowledged, then changes it
        if (!(m_cyc[m] && m_stb[m]) || m_ack_q[m] || ($urandom % 8 == 0)) begin
          m_cyc[m] = 1'($urandom % 4 != 0);
          m_stb[m] = m_cyc[m] & 1'($urandom % 8 != 0);
          m_we[m]  = 1'($urandom);
          m_adr[m] = rand_adr();
          m_dat[m] = DAT_W'($urandom);
          m_tga[m] = TG'($urandom); m_tgc[m] = TG'($urandom); m_tgd[m] = TG'($urandom);
        end
      end
      #1;
      g = ref_grant(m_cyc);
      if (g >= 0) begin
        if (prev_g >= 0 && g != prev_g) m_switches++;
        prev_g = g;
        s = slave_of(m_adr[g]);
        check(s_we == m_we[g] && s_adr == m_adr[g] && s_dat == m_dat[g], "owner's request on the bus");
        check(s_tga == m_tga[g] && s_tgc == m_tgc[g] && s_tgd == m_tgd[g], "owner's tags on the bus");
        if (s >= 0) begin
          check(s_cyc == NS'(1 << s) && s_stb == (m_stb[g] ? NS'(1 << s) : NS'(0)), "cyc/stb to addressed slave only");
          for (int m = 0; m < NM; m++) begin
            if (m == g) begin
              check(m_ack[m] == s_ack[s], "ack to owner");
              check(m_rdat[m] == DAT_W'({8'(s + 1), m_adr[g]}) && m_rtgd[m] == TG'(s), "read data and data tag to owner");
            end else begin
              check(!m_ack[m], "no ack to a master without the bus");
            end
          end
          if (m_ack[g]) acks_seen++;
          if (m_stb[g] && !m_ack[g]) waits_seen++;
        end else begin
          check(s_cyc == '0 && s_stb == '0 && m_ack == '0, "unmapped address: no slave, no ack");
          unmapped_seen++;
        end
      end else begin
        check(s_cyc == '0 && m_ack == '0, "idle bus");
      end
      m_ack_q = m_ack;
      @(posedge clk);
      r_locked = (g >= 0);
      if (g >= 0) begin r_owner = g; r_last = g; end
    end
    check(acks_seen > 100 && waits_seen > 10 && unmapped_seen > 10 && m_switches > 10,
          $sformatf("coverage acks=%0d waits=%0d unmapped=%0d switches=%0d",
                    acks_seen, waits_seen, unmapped_seen, m_switches));
    $display("acks=%0d wait-state clocks=%0d unmapped=%0d owner switches=%0d",
             acks_seen, waits_seen, unmapped_seen, m_switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [NM-1:0] m_ack_q = '0;
endmodule
