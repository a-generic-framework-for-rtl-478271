// wb_soc: case-study system-on-chip built around a Wishbone shared bus.
//
// One bus master and six slaves, none of whose IP cores has a Wishbone
// interface of its own; each core is attached through a master or slave
// module that maps its base signals (cs, we, adr, data) onto the bus:
//
//   processor --- wb_master --+                 +-- wb_slave -- soc_ram   (1 KByte)
//                             |                 +-- wb_slave -- soc_uart
//                             +-wb_interconnect-+-- wb_slave -- soc_timer
//                                               +-- wb_slave -- soc_pio   (buttons)
//                                               +-- wb_slave -- soc_pio   (7-segment 0)
//                                               +-- wb_slave -- soc_pio   (7-segment 1)
//
// The processor core itself is outside this module: its bus-side signals
// (cpu_*) are ports.  The processor has no Wishbone interface of its own, so
// the master's transfer mode is fixed before synthesis by CPU_MODE.  With the
// default WB_ASYNC (the case-study configuration) the master module is pure
// wiring and a transfer completes in the clock it is requested, one word per
// clock; the case study simply holds cs high.  With WB_SYNC the master runs
// registered bus cycles, ready 2 clocks after the request.  Every core
// answers at once, so each slave's slave_ready is tied to 1.  The cores carry
// no tag signals; the tag paths are present and tied to zero.
//
// Address map (16-bit word addresses): RAM 0x0000-0x03FF (341 words of 24
// bits are implemented), UART 0x8004, timer 0x8008, button PIO 0x800C,
// 7-segment PIOs 0x8010 and 0x8014, four registers each.  Accesses elsewhere
// are not acknowledged.
//
// Bus widths (16-bit address, 24-bit data), the set of peripherals, the
// asynchronous mode chosen before synthesis and slave_ready = 1 follow the
// design description.  The
// address map, the peripherals' register maps and the pin counts are this
// implementation's choices.
module wb_soc
  import wb_pkg::*;
#(
  parameter int unsigned ADR_W  = SOC_ADR_W,
  parameter int unsigned DAT_W  = SOC_DAT_W,
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200,
  parameter int unsigned BTN_W  = 4,
  parameter int unsigned SEG_W  = 8,
  parameter wb_mode_e    CPU_MODE = WB_ASYNC
) (
  input  logic             clk,
  input  logic             rst,
  // processor bus port
  input  logic             cpu_cs_i,
  input  logic             cpu_we_i,
  input  logic [ADR_W-1:0] cpu_adr_i,
  input  logic [DAT_W-1:0] cpu_dat_i,
  output logic [DAT_W-1:0] cpu_dat_o,
  output logic             cpu_ready_o,
  // peripherals
  output logic             uart_tx_o,
  input  logic             uart_rx_i,
  output logic             timer_pwm_o,
  output logic             timer_irq_o,
  input  logic [BTN_W-1:0] btn_i,
  output logic [SEG_W-1:0] seg0_o,
  output logic [SEG_W-1:0] seg1_o
);

  localparam int unsigned NS = SOC_NS;

  // master module <-> interconnect
  logic             m_cyc, m_stb, m_we, m_ack;
  logic [ADR_W-1:0] m_adr;
  logic [DAT_W-1:0] m_wdat, m_rdat;
  logic [0:0]       m_tga, m_tgc, m_tgd, m_rtgd;

  // interconnect <-> slave modules
  logic [NS-1:0]            s_cyc, s_stb, s_ack;
  logic                     s_we;
  logic [ADR_W-1:0]         s_adr;
  logic [DAT_W-1:0]         s_wdat;
  logic [0:0]               s_tga, s_tgc, s_tgd;
  logic [NS-1:0][DAT_W-1:0] s_rdat;
  logic [NS-1:0][0:0]       s_rtgd;

  // slave modules <-> cores (address width per slave differs)
  logic [NS-1:0]            c_cs, c_we;
  logic [NS-1:0][DAT_W-1:0] c_wdat, c_rdat;
  logic [RAM_SADR_W-1:0]    c_adr_ram;
  logic [NS-1:0][PER_SADR_W-1:0] c_adr;

  logic [SEG_W-1:0] seg0_q, seg0_oe, seg1_q, seg1_oe;

  wb_master #(
    .ADR_W        (ADR_W),
    .DAT_W        (DAT_W),
    .RUNTIME_MODE (1'b0),
    .MODE         (CPU_MODE)
  ) u_master (
    .clk        (clk),
    .rst        (rst),
    .mode_i     (CPU_MODE),
    .ip_cs_i    (cpu_cs_i),
    .ip_we_i    (cpu_we_i),
    .ip_adr_i   (cpu_adr_i),
    .ip_dat_i   (cpu_dat_i),
    .ip_dat_o   (cpu_dat_o),
    .ip_ready_o (cpu_ready_o),
    .ip_tga_i   (1'b0),
    .ip_tgc_i   (1'b0),
    .ip_tgd_i   (1'b0),
    .ip_tgd_o   (),
    .cyc_o      (m_cyc),
    .stb_o      (m_stb),
    .we_o       (m_we),
    .adr_o      (m_adr),
    .dat_o      (m_wdat),
    .tga_o      (m_tga),
    .tgc_o      (m_tgc),
    .tgd_o      (m_tgd),
    .ack_i      (m_ack),
    .dat_i      (m_rdat),
    .tgd_i      (m_rtgd)
  );

  wb_interconnect #(
    .ADR_W (ADR_W),
    .DAT_W (DAT_W),
    .NM    (1),
    .NS    (NS),
    .BASE  (SOC_BASE),
    .MASK  (SOC_MASK)
  ) u_interconnect (
    .clk     (clk),
    .rst     (rst),
    .m_cyc_i (m_cyc),
    .m_stb_i (m_stb),
    .m_we_i  (m_we),
    .m_adr_i (m_adr),
    .m_dat_i (m_wdat),
    .m_tga_i (m_tga),
    .m_tgc_i (m_tgc),
    .m_tgd_i (m_tgd),
    .m_ack_o (m_ack),
    .m_dat_o (m_rdat),
    .m_tgd_o (m_rtgd),
    .s_cyc_o (s_cyc),
    .s_stb_o (s_stb),
    .s_we_o  (s_we),
    .s_adr_o (s_adr),
    .s_dat_o (s_wdat),
    .s_tga_o (s_tga),
    .s_tgc_o (s_tgc),
    .s_tgd_o (s_tgd),
    .s_ack_i (s_ack),
    .s_dat_i (s_rdat),
    .s_tgd_i (s_rtgd)
  );

  // ---------------- RAM ----------------
  wb_slave #(.ADR_W(ADR_W), .DAT_W(DAT_W), .SADR_W(RAM_SADR_W)) u_slave_ram (
    .cyc_i (s_cyc[S_RAM]), .stb_i (s_stb[S_RAM]), .we_i (s_we), .adr_i (s_adr),
    .dat_i (s_wdat), .tga_i (s_tga), .tgc_i (s_tgc), .tgd_i (s_tgd),
    .ack_o (s_ack[S_RAM]), .dat_o (s_rdat[S_RAM]), .tgd_o (s_rtgd[S_RAM]),
    .ip_cs_o (c_cs[S_RAM]), .ip_we_o (c_we[S_RAM]), .ip_adr_o (c_adr_ram),
    .ip_dat_o (c_wdat[S_RAM]), .ip_dat_i (c_rdat[S_RAM]), .ip_ready_i (1'b1),
    .ip_tga_o (), .ip_tgc_o (), .ip_tgd_o (), .ip_tgd_i (1'b0)
  );
  soc_ram #(.DAT_W(DAT_W)) u_ram (
    .clk (clk), .cs_i (c_cs[S_RAM]), .we_i (c_we[S_RAM]), .adr_i (c_adr_ram),
    .dat_i (c_wdat[S_RAM]), .dat_o (c_rdat[S_RAM])
  );
  assign c_adr[S_RAM] = '0;

  // ---------------- peripherals: slave modules ----------------
  for (genvar s = 1; s < NS; s++) begin : g_per_slave
    wb_slave #(.ADR_W(ADR_W), .DAT_W(DAT_W), .SADR_W(PER_SADR_W)) u_slave (
      .cyc_i (s_cyc[s]), .stb_i (s_stb[s]), .we_i (s_we), .adr_i (s_adr),
      .dat_i (s_wdat), .tga_i (s_tga), .tgc_i (s_tgc), .tgd_i (s_tgd),
      .ack_o (s_ack[s]), .dat_o (s_rdat[s]), .tgd_o (s_rtgd[s]),
      .ip_cs_o (c_cs[s]), .ip_we_o (c_we[s]), .ip_adr_o (c_adr[s]),
      .ip_dat_o (c_wdat[s]), .ip_dat_i (c_rdat[s]), .ip_ready_i (1'b1),
      .ip_tga_o (), .ip_tgc_o (), .ip_tgd_o (), .ip_tgd_i (1'b0)
    );
  end

  // ---------------- peripheral cores ----------------
  soc_uart #(.DAT_W(DAT_W), .CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk (clk), .rst (rst), .cs_i (c_cs[S_UART]), .we_i (c_we[S_UART]),
    .adr_i (c_adr[S_UART]), .dat_i (c_wdat[S_UART]), .dat_o (c_rdat[S_UART]),
    .tx_o (uart_tx_o), .rx_i (uart_rx_i)
  );

  soc_timer #(.DAT_W(DAT_W)) u_timer (
    .clk (clk), .rst (rst), .cs_i (c_cs[S_TMR]), .we_i (c_we[S_TMR]),
    .adr_i (c_adr[S_TMR]), .dat_i (c_wdat[S_TMR]), .dat_o (c_rdat[S_TMR]),
    .timer_pwm_o (timer_pwm_o), .irq_o (timer_irq_o)
  );

  soc_pio #(.DAT_W(DAT_W), .WIDTH(BTN_W), .DIR_RESET('0)) u_pio_btn (
    .clk (clk), .rst (rst), .cs_i (c_cs[S_BTN]), .we_i (c_we[S_BTN]),
    .adr_i (c_adr[S_BTN]), .dat_i (c_wdat[S_BTN]), .dat_o (c_rdat[S_BTN]),
    .pio_i (btn_i), .pio_o (), .pio_oe_o ()
  );

  soc_pio #(.DAT_W(DAT_W), .WIDTH(SEG_W), .DIR_RESET('1)) u_pio_seg0 (
    .clk (clk), .rst (rst), .cs_i (c_cs[S_SEG0]), .we_i (c_we[S_SEG0]),
    .adr_i (c_adr[S_SEG0]), .dat_i (c_wdat[S_SEG0]), .dat_o (c_rdat[S_SEG0]),
    .pio_i ('0), .pio_o (seg0_q), .pio_oe_o (seg0_oe)
  );

  soc_pio #(.DAT_W(DAT_W), .WIDTH(SEG_W), .DIR_RESET('1)) u_pio_seg1 (
    .clk (clk), .rst (rst), .cs_i (c_cs[S_SEG1]), .we_i (c_we[S_SEG1]),
    .adr_i (c_adr[S_SEG1]), .dat_i (c_wdat[S_SEG1]), .dat_o (c_rdat[S_SEG1]),
    .pio_i ('0), .pio_o (seg1_q), .pio_oe_o (seg1_oe)
  );

  // a display segment is lit only by a pin configured as output
  assign seg0_o = seg0_q & seg0_oe;
  assign seg1_o = seg1_q & seg1_oe;

endmodule
