// wb_interconnect: shared-bus Wishbone interconnect module.  Connects NM
// master modules to NS slave modules through a bus arbiter, a multiplexer and
// a central address decoder.
//
// The arbiter (wb_arbiter) grants the bus to one master, chosen by the cyc
// requests.  The multiplexer puts the granted master's we, address, write
// data and tags on the shared bus.  The decoder (wb_addr_decoder) looks the
// address up in the system address table and forwards cyc and stb only to
// the addressed slave; we, address, data and tags are broadcast.  The
// selected slave's ack, read data and data tag are routed back to the granted
// master only.  Tags cross the interconnect beside the signals they belong
// to, so a core-specific signal (a transfer status, a parity bit, a
// privilege flag) reaches the far side with the timing of an address, data
// or cycle tag.
//
// Everything is combinational except the arbiter's lock and round-robin
// state, so an asynchronous master sees ack in the same clock as its
// request.  An address that no table entry covers selects no slave and is
// not acknowledged.
//
// Structure and widths (8 to 32 bits) follow the design description; the
// arbitration scheme and the broadcast of write signals are this
// implementation's choices.
module wb_interconnect
  import wb_pkg::*;
#(
  parameter int unsigned ADR_W = SOC_ADR_W,
  parameter int unsigned DAT_W = SOC_DAT_W,
  parameter int unsigned TGA_W = 1,
  parameter int unsigned TGD_W = 1,
  parameter int unsigned TGC_W = 1,
  parameter int unsigned NM    = 1,
  parameter int unsigned NS    = SOC_NS,
  parameter logic [NS-1:0][31:0] BASE = SOC_BASE,
  parameter logic [NS-1:0][31:0] MASK = SOC_MASK
) (
  input  logic                       clk,
  input  logic                       rst,
  // master modules
  input  logic [NM-1:0]              m_cyc_i,
  input  logic [NM-1:0]              m_stb_i,
  input  logic [NM-1:0]              m_we_i,
  input  logic [NM-1:0][ADR_W-1:0]   m_adr_i,
  input  logic [NM-1:0][DAT_W-1:0]   m_dat_i,
  input  logic [NM-1:0][TGA_W-1:0]   m_tga_i,
  input  logic [NM-1:0][TGC_W-1:0]   m_tgc_i,
  input  logic [NM-1:0][TGD_W-1:0]   m_tgd_i,
  output logic [NM-1:0]              m_ack_o,
  output logic [NM-1:0][DAT_W-1:0]   m_dat_o,
  output logic [NM-1:0][TGD_W-1:0]   m_tgd_o,
  // slave modules
  output logic [NS-1:0]              s_cyc_o,
  output logic [NS-1:0]              s_stb_o,
  output logic                       s_we_o,
  output logic [ADR_W-1:0]           s_adr_o,
  output logic [DAT_W-1:0]           s_dat_o,
  output logic [TGA_W-1:0]           s_tga_o,
  output logic [TGC_W-1:0]           s_tgc_o,
  output logic [TGD_W-1:0]           s_tgd_o,
  input  logic [NS-1:0]              s_ack_i,
  input  logic [NS-1:0][DAT_W-1:0]   s_dat_i,
  input  logic [NS-1:0][TGD_W-1:0]   s_tgd_i
);

  localparam int unsigned MI_W = (NM > 1) ? $clog2(NM) : 1;
  localparam int unsigned SI_W = (NS > 1) ? $clog2(NS) : 1;

  logic [NM-1:0]   gnt;
  logic [MI_W-1:0] gidx;
  logic            gvalid;
  logic [NS-1:0]   sel;
  logic [SI_W-1:0] sidx;
  logic            hit;

  logic            bus_cyc, bus_stb, bus_ack;
  logic [DAT_W-1:0] bus_rdat;
  logic [TGD_W-1:0] bus_rtgd;

  wb_arbiter #(.NM(NM)) u_arbiter (
    .clk         (clk),
    .rst         (rst),
    .req_i       (m_cyc_i),
    .gnt_o       (gnt),
    .gnt_idx_o   (gidx),
    .gnt_valid_o (gvalid)
  );

  // master-to-slave multiplexer
  always_comb begin
    bus_cyc = gvalid & m_cyc_i[gidx];
    bus_stb = gvalid & m_stb_i[gidx];
    s_we_o  = m_we_i[gidx];
    s_adr_o = m_adr_i[gidx];
    s_dat_o = m_dat_i[gidx];
    s_tga_o = m_tga_i[gidx];
    s_tgc_o = m_tgc_i[gidx];
    s_tgd_o = m_tgd_i[gidx];
  end

  wb_addr_decoder #(
    .ADR_W (ADR_W),
    .NS    (NS),
    .BASE  (BASE),
    .MASK  (MASK)
  ) u_decoder (
    .adr_i (s_adr_o),
    .sel_o (sel),
    .idx_o (sidx),
    .hit_o (hit)
  );

  // cyc and stb only to the addressed slave
  always_comb begin
    s_cyc_o = bus_cyc ? sel : '0;
    s_stb_o = bus_stb ? sel : '0;
  end

  // slave-to-master multiplexer
  always_comb begin
    bus_ack  = hit & s_ack_i[sidx] & bus_cyc & bus_stb;
    bus_rdat = hit ? s_dat_i[sidx] : '0;
    bus_rtgd = hit ? s_tgd_i[sidx] : '0;
    for (int m = 0; m < NM; m++) begin
      m_ack_o[m] = gnt[m] & bus_ack;
      m_dat_o[m] = gnt[m] ? bus_rdat : '0;
      m_tgd_o[m] = gnt[m] ? bus_rtgd : '0;
    end
  end

  // an acknowledge only ever answers a selected, strobed slave
  a_ack_selected: assert property (@(posedge clk) disable iff (rst)
                                   bus_ack |-> (hit && s_stb_o[sidx]))
    else $error("wb_interconnect: ack without a selected slave");

  initial begin
    assert (ADR_W >= WB_MIN_W && ADR_W <= WB_MAX_W) else $error("wb_interconnect: ADR_W out of range");
    assert (DAT_W >= WB_MIN_W && DAT_W <= WB_MAX_W) else $error("wb_interconnect: DAT_W out of range");
  end

endmodule
