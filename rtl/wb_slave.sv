// wb_slave: Wishbone slave module.  Sits between the Wishbone interconnect and
// a slave IP core that has no Wishbone interface, whose registers are then
// reached as memory-mapped I/O.
//
// Purely combinational, as in the asynchronous mode of the design
// description:
//   ip_cs_o  = cyc_i & stb_i          (chip select to the core)
//   ack_o    = ip_cs_o & ip_ready_i   (slave_ready from the core)
// we, write data and the tags go straight through; the address is cut to the
// SADR_W low bits the core decodes.  A core that can answer at once ties
// ip_ready_i to 1; a slower one holds it low for as many clocks as it needs
// (Wishbone wait states), and ack_o follows it in the same clock.  Read data
// and the returned data tag are forced to zero while the slave is not
// selected, so that the interconnect may also combine them with an OR.
//
// The cs and ack equations and the slave_ready handshake follow the design
// description; zeroing the read data when unselected is this
// implementation's choice.
module wb_slave
  import wb_pkg::*;
#(
  parameter int unsigned ADR_W  = SOC_ADR_W,
  parameter int unsigned DAT_W  = SOC_DAT_W,
  parameter int unsigned SADR_W = PER_SADR_W,
  parameter int unsigned TGA_W  = 1,
  parameter int unsigned TGD_W  = 1,
  parameter int unsigned TGC_W  = 1
) (
  // Wishbone side (internal signals I)
  input  logic              cyc_i,
  input  logic              stb_i,
  input  logic              we_i,
  input  logic [ADR_W-1:0]  adr_i,
  input  logic [DAT_W-1:0]  dat_i,
  input  logic [TGA_W-1:0]  tga_i,
  input  logic [TGC_W-1:0]  tgc_i,
  input  logic [TGD_W-1:0]  tgd_i,
  output logic              ack_o,
  output logic [DAT_W-1:0]  dat_o,
  output logic [TGD_W-1:0]  tgd_o,
  // slave IP core side (external signals E)
  output logic              ip_cs_o,
  output logic              ip_we_o,
  output logic [SADR_W-1:0] ip_adr_o,
  output logic [DAT_W-1:0]  ip_dat_o,
  input  logic [DAT_W-1:0]  ip_dat_i,
  input  logic              ip_ready_i,
  output logic [TGA_W-1:0]  ip_tga_o,
  output logic [TGC_W-1:0]  ip_tgc_o,
  output logic [TGD_W-1:0]  ip_tgd_o,
  input  logic [TGD_W-1:0]  ip_tgd_i
);

  always_comb begin
    ip_cs_o  = cyc_i & stb_i;
    ack_o    = ip_cs_o & ip_ready_i;
    ip_we_o  = we_i;
    ip_adr_o = adr_i[SADR_W-1:0];
    ip_dat_o = dat_i;
    ip_tga_o = tga_i;
    ip_tgc_o = tgc_i;
    ip_tgd_o = tgd_i;
    dat_o    = ip_cs_o ? ip_dat_i : '0;
    tgd_o    = ip_cs_o ? ip_tgd_i : '0;
  end

  initial begin
    assert (SADR_W >= 1 && SADR_W <= ADR_W) else $error("wb_slave: SADR_W out of range");
  end

endmodule
