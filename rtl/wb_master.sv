// wb_master: Wishbone master module.  Sits between a master IP core that has
// no Wishbone interface of its own and the Wishbone interconnect, so that the
// core's functional logic stays free of bus-specific signals.
//
// The core offers only the base signals (cs, we, adr, write data, read data)
// plus an optional ready input and optional tag signals.  Base signals that
// exist on both sides are assigned one to one; signals the core lacks are
// given constants by whoever instantiates this module; core signals that
// have no Wishbone counterpart travel as address, data or cycle tags.
//
// Two transfer modes, chosen at run time through mode_i, or fixed before
// synthesis with RUNTIME_MODE = 0 and MODE:
//   WB_ASYNC  purely combinational, no registers are used.  cyc_o = stb_o =
//             ip_cs_i, the address/data/we/tags go straight through, and
//             ip_ready_o = ack_i with ip_dat_o = dat_i.  A zero-wait slave
//             completes one transfer per clock; the core registers the read
//             data (or the slave the write data) at the next rising edge.
//   WB_SYNC   a three-state machine.  IDLE: when ip_cs_i is seen the request
//             is registered and cyc_o/stb_o are raised (BUSY).  BUSY: held
//             through any slave wait states until ack_i; the read data and
//             tag are registered and cyc_o/stb_o dropped (DONE).  DONE:
//             ip_ready_o is high for one clock with the registered data,
//             then back to IDLE.  A zero-wait transfer takes three clocks.
// The mode must only be changed while the state machine is idle.
//
// The async behaviour and the existence of both modes follow the design
// description; the synchronous state sequence, the ready/hold contract with
// the core (hold ip_cs_i and the request until ip_ready_o) and the reset
// (synchronous, active high) are this implementation's own choices.
module wb_master
  import wb_pkg::*;
#(
  parameter int unsigned ADR_W        = SOC_ADR_W,
  parameter int unsigned DAT_W        = SOC_DAT_W,
  parameter int unsigned TGA_W        = 1,
  parameter int unsigned TGD_W        = 1,
  parameter int unsigned TGC_W        = 1,
  parameter bit          RUNTIME_MODE = 1'b1,
  parameter wb_mode_e    MODE         = WB_ASYNC
) (
  input  logic             clk,
  input  logic             rst,
  input  wb_mode_e         mode_i,
  // master IP core side (external signals E)
  input  logic             ip_cs_i,
  input  logic             ip_we_i,
  input  logic [ADR_W-1:0] ip_adr_i,
  input  logic [DAT_W-1:0] ip_dat_i,
  output logic [DAT_W-1:0] ip_dat_o,
  output logic             ip_ready_o,
  input  logic [TGA_W-1:0] ip_tga_i,
  input  logic [TGC_W-1:0] ip_tgc_i,
  input  logic [TGD_W-1:0] ip_tgd_i,
  output logic [TGD_W-1:0] ip_tgd_o,
  // Wishbone side (internal signals I)
  output logic             cyc_o,
  output logic             stb_o,
  output logic             we_o,
  output logic [ADR_W-1:0] adr_o,
  output logic [DAT_W-1:0] dat_o,
  output logic [TGA_W-1:0] tga_o,
  output logic [TGC_W-1:0] tgc_o,
  output logic [TGD_W-1:0] tgd_o,
  input  logic             ack_i,
  input  logic [DAT_W-1:0] dat_i,
  input  logic [TGD_W-1:0] tgd_i
);

  wb_mode_e   mode;
  wb_mstate_e state;

  // registered request and response of the synchronous mode
  logic             r_we;
  logic [ADR_W-1:0] r_adr;
  logic [DAT_W-1:0] r_wdat, r_rdat;
  logic [TGA_W-1:0] r_tga;
  logic [TGC_W-1:0] r_tgc;
  logic [TGD_W-1:0] r_wtgd, r_rtgd;

  assign mode = RUNTIME_MODE ? mode_i : MODE;

  always_ff @(posedge clk) begin
    if (rst || mode == WB_ASYNC) begin
      state <= M_IDLE;
    end else begin
      unique case (state)
        M_IDLE: if (ip_cs_i) state <= M_BUSY;
        M_BUSY: if (ack_i)   state <= M_DONE;
        M_DONE:              state <= M_IDLE;
        default:             state <= M_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      r_we   <= 1'b0;
      r_adr  <= '0;
      r_wdat <= '0;
      r_tga  <= '0;
      r_tgc  <= '0;
      r_wtgd <= '0;
      r_rdat <= '0;
      r_rtgd <= '0;
    end else begin
      if (state == M_IDLE && ip_cs_i) begin
        r_we   <= ip_we_i;
        r_adr  <= ip_adr_i;
        r_wdat <= ip_dat_i;
        r_tga  <= ip_tga_i;
        r_tgc  <= ip_tgc_i;
        r_wtgd <= ip_tgd_i;
      end
      if (state == M_BUSY && ack_i) begin
        r_rdat <= dat_i;
        r_rtgd <= tgd_i;
      end
    end
  end

  always_comb begin
    if (mode == WB_ASYNC) begin
      cyc_o      = ip_cs_i;
      stb_o      = ip_cs_i;
      we_o       = ip_we_i;
      adr_o      = ip_adr_i;
      dat_o      = ip_dat_i;
      tga_o      = ip_tga_i;
      tgc_o      = ip_tgc_i;
      tgd_o      = ip_tgd_i;
      ip_dat_o   = dat_i;
      ip_tgd_o   = tgd_i;
      ip_ready_o = ack_i;
    end else begin
      cyc_o      = (state == M_BUSY);
      stb_o      = (state == M_BUSY);
      we_o       = r_we;
      adr_o      = r_adr;
      dat_o      = r_wdat;
      tga_o      = r_tga;
      tgc_o      = r_tgc;
      tgd_o      = r_wtgd;
      ip_dat_o   = r_rdat;
      ip_tgd_o   = r_rtgd;
      ip_ready_o = (state == M_DONE);
    end
  end

  // Wishbone rule: once raised, stb_o stays high until the slave acknowledges.
  a_stb_held: assert property (@(posedge clk) disable iff (rst || mode == WB_ASYNC)
                               (stb_o && !ack_i) |=> stb_o)
    else $error("wb_master: stb_o dropped before ack_i");

  // The ready pulse of the synchronous mode lasts exactly one clock.
  a_ready_pulse: assert property (@(posedge clk) disable iff (rst || mode == WB_ASYNC)
                                  ip_ready_o |=> !ip_ready_o)
    else $error("wb_master: ip_ready_o longer than one clock");

  initial begin
    assert (ADR_W >= WB_MIN_W && ADR_W <= WB_MAX_W) else $error("wb_master: ADR_W out of range");
    assert (DAT_W >= WB_MIN_W && DAT_W <= WB_MAX_W) else $error("wb_master: DAT_W out of range");
  end

endmodule
