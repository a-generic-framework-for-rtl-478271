// wb_addr_decoder: central address decoder of the Wishbone interconnect.
// Looks the bus address up in the system address table and selects the
// slave module that owns it.
//
// The table is held in two parameters: slave i owns every address for which
// (adr & MASK[i]) == BASE[i].  The decoder is combinational; it returns a
// one-hot select vector, the index of the selected slave and a hit flag.  If
// several entries match, the lowest index wins; if none does, hit_o is low
// and no slave is selected (such an access is never acknowledged).
//
// The system address table itself is named by the design description; its
// base/mask form, the priority rule and the default table (see wb_pkg) are
// this implementation's choices.
module wb_addr_decoder
  import wb_pkg::*;
#(
  parameter int unsigned ADR_W = SOC_ADR_W,
  parameter int unsigned NS    = SOC_NS,
  parameter logic [NS-1:0][31:0] BASE = SOC_BASE,
  parameter logic [NS-1:0][31:0] MASK = SOC_MASK,
  localparam int unsigned IDX_W = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic [ADR_W-1:0] adr_i,
  output logic [NS-1:0]    sel_o,
  output logic [IDX_W-1:0] idx_o,
  output logic             hit_o
);

  always_comb begin
    sel_o = '0;
    idx_o = '0;
    hit_o = 1'b0;
    for (int i = NS - 1; i >= 0; i--) begin
      if ((adr_i & MASK[i][ADR_W-1:0]) == BASE[i][ADR_W-1:0]) begin
        idx_o = IDX_W'(i);
        hit_o = 1'b1;
      end
    end
    if (hit_o) sel_o[idx_o] = 1'b1;
  end

endmodule
