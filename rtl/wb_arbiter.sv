// wb_arbiter: bus arbiter of the Wishbone interconnect.  Decides which of NM
// master modules owns the shared bus.
//
// Each master requests with its cyc signal.  A master that has been granted
// keeps the bus for as long as it holds cyc (a Wishbone bus cycle is never
// broken up).  When the bus is free the grant goes, in the same clock, to the
// first requesting master after the one granted last (round robin), so an
// asynchronous master gets the bus without a clock of latency.  Outputs are
// a one-hot grant vector and the index of the granted master.
//
// The design description names the arbiter and leaves the arbitration scheme
// open; round robin with cycle locking is this implementation's choice.
module wb_arbiter #(
  parameter int unsigned NM    = 2,
  localparam int unsigned IDX_W = (NM > 1) ? $clog2(NM) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NM-1:0]    req_i,
  output logic [NM-1:0]    gnt_o,
  output logic [IDX_W-1:0] gnt_idx_o,
  output logic             gnt_valid_o
);

  logic             locked;
  logic [IDX_W-1:0] owner;
  logic [IDX_W-1:0] last;

  // round-robin pick: first requester after 'last', wrapping around
  logic [IDX_W-1:0] pick;
  logic             pick_valid;
  always_comb begin
    pick       = '0;
    pick_valid = 1'b0;
    for (int k = 1; k <= NM; k++) begin
      int unsigned cand;
      cand = (int'(last) + k) % NM;
      if (!pick_valid && req_i[cand]) begin
        pick       = IDX_W'(cand);
        pick_valid = 1'b1;
      end
    end
  end

  always_comb begin
    if (locked && req_i[owner]) begin
      gnt_idx_o   = owner;
      gnt_valid_o = 1'b1;
    end else begin
      gnt_idx_o   = pick;
      gnt_valid_o = pick_valid;
    end
    gnt_o = '0;
    if (gnt_valid_o) gnt_o[gnt_idx_o] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      locked <= 1'b0;
      owner  <= '0;
      last   <= IDX_W'(NM - 1);
    end else begin
      locked <= gnt_valid_o;
      if (gnt_valid_o) begin
        owner <= gnt_idx_o;
        last  <= gnt_idx_o;
      end
    end
  end

  // at most one master owns the bus, and only one that requests it
  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(gnt_o))
    else $error("wb_arbiter: grant not one-hot");
  a_granted_requests: assert property (@(posedge clk) disable iff (rst) (gnt_o & ~req_i) == '0)
    else $error("wb_arbiter: grant without request");

endmodule
