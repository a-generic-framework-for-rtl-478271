// soc_ram: the SoC's integrated RAM, 1 KByte, with an asynchronous interface.
//
// One word is DAT_W bits wide, so the 1024 bytes hold DEPTH = 1024*8/DAT_W
// words (341 words of 24 bits in the case-study configuration; the remaining
// bits of the last word do not make a whole word).  Reads are combinational:
// while cs is high the word at adr is on rdat_o in the same clock.  Writes
// take effect at the rising edge at which cs and we are both high.  Word
// addresses at or above DEPTH read as zero and ignore writes.  The contents
// are not reset.
//
// Interface: the base signal set (cs, we, adr, write data, read data) of a
// slave IP core without a bus interface.  The capacity and the asynchronous
// interface follow the design description; word organisation, out-of-range
// behaviour and the absence of a reset are this implementation's choices.
module soc_ram
  import wb_pkg::*;
#(
  parameter int unsigned DAT_W  = SOC_DAT_W,
  parameter int unsigned BYTES  = 1024,
  parameter int unsigned SADR_W = RAM_SADR_W,
  localparam int unsigned DEPTH = BYTES * 8 / DAT_W,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              cs_i,
  input  logic              we_i,
  input  logic [SADR_W-1:0] adr_i,
  input  logic [DAT_W-1:0]  dat_i,
  output logic [DAT_W-1:0]  dat_o
);

  logic [DAT_W-1:0] mem [DEPTH];
  logic             in_range;

  assign in_range = (int'(adr_i) < DEPTH);

  always_ff @(posedge clk) begin
    if (cs_i && we_i && in_range) mem[IDX_W'(adr_i)] <= dat_i;
  end

  assign dat_o = (cs_i && in_range) ? mem[IDX_W'(adr_i)] : '0;

  initial begin
    assert ((1 << SADR_W) >= DEPTH) else $error("soc_ram: SADR_W too small for DEPTH");
  end

endmodule
