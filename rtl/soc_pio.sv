// soc_pio: general purpose parallel I/O peripheral.  The SoC uses it three
// times: for the push buttons and for two 7-segment displays.
//
// WIDTH pins, each an input or an output according to its bit in the
// direction register (1 = output).  Output pins drive the output register;
// input pins are sampled through two flip-flops (synchronisation).  The
// direction register is reset to DIR_RESET, so each instance starts in its
// role (all inputs for buttons, all outputs for a display) and can be
// reconfigured at run time.
// Registers (word offsets, see wb_pkg):
//   0 DATA  read: pin values (output register bits for outputs, synchronised
//               pin for inputs);  write: output register
//   1 DIR   read/write: direction bits
// Reads are combinational and side-effect free; writes act at the rising
// edge with cs and we high.  Reset: synchronous, active high.
//
// The design description names the button and 7-segment PIOs; pin count,
// register map and direction register are this implementation's choices.
module soc_pio
  import wb_pkg::*;
#(
  parameter int unsigned DAT_W     = SOC_DAT_W,
  parameter int unsigned SADR_W    = PER_SADR_W,
  parameter int unsigned WIDTH     = 8,
  parameter logic [WIDTH-1:0] DIR_RESET = '0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cs_i,
  input  logic              we_i,
  input  logic [SADR_W-1:0] adr_i,
  input  logic [DAT_W-1:0]  dat_i,
  output logic [DAT_W-1:0]  dat_o,
  input  logic [WIDTH-1:0]  pio_i,
  output logic [WIDTH-1:0]  pio_o,
  output logic [WIDTH-1:0]  pio_oe_o
);

  logic [WIDTH-1:0] out_r, dir_r, sync1, sync2, pins;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_r <= '0;
      dir_r <= DIR_RESET;
      sync1 <= '0;
      sync2 <= '0;
    end else begin
      sync1 <= pio_i;
      sync2 <= sync1;
      if (cs_i && we_i) begin
        if (adr_i == SADR_W'(PIO_DATA)) out_r <= dat_i[WIDTH-1:0];
        if (adr_i == SADR_W'(PIO_DIR))  dir_r <= dat_i[WIDTH-1:0];
      end
    end
  end

  assign pins     = (dir_r & out_r) | (~dir_r & sync2);
  assign pio_o    = out_r;
  assign pio_oe_o = dir_r;

  always_comb begin
    dat_o = '0;
    if (cs_i) begin
      if (adr_i == SADR_W'(PIO_DATA)) dat_o = DAT_W'(pins);
      if (adr_i == SADR_W'(PIO_DIR))  dat_o = DAT_W'(dir_r);
    end
  end

  initial begin
    assert (WIDTH <= DAT_W) else $error("soc_pio: WIDTH wider than the data bus");
  end

endmodule
