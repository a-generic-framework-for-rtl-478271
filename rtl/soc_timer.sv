// soc_timer: timer peripheral of the SoC with a PWM output (timer_pwm).
//
// A DAT_W-bit counter runs while the enable bit is set.  It counts
// 0, 1, ..., PERIOD and then wraps to 0, so one period lasts PERIOD + 1
// clocks; each wrap sets the sticky 'expired' flag, which is also the
// interrupt output.  The PWM output is high while enabled and count < COMPARE,
// so its duty cycle is COMPARE / (PERIOD + 1).  All settings are registers and
// can be changed at run time.
// Registers (word offsets, see wb_pkg):
//   0 CTRL     read : {expired, enable};  write: enable = d[0], d[1] = 1 clears expired
//   1 PERIOD   read/write
//   2 COMPARE  read/write
//   3 COUNT    read: current count;  write: load the count
// Reads are combinational and side-effect free; writes act at the rising
// edge with cs and we high.  Reset (synchronous, active high) clears
// everything.
//
// The design description names the timer and, in a schematic, its
// timer_pwm output; counter behaviour and register map are this
// implementation's choices.
module soc_timer
  import wb_pkg::*;
#(
  parameter int unsigned DAT_W  = SOC_DAT_W,
  parameter int unsigned SADR_W = PER_SADR_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cs_i,
  input  logic              we_i,
  input  logic [SADR_W-1:0] adr_i,
  input  logic [DAT_W-1:0]  dat_i,
  output logic [DAT_W-1:0]  dat_o,
  output logic              timer_pwm_o,
  output logic              irq_o
);

  logic             enable, expired;
  logic [DAT_W-1:0] period, compare, count;
  logic             wr;

  assign wr = cs_i & we_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      enable  <= 1'b0;
      expired <= 1'b0;
      period  <= '0;
      compare <= '0;
      count   <= '0;
    end else begin
      if (enable) begin
        if (count >= period) begin
          count   <= '0;
          expired <= 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
      if (wr) begin
        unique case (adr_i)
          SADR_W'(TMR_CTRL): begin
            enable <= dat_i[0];
            if (dat_i[1]) expired <= 1'b0;
          end
          SADR_W'(TMR_PERIOD):  period  <= dat_i;
          SADR_W'(TMR_COMPARE): compare <= dat_i;
          SADR_W'(TMR_COUNT):   count   <= dat_i;
          default: ;
        endcase
      end
    end
  end

  assign timer_pwm_o = enable && (count < compare);
  assign irq_o       = expired;

  always_comb begin
    dat_o = '0;
    if (cs_i) begin
      unique case (adr_i)
        SADR_W'(TMR_CTRL):    dat_o = DAT_W'({expired, enable});
        SADR_W'(TMR_PERIOD):  dat_o = period;
        SADR_W'(TMR_COMPARE): dat_o = compare;
        SADR_W'(TMR_COUNT):   dat_o = count;
        default:              dat_o = '0;
      endcase
    end
  end

endmodule
