// soc_uart: UART peripheral of the SoC, used for external communication.
//
// 8 data bits, no parity, one stop bit, least significant bit first.  The bit
// time is a run-time register (clocks per bit), so the baud rate can be
// reconfigured while the system runs; its reset value is CLK_HZ / BAUD.
// Registers (word offsets, see wb_pkg):
//   0 DATA    write: send the byte d[7:0] (ignored while tx is busy)
//             read : the last byte received
//   1 STATUS  read : {overrun, rx_valid, tx_busy} in bits 2..0
//             write: any value clears rx_valid and overrun
//   2 DIV     read/write: clocks per bit (values below 2 act as 2)
// Reads have no side effects and are combinational, so the core answers
// every access at once (slave_ready can be tied to 1).  Writes act at the
// rising edge with cs and we high.
//
// Transmitter: a 10-bit shift register (start, data, stop) shifted once per
// bit time.  Receiver: rx is synchronised by two flip-flops; a falling edge
// starts a frame, which is checked half a bit later and then sampled in the
// middle of each bit.  A frame whose stop bit is 0 is dropped.
//
// The design description only names a UART for external communication; the
// frame format, register map and reset values are this implementation's
// choices.  Reset: synchronous, active high.
module soc_uart
  import wb_pkg::*;
#(
  parameter int unsigned DAT_W  = SOC_DAT_W,
  parameter int unsigned SADR_W = PER_SADR_W,
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200,
  parameter int unsigned DIV_W  = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cs_i,
  input  logic              we_i,
  input  logic [SADR_W-1:0] adr_i,
  input  logic [DAT_W-1:0]  dat_i,
  output logic [DAT_W-1:0]  dat_o,
  output logic              tx_o,
  input  logic              rx_i
);

  localparam logic [DIV_W-1:0] DIV_RESET = DIV_W'(CLK_HZ / BAUD);

  logic [DIV_W-1:0] div, bit_time;
  logic             wr;

  assign wr       = cs_i & we_i;
  assign bit_time = (div < DIV_W'(2)) ? DIV_W'(2) : div;

  always_ff @(posedge clk) begin
    if (rst)                                   div <= DIV_RESET;
    else if (wr && adr_i == SADR_W'(UART_DIV)) div <= DIV_W'(dat_i);
  end

  // ---------------- transmitter ----------------
  logic [9:0]       tx_shift;
  logic [3:0]       tx_bits;
  logic [DIV_W-1:0] tx_cnt;
  logic             tx_busy;

  assign tx_busy = (tx_bits != 4'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
    end else if (!tx_busy) begin
      if (wr && adr_i == SADR_W'(UART_DATA)) begin
        tx_shift <= {1'b1, dat_i[7:0], 1'b0};
        tx_bits  <= 4'd10;
        tx_cnt   <= bit_time - 1'b1;
      end
    end else if (tx_cnt != '0) begin
      tx_cnt <= tx_cnt - 1'b1;
    end else begin
      tx_shift <= {1'b1, tx_shift[9:1]};
      tx_bits  <= tx_bits - 1'b1;
      tx_cnt   <= bit_time - 1'b1;
    end
  end

  assign tx_o = tx_busy ? tx_shift[0] : 1'b1;

  // ---------------- receiver ----------------
  logic [1:0]       rx_sync;
  logic             rx;
  logic             rx_active;
  logic [3:0]       rx_bits;      // bits still to sample: 9 (8 data + stop)
  logic [DIV_W-1:0] rx_cnt;
  logic [7:0]       rx_shift, rx_data;
  logic             rx_valid, rx_overrun;
  logic             clr;

  assign rx  = rx_sync[1];
  assign clr = wr && adr_i == SADR_W'(UART_STATUS);

  always_ff @(posedge clk) begin
    if (rst) rx_sync <= 2'b11;
    else     rx_sync <= {rx_sync[0], rx_i};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_active  <= 1'b0;
      rx_bits    <= '0;
      rx_cnt     <= '0;
      rx_shift   <= '0;
      rx_data    <= '0;
      rx_valid   <= 1'b0;
      rx_overrun <= 1'b0;
    end else begin
      if (clr) begin
        rx_valid   <= 1'b0;
        rx_overrun <= 1'b0;
      end
      if (!rx_active) begin
        if (!rx) begin                       // start bit edge
          rx_active <= 1'b1;
          rx_bits   <= 4'd10;                // start check + 8 data + stop
          rx_cnt    <= (bit_time >> 1) - 1'b1;
        end
      end else if (rx_cnt != '0) begin
        rx_cnt <= rx_cnt - 1'b1;
      end else begin
        rx_cnt  <= bit_time - 1'b1;
        rx_bits <= rx_bits - 1'b1;
        if (rx_bits == 4'd10) begin
          if (rx) rx_active <= 1'b0;         // glitch, not a start bit
        end else if (rx_bits == 4'd1) begin
          rx_active <= 1'b0;
          if (rx) begin                      // good stop bit
            rx_data    <= rx_shift;
            rx_valid   <= 1'b1;
            rx_overrun <= rx_valid & ~clr;
          end
        end else begin
          rx_shift <= {rx, rx_shift[7:1]};
        end
      end
    end
  end

  // ---------------- register read ----------------
  always_comb begin
    dat_o = '0;
    if (cs_i) begin
      unique case (adr_i)
        SADR_W'(UART_DATA):   dat_o = DAT_W'(rx_data);
        SADR_W'(UART_STATUS): dat_o = DAT_W'({rx_overrun, rx_valid, tx_busy});
        SADR_W'(UART_DIV):    dat_o = DAT_W'(div);
        default:              dat_o = '0;
      endcase
    end
  end

endmodule
