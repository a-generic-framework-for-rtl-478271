// wb_pkg: constants and types shared by the Wishbone bus modules and the
// case-study SoC.
//
// The bus widths of the case study (16-bit address, 24-bit data) and the
// 8..32-bit legal range of the interconnect widths come from the design
// description.  The system address table (where each slave sits in the
// 16-bit word address space), the peripheral register offsets and the
// master state encoding are choices of this implementation.
package wb_pkg;

  // Case-study bus widths and the legal width range of the interconnect.
  localparam int unsigned SOC_ADR_W = 16;
  localparam int unsigned SOC_DAT_W = 24;
  localparam int unsigned WB_MIN_W  = 8;
  localparam int unsigned WB_MAX_W  = 32;

  // Number of slave modules of the case-study SoC.
  localparam int unsigned SOC_NS = 6;

  // Slave indices on the interconnect.
  localparam int unsigned S_RAM  = 0;
  localparam int unsigned S_UART = 1;
  localparam int unsigned S_TMR  = 2;
  localparam int unsigned S_BTN  = 3;
  localparam int unsigned S_SEG0 = 4;
  localparam int unsigned S_SEG1 = 5;

  // System address table: slave i is selected when (adr & MASK[i]) == BASE[i].
  // Word addresses.  The RAM gets a 1024-word window; each peripheral four
  // registers.
  localparam logic [SOC_NS-1:0][31:0] SOC_BASE = {
    32'h0000_8014,   // S_SEG1
    32'h0000_8010,   // S_SEG0
    32'h0000_800C,   // S_BTN
    32'h0000_8008,   // S_TMR
    32'h0000_8004,   // S_UART
    32'h0000_0000    // S_RAM
  };
  localparam logic [SOC_NS-1:0][31:0] SOC_MASK = {
    32'hFFFF_FFFC,
    32'hFFFF_FFFC,
    32'hFFFF_FFFC,
    32'hFFFF_FFFC,
    32'hFFFF_FFFC,
    32'hFFFF_FC00
  };

  // Local address width seen by each IP core behind its slave module.
  localparam int unsigned RAM_SADR_W = 10;
  localparam int unsigned PER_SADR_W = 2;

  // Transfer mode of a master module.
  typedef enum logic {
    WB_ASYNC = 1'b0,   // combinational: one transfer per clock
    WB_SYNC  = 1'b1    // registered bus cycle run by a state machine
  } wb_mode_e;

  // States of the master module's synchronous-mode state machine.
  typedef enum logic [1:0] {
    M_IDLE = 2'd0,     // no bus cycle
    M_BUSY = 2'd1,     // cyc/stb asserted, waiting for ack (wait states)
    M_DONE = 2'd2      // data registered, ready reported to the core
  } wb_mstate_e;

  // UART register offsets.
  localparam logic [1:0] UART_DATA   = 2'd0;  // W: send byte, R: last received byte
  localparam logic [1:0] UART_STATUS = 2'd1;  // R: {overrun, rx_valid, tx_busy}, W: clear rx flags
  localparam logic [1:0] UART_DIV    = 2'd2;  // R/W: clocks per bit

  // Timer register offsets.
  localparam logic [1:0] TMR_CTRL    = 2'd0;  // R: {expired, enable}, W: enable=d[0], d[1] clears expired
  localparam logic [1:0] TMR_PERIOD  = 2'd1;  // R/W: count wraps after PERIOD
  localparam logic [1:0] TMR_COMPARE = 2'd2;  // R/W: pwm high while count < COMPARE
  localparam logic [1:0] TMR_COUNT   = 2'd3;  // R: current count, W: load count

  // PIO register offsets.
  localparam logic [1:0] PIO_DATA    = 2'd0;  // R: pin values, W: output register
  localparam logic [1:0] PIO_DIR     = 2'd1;  // R/W: 1 = pin driven (output)

endpackage
