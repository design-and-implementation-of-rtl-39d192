// uart_pkg: types and constants shared by the multichannel UART.
//
// Holds the transmitter and receiver state encodings (the state names are
// the ones of the transmitter and receiver flow charts this design follows),
// the baud divisor formulas used to preset the baud rate timers, and the
// register map of the controller's data bus. The register map, the control
// and status bit positions and the divisor rounding are this design's own
// choices.
package uart_pkg;

  // Transmitter states.
  typedef enum logic [1:0] {
    STATE_IDLE  = 2'd0,
    STATE_START = 2'd1,
    STATE_DATA  = 2'd2,
    STATE_STOP  = 2'd3
  } tx_state_e;

  // Receiver states.
  typedef enum logic [1:0] {
    RX_STATE_START = 2'd0,
    RX_STATE_DATA  = 2'd1,
    RX_STATE_STOP  = 2'd2
  } rx_state_e;

  // Receiver oversampling: 16 samples per bit (sample counts 0..15).
  localparam int unsigned OVERSAMPLE = 16;

  // Clock cycles per bit, rounded to nearest.
  function automatic logic [31:0] tx_divisor(longint unsigned clk_hz, longint unsigned baud);
    return 32'((clk_hz + baud / 2) / baud);
  endfunction

  // Clock cycles per 1/16 bit, rounded to nearest.
  function automatic logic [15:0] rx_divisor(longint unsigned clk_hz, longint unsigned baud);
    longint unsigned d;
    d = baud * OVERSAMPLE;
    return 16'((clk_hz + d / 2) / d);
  endfunction

  // Data bus register map: addr[5:3] selects the channel, addr[2:0] the register.
  localparam int unsigned N_CHANNELS = 5;  // COM (channel 0) and UART1..UART4
  localparam logic [2:0] REG_DATA   = 3'd0;  // write: transmit buffer, read: receive buffer
  localparam logic [2:0] REG_CTRL   = 3'd1;  // control register
  localparam logic [2:0] REG_STATUS = 3'd2;  // status register (read only)
  localparam logic [2:0] REG_TXDIV  = 3'd3;  // baud setting: clock cycles per bit
  localparam logic [2:0] REG_RXDIV  = 3'd4;  // baud setting: clock cycles per 1/16 bit

  // Control register.
  typedef struct packed {
    logic [4:0] reserved;
    logic       loopback;   // receiver listens to the channel's own TXD
    logic       rx_en;      // receiver enabled
    logic       tx_en;      // Transmit Buffer may move to the shift register
  } ctrl_t;

  localparam ctrl_t CTRL_RESET = '{reserved: '0, loopback: 1'b0, rx_en: 1'b1, tx_en: 1'b1};

  // Status register.
  typedef struct packed {
    logic [3:0] reserved;
    logic       overrun;    // a byte arrived before the previous one was taken
    logic       rx_rdy;     // Receive Buffer holds a byte
    logic       tx_full;    // Transmit Buffer holds a byte
    logic       tx_busy;    // transmitter is sending a frame
  } status_t;

  // Bit positions of the same fields in a bus word.
  localparam int unsigned CTRL_TX_EN    = 0;
  localparam int unsigned CTRL_RX_EN    = 1;
  localparam int unsigned CTRL_LOOPBACK = 2;
  localparam int unsigned ST_TX_BUSY    = 0;
  localparam int unsigned ST_TX_FULL    = 1;
  localparam int unsigned ST_RX_RDY     = 2;
  localparam int unsigned ST_OVERRUN    = 3;

endpackage
