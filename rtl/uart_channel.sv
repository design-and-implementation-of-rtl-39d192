// uart_channel: one UART block of the multichannel controller.
//
// Built from the parts of the UART block structure: a Transmit Buffer (one
// byte holding register) feeding the Transmit Shift register (uart_tx), a
// Receive Shift register feeding the Receive Buffer (both in uart_rx), a
// Control Register and a Status Register. The local side writes the
// Transmit Buffer with tx_wr/tx_din (ignored while tx_full) and takes the
// Receive Buffer with rx_rd. txclk_en and rxclk_en play the role of the
// block's Tclk and Rclk and come from the baud rate generator.
//
// The bit meanings are this design's choice (ctrl_t and status_t in
// uart_pkg; bits 7:4 of both are reserved and read as written / as 0):
//   ctrl[0] transmit enable  - the Transmit Buffer is moved into the shift
//                              register only when set
//   ctrl[1] receive enable   - when clear the receiver sees an idle line
//   ctrl[2] loopback         - the receiver listens to this channel's own
//                              TXD instead of the RXD pin
//   status[0] tx_busy, [1] Transmit Buffer full, [2] Receive Buffer ready,
//   [3] overrun (a byte arrived while the Receive Buffer was still full;
//   cleared by rx_rd).
// Reset value of ctrl is 0x03.
//
// Timing: a byte written into an empty Transmit Buffer moves to the shift
// register on the next cycle if the transmitter is idle; rx_rdy rises one
// cycle after the receiver finishes a frame.
module uart_channel
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       txclk_en,
  input  logic       rxclk_en,
  input  logic       ctrl_we,
  input  ctrl_t      ctrl_wdata,
  output ctrl_t      ctrl,
  output status_t    status,
  input  logic       tx_wr,
  input  logic [7:0] tx_din,
  output logic       tx_full,
  input  logic       rx_rd,
  output logic [7:0] rx_dout,
  output logic       rx_rdy,
  output logic       txd,
  input  logic       rxd
);

  logic [7:0] tx_buf;
  logic       tx_busy, tx_load;
  logic       rx_line, rx_done, overrun;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctrl <= CTRL_RESET;
    else if (ctrl_we) ctrl <= ctrl_wdata;
  end

  // Transmit Buffer.
  assign tx_load = tx_full && !tx_busy && ctrl.tx_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_buf  <= '0;
      tx_full <= 1'b0;
    end else if (tx_load) begin
      tx_full <= 1'b0;
    end else if (tx_wr && !tx_full) begin
      tx_buf  <= tx_din;
      tx_full <= 1'b1;
    end
  end

  uart_tx u_tx (
    .clk    (clk),
    .rst_n  (rst_n),
    .din    (tx_buf),
    .wr_en  (tx_load),
    .clken  (txclk_en),
    .tx     (txd),
    .tx_busy(tx_busy)
  );

  // Receive side.
  always_comb begin
    if (!ctrl.rx_en)         rx_line = 1'b1;
    else if (ctrl.loopback)  rx_line = txd;
    else                          rx_line = rxd;
  end

  uart_rx u_rx (
    .clk    (clk),
    .rst_n  (rst_n),
    .rx     (rx_line),
    .clken  (rxclk_en),
    .rdy_clr(rx_rd),
    .rdy    (rx_rdy),
    .data   (rx_dout),
    .done   (rx_done)
  );

  // The receiver raises done on the edge that loads data; a done while rdy
  // was already set (and not being cleared) overwrote an unread byte.
  logic rx_rdy_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_rdy_q <= 1'b0;
      overrun  <= 1'b0;
    end else begin
      rx_rdy_q <= rx_rdy && !rx_rd;
      if (rx_rd)                    overrun <= 1'b0;
      else if (rx_done && rx_rdy_q) overrun <= 1'b1;
    end
  end

  always_comb begin
    status          = '0;
    status.tx_busy  = tx_busy;
    status.tx_full  = tx_full;
    status.rx_rdy   = rx_rdy;
    status.overrun  = overrun;
  end

endmodule
