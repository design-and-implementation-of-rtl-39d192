// uart: single-channel UART at a fixed baud rate.
//
// The stand-alone UART of the design: a baud rate generator preset for BAUD
// from the CLK_HZ clock, a transmitter and a 16x-oversampling receiver. The
// port names are the ones of the synthesised UART (din, clk_50m, rdy_clr,
// rx, wr_en in; dout, rdy, tx, tx_busy out); rst_n is added. The defaults,
// 9600 baud from a 50 MHz clock, are the document's test setting.
//
// Timing: a frame takes 10 bit times of round(CLK_HZ/BAUD) cycles (5208 at
// the defaults); rdy rises about half a stop bit after the last data bit
// and stays high until rdy_clr.
module uart
  import uart_pkg::*;
#(
  parameter longint unsigned CLK_HZ = 50_000_000,
  parameter longint unsigned BAUD   = 9600
) (
  input  logic       clk_50m,
  input  logic       rst_n,
  input  logic [7:0] din,
  input  logic       wr_en,
  input  logic       rdy_clr,
  input  logic       rx,
  output logic [7:0] dout,
  output logic       rdy,
  output logic       tx,
  output logic       tx_busy
);

  localparam logic [31:0] TX_DIV = tx_divisor(CLK_HZ, BAUD);
  localparam logic [15:0] RX_DIV = rx_divisor(CLK_HZ, BAUD);

  logic txclk_en, rxclk_en;

  baud_rate_gen u_baud (
    .clk     (clk_50m),
    .rst_n   (rst_n),
    .tx_div  (TX_DIV),
    .rx_div  (RX_DIV),
    .txclk_en(txclk_en),
    .rxclk_en(rxclk_en)
  );

  uart_tx u_tx (
    .clk    (clk_50m),
    .rst_n  (rst_n),
    .din    (din),
    .wr_en  (wr_en),
    .clken  (txclk_en),
    .tx     (tx),
    .tx_busy(tx_busy)
  );

  uart_rx u_rx (
    .clk    (clk_50m),
    .rst_n  (rst_n),
    .rx     (rx),
    .clken  (rxclk_en),
    .rdy_clr(rdy_clr),
    .rdy    (rdy),
    .data   (dout),
    .done   ()
  );

endmodule
