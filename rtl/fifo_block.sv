// fifo_block: baud rate converter between the PC's COM UART and COM1.
//
// Two asynchronous FIFOs, each with a full-flag status detector and a status
// buffer on its output. FIFO11 takes every byte the COM UART receives from
// the PC (side a) and hands it to COM1's Transmit Buffer (side b); FIFO22
// carries bytes received on COM1 back to COM's Transmit Buffer. Because each
// UART runs at its own baud rate, this is what lets the PC talk to a piece
// of equipment at a different rate. Side a runs on clk_a, side b on clk_b.
//
// Interface, per side: x_rx_rdy/x_rx_data is the UART's Receive Buffer and
// x_rx_rd takes it; x_tx_full is the UART's Transmit Buffer state and
// x_tx_wr/x_tx_data writes it. While a FIFO is full the received byte is
// left in the UART's Receive Buffer. The flags Full11, Empty11 (FIFO11) and
// Full12, Empty12 (FIFO22) are brought out. The FIFO directions and the
// back-pressure are this design's choices.
module fifo_block #(
  parameter int unsigned AW = 4
) (
  input  logic       clk_a,
  input  logic       rst_a_n,
  input  logic       clk_b,
  input  logic       rst_b_n,
  input  logic       a_rx_rdy,
  input  logic [7:0] a_rx_data,
  output logic       a_rx_rd,
  input  logic       a_tx_full,
  output logic       a_tx_wr,
  output logic [7:0] a_tx_data,
  input  logic       b_rx_rdy,
  input  logic [7:0] b_rx_data,
  output logic       b_rx_rd,
  input  logic       b_tx_full,
  output logic       b_tx_wr,
  output logic [7:0] b_tx_data,
  output logic       full11,
  output logic       empty11,
  output logic       full12,
  output logic       empty12
);

  // FIFO11: side a -> side b.
  logic [7:0] f11_rdata;
  logic       f11_rd, sb11_valid;

  assign a_rx_rd = a_rx_rdy && !full11;

  async_fifo #(.DW(8), .AW(AW)) u_fifo11 (
    .wclk  (clk_a),
    .wrst_n(rst_a_n),
    .wr    (a_rx_rd),
    .wdata (a_rx_data),
    .full  (full11),
    .rclk  (clk_b),
    .rrst_n(rst_b_n),
    .rd    (f11_rd),
    .rdata (f11_rdata),
    .empty (empty11)
  );

  assign b_tx_wr = sb11_valid && !b_tx_full;

  status_buffer #(.DW(8)) u_sbuf11 (
    .clk       (clk_b),
    .rst_n     (rst_b_n),
    .fifo_empty(empty11),
    .fifo_data (f11_rdata),
    .fifo_rd   (f11_rd),
    .valid     (sb11_valid),
    .data      (b_tx_data),
    .take      (b_tx_wr)
  );

  // FIFO22: side b -> side a.
  logic [7:0] f22_rdata;
  logic       f22_rd, sb22_valid;

  assign b_rx_rd = b_rx_rdy && !full12;

  async_fifo #(.DW(8), .AW(AW)) u_fifo22 (
    .wclk  (clk_b),
    .wrst_n(rst_b_n),
    .wr    (b_rx_rd),
    .wdata (b_rx_data),
    .full  (full12),
    .rclk  (clk_a),
    .rrst_n(rst_a_n),
    .rd    (f22_rd),
    .rdata (f22_rdata),
    .empty (empty12)
  );

  assign a_tx_wr = sb22_valid && !a_tx_full;

  status_buffer #(.DW(8)) u_sbuf22 (
    .clk       (clk_a),
    .rst_n     (rst_a_n),
    .fifo_empty(empty12),
    .fifo_data (f22_rdata),
    .fifo_rd   (f22_rd),
    .valid     (sb22_valid),
    .data      (a_tx_data),
    .take      (a_tx_wr)
  );

endmodule
