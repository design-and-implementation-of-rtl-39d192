// mc_uart_top: multichannel UART controller.
//
// Lets one PC serial link serve several pieces of equipment that each run
// at their own baud rate. Five UART channels share one system clock:
//   channel 0  COM    - the link to the PC (115200 baud after reset)
//   channel 1  UART1  - COM1, bridged to COM through the FIFO block
//                       (57600 baud after reset)
//   channel 2  UART2  - 19200 baud after reset
//   channel 3  UART3  - 9600 baud after reset
//   channel 4  UART4  - 9600 baud after reset
// Every byte the PC sends on COM is queued in FIFO11 and sent out on COM1 at
// COM1's rate; every byte received on COM1 is queued in FIFO22 and sent back
// to the PC at COM's rate. UART2..UART4 are served by a local processor over
// the data bus. The baud rate generator holds the baud setting register of
// every channel and gives each one its bit-rate and 16x enables.
//
// Beside the controller, and sharing only its clock and reset, the top also
// holds the stand-alone single-channel UART (ports sc_*): the 9600-baud
// UART with the port set din/wr_en/rdy_clr/rx/dout/rdy/tx/tx_busy that the
// document synthesises and tests in loopback.
//
// Data bus (this design's choice; synchronous, one access per cycle):
//   bus_addr[5:3] channel 0..4, bus_addr[2:0] register:
//     0 DATA   write: Transmit Buffer (channels 2..4 only; COM and COM1 are
//              fed by the FIFO block), read: Receive Buffer (a read of
//              channels 2..4 also takes the byte and clears rx ready)
//     1 CTRL   control register, bits [2:0] = loopback, rx enable, tx enable
//     2 STATUS {fifo flags, 0, overrun, rx ready, tx buffer full, tx busy};
//              the fifo flags bits [7:4] (Empty12, Full12, Empty11, Full11)
//              are shown in every channel's status word
//     3 TXDIV  clock cycles per bit (32 bits)
//     4 RXDIV  clock cycles per 1/16 bit (16 bits)
//   A write to the DATA register while the Transmit Buffer is full is lost;
//   software polls STATUS bit 1 first. bus_rdata is registered: it holds the
//   value read on the cycle after bus_rd.
module mc_uart_top
  import uart_pkg::*;
#(
  parameter longint unsigned CLK_HZ = 50_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_wr,
  input  logic        bus_rd,
  input  logic [5:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  input  logic        com_rxd,
  output logic        com_txd,
  input  logic [3:0]  ch_rxd,
  output logic [3:0]  ch_txd,
  output logic [3:0]  fifo_flags,
  // Stand-alone single-channel UART at 9600 baud.
  input  logic [7:0]  sc_din,
  input  logic        sc_wr_en,
  input  logic        sc_rdy_clr,
  input  logic        sc_rx,
  output logic [7:0]  sc_dout,
  output logic        sc_rdy,
  output logic        sc_tx,
  output logic        sc_tx_busy
);

  logic [2:0] bus_ch, bus_reg;
  assign bus_ch  = bus_addr[5:3];
  assign bus_reg = bus_addr[2:0];

  // Baud rate generator with the baud rate setting registers.
  logic [N_CHANNELS-1:0][31:0] tx_div;
  logic [N_CHANNELS-1:0][15:0] rx_div;
  logic [N_CHANNELS-1:0]       txclk_en, rxclk_en;

  baud_rate_unit #(.CLK_HZ(CLK_HZ), .NCH(N_CHANNELS)) u_baud (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr      (bus_wr && (bus_reg == REG_TXDIV || bus_reg == REG_RXDIV)),
    .ch      (bus_ch),
    .sel_rx  (bus_reg == REG_RXDIV),
    .wdata   (bus_wdata),
    .tx_div  (tx_div),
    .rx_div  (rx_div),
    .txclk_en(txclk_en),
    .rxclk_en(rxclk_en)
  );

  // UART channels.
  logic [N_CHANNELS-1:0]       ctrl_we, tx_wr, tx_full, rx_rd, rx_rdy, txd, rxd;
  logic [N_CHANNELS-1:0][7:0]  tx_din, rx_dout;
  ctrl_t   [N_CHANNELS-1:0]    ctrl;
  status_t [N_CHANNELS-1:0]    status;

  assign rxd = {ch_rxd, com_rxd};
  assign com_txd = txd[0];
  assign ch_txd  = txd[N_CHANNELS-1:1];

  for (genvar i = 0; i < N_CHANNELS; i++) begin : g_ch
    assign ctrl_we[i] = bus_wr && bus_reg == REG_CTRL && 32'(bus_ch) == i;

    uart_channel u_uart (
      .clk       (clk),
      .rst_n     (rst_n),
      .txclk_en  (txclk_en[i]),
      .rxclk_en  (rxclk_en[i]),
      .ctrl_we   (ctrl_we[i]),
      .ctrl_wdata(bus_wdata[7:0]),
      .ctrl      (ctrl[i]),
      .status    (status[i]),
      .tx_wr     (tx_wr[i]),
      .tx_din    (tx_din[i]),
      .tx_full   (tx_full[i]),
      .rx_rd     (rx_rd[i]),
      .rx_dout   (rx_dout[i]),
      .rx_rdy    (rx_rdy[i]),
      .txd       (txd[i]),
      .rxd       (rxd[i])
    );
  end

  // FIFO block between COM (side a) and COM1 (side b).
  logic full11, empty11, full12, empty12;

  fifo_block #(.AW(4)) u_fifo_block (
    .clk_a    (clk),
    .rst_a_n  (rst_n),
    .clk_b    (clk),
    .rst_b_n  (rst_n),
    .a_rx_rdy (rx_rdy[0]),
    .a_rx_data(rx_dout[0]),
    .a_rx_rd  (rx_rd[0]),
    .a_tx_full(tx_full[0]),
    .a_tx_wr  (tx_wr[0]),
    .a_tx_data(tx_din[0]),
    .b_rx_rdy (rx_rdy[1]),
    .b_rx_data(rx_dout[1]),
    .b_rx_rd  (rx_rd[1]),
    .b_tx_full(tx_full[1]),
    .b_tx_wr  (tx_wr[1]),
    .b_tx_data(tx_din[1]),
    .full11   (full11),
    .empty11  (empty11),
    .full12   (full12),
    .empty12  (empty12)
  );

  assign fifo_flags = {empty12, full12, empty11, full11};

  // Data bus access to UART2..UART4.
  for (genvar i = 2; i < N_CHANNELS; i++) begin : g_bus_ch
    logic sel;
    assign sel       = 32'(bus_ch) == i && bus_reg == REG_DATA;
    assign tx_wr[i]  = bus_wr && sel;
    assign tx_din[i] = bus_wdata[7:0];
    assign rx_rd[i]  = bus_rd && sel;
  end

  // Registered read data.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rdata <= '0;
    end else if (bus_rd) begin
      bus_rdata <= '0;
      if (32'(bus_ch) < N_CHANNELS) begin
        unique case (bus_reg)
          REG_DATA:   bus_rdata <= 32'(rx_dout[bus_ch]);
          REG_CTRL:   bus_rdata <= 32'(ctrl[bus_ch]);
          REG_STATUS: bus_rdata <= 32'({fifo_flags, status[bus_ch].overrun, status[bus_ch].rx_rdy,
                                        status[bus_ch].tx_full, status[bus_ch].tx_busy});
          REG_TXDIV:  bus_rdata <= tx_div[bus_ch];
          REG_RXDIV:  bus_rdata <= 32'(rx_div[bus_ch]);
          default:    bus_rdata <= '0;
        endcase
      end
    end
  end

  // The stand-alone UART stands beside the controller with its own ports.
  uart #(.CLK_HZ(CLK_HZ), .BAUD(9600)) u_single (
    .clk_50m(clk),
    .rst_n  (rst_n),
    .din    (sc_din),
    .wr_en  (sc_wr_en),
    .rdy_clr(sc_rdy_clr),
    .rx     (sc_rx),
    .dout   (sc_dout),
    .rdy    (sc_rdy),
    .tx     (sc_tx),
    .tx_busy(sc_tx_busy)
  );

endmodule
