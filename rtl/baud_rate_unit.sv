// baud_rate_unit: the controller's baud rate generator.
//
// Holds, for each of NCH UART channels, a baud rate setting register (a
// 32-bit cycles-per-bit divisor for the transmitter and a 16-bit
// cycles-per-sixteenth-bit divisor for the receiver) and a baud_rate_gen
// timer pair that turns them into txclk_en and rxclk_en. The registers are
// written from the data bus (wr with ch and sel_rx) and reset to the rates
// of the document's example system: 115200 baud for the PC link (channel 0),
// 57600 and 19200 for equipment 1 and 2, and 9600 for the others. Divisors
// are rounded to the nearest whole cycle, which is this design's choice.
//
// Timing: a write takes effect on the next clock edge; the timers keep
// counting and use the new divisor from then on.
module baud_rate_unit
  import uart_pkg::*;
#(
  parameter longint unsigned CLK_HZ   = 50_000_000,
  parameter int unsigned     NCH      = 5,
  parameter longint unsigned BAUD_COM = 115200,
  parameter longint unsigned BAUD_CH1 = 57600,
  parameter longint unsigned BAUD_CH2 = 19200,
  parameter longint unsigned BAUD_CH3 = 9600,
  parameter longint unsigned BAUD_CH4 = 9600
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr,
  input  logic [2:0]            ch,
  input  logic                  sel_rx,
  input  logic [31:0]           wdata,
  output logic [NCH-1:0][31:0]  tx_div,
  output logic [NCH-1:0][15:0]  rx_div,
  output logic [NCH-1:0]        txclk_en,
  output logic [NCH-1:0]        rxclk_en
);

  function automatic longint unsigned reset_baud(int unsigned i);
    case (i)
      0:       return BAUD_COM;
      1:       return BAUD_CH1;
      2:       return BAUD_CH2;
      3:       return BAUD_CH3;
      default: return BAUD_CH4;
    endcase
  endfunction

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    localparam logic [31:0] TX_RST = tx_divisor(CLK_HZ, reset_baud(i));
    localparam logic [15:0] RX_RST = rx_divisor(CLK_HZ, reset_baud(i));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        tx_div[i] <= TX_RST;
        rx_div[i] <= RX_RST;
      end else if (wr && 32'(ch) == i) begin
        if (sel_rx) rx_div[i] <= wdata[15:0];
        else        tx_div[i] <= wdata;
      end
    end

    baud_rate_gen u_gen (
      .clk     (clk),
      .rst_n   (rst_n),
      .tx_div  (tx_div[i]),
      .rx_div  (rx_div[i]),
      .txclk_en(txclk_en[i]),
      .rxclk_en(rxclk_en[i])
    );
  end

endmodule
