// baud_rate_gen: baud rate timers of one UART channel.
//
// Two free-running frequency dividers on the system clock: a 32-bit timer
// that gives one txclk_en pulse every tx_div cycles (the bit rate) and a
// 16-bit timer that gives one rxclk_en pulse every rx_div cycles (16 times
// the bit rate, for the receiver's oversampling). The 32/16-bit timer widths
// follow the document; the divisors come from a baud rate setting register
// outside this module and may change at any time. A divisor of 0 or 1 gives
// a pulse on every cycle.
//
// Timing: each enable is high for exactly one clock cycle per period.
module baud_rate_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] tx_div,
  input  logic [15:0] rx_div,
  output logic        txclk_en,
  output logic        rxclk_en
);

  logic [31:0] tx_cnt;
  logic [15:0] rx_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_cnt   <= '0;
      txclk_en <= 1'b0;
    end else if (tx_cnt + 32'd1 >= tx_div) begin
      tx_cnt   <= '0;
      txclk_en <= 1'b1;
    end else begin
      tx_cnt   <= tx_cnt + 32'd1;
      txclk_en <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_cnt   <= '0;
      rxclk_en <= 1'b0;
    end else if (rx_cnt + 16'd1 >= rx_div) begin
      rx_cnt   <= '0;
      rxclk_en <= 1'b1;
    end else begin
      rx_cnt   <= rx_cnt + 16'd1;
      rxclk_en <= 1'b0;
    end
  end

endmodule
