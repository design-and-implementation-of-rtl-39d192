// tb_uart_channel: self-checking test of one UART block of the controller.
//
// Bit-rate enable every BIT cycles, receive enable every R = BIT/16 cycles.
// The test checks, against values computed here:
//  - normal mode: bytes written to the Transmit Buffer appear on txd as
//    frames (decoded here by sampling mid-bit), and frames driven on rxd
//    appear in the Receive Buffer;
//  - the Transmit Buffer takes a second byte while the first is shifting
//    (status bit 1 set, then cleared when it moves on);
//  - loopback (ctrl bit 2) returns the channel's own bytes;
//  - overrun (status bit 3) when a byte arrives before the previous one was
//    read, cleared by rx_rd;
//  - transmit disable (ctrl bit 0) holds the byte in the Transmit Buffer and
//    receive disable (ctrl bit 1) ignores frames on rxd.
module tb_uart_channel;
  import uart_pkg::*;
  localparam int R = 4;
  localparam int BIT = 16 * R;

  logic clk = 0, rst_n = 0, txclk_en = 0, rxclk_en = 0;
  logic ctrl_we = 0, tx_wr = 0, rx_rd = 0, rxd = 1;
  logic [7:0] ctrl_wdata = 0, tx_din = 0, ctrl, status, rx_dout;
  logic tx_full, rx_rdy, txd;
  int checks = 0, failures = 0, cyc = 0;

  uart_channel dut (.clk, .rst_n, .txclk_en, .rxclk_en, .ctrl_we, .ctrl_wdata, .ctrl, .status,
                    .tx_wr, .tx_din, .tx_full, .rx_rd, .rx_dout, .rx_rdy, .txd, .rxd);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    txclk_en <= ((cyc % BIT) == BIT - 1);
    rxclk_en <= ((cyc % R) == R - 1);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic set_ctrl(input logic [7:0] v);
    @(negedge clk); ctrl_we = 1; ctrl_wdata = v;
    @(negedge clk); ctrl_we = 0;
    check(ctrl == v, "control register written");
  endtask

  task automatic write_tx(input logic [7:0] b);
    @(negedge clk); tx_wr = 1; tx_din = b;
    @(negedge clk); tx_wr = 0;
  endtask

  task automatic read_rx(output logic [7:0] b);
    b = rx_dout;
    @(negedge clk); rx_rd = 1;
    @(negedge clk); rx_rd = 0;
  endtask

  // Decodes one frame from txd.
  task automatic get_txd(output logic [7:0] b, output bit ok);
    int t = 0;
    ok = 0;
    while (txd && t < 4 * BIT) begin @(negedge clk); t++; end
    if (txd) return;
    repeat (BIT / 2) @(negedge clk);
    if (txd) return;
    for (int i = 0; i < 8; i++) begin
      repeat (BIT) @(negedge clk);
      b[i] = txd;
    end
    repeat (BIT) @(negedge clk);
    ok = txd;
  endtask

  task automatic put_rxd(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rxd = f[i]; repeat (BIT) @(negedge clk); end
  endtask

  task automatic wait_rx(input int limit);
    int t = 0;
    while (!rx_rdy && t < limit) begin @(negedge clk); t++; end
  endtask

  initial begin
    logic [7:0] b, b2;
    bit ok;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(ctrl == CTRL_RESET && status == 8'h00, "reset values");

    // Normal mode: two bytes back to back through the Transmit Buffer.
    write_tx(8'h96);
    repeat (2) @(negedge clk);
    check(status[ST_TX_BUSY] && !status[ST_TX_FULL], "first byte moved to shift register");
    write_tx(8'h3B);
    check(status[ST_TX_FULL], "second byte waits in Transmit Buffer");
    get_txd(b, ok);
    check(ok && b == 8'h96, $sformatf("txd frame 1 %02h", b));
    get_txd(b, ok);
    check(ok && b == 8'h3B, $sformatf("txd frame 2 %02h", b));
    check(!tx_full, "Transmit Buffer empty");

    // Receive from rxd.
    for (int k = 0; k < 6; k++) begin
      b2 = 8'($urandom);
      put_rxd(b2);
      wait_rx(BIT);
      check(rx_rdy && status[ST_RX_RDY], "rx ready");
      read_rx(b);
      check(b == b2, $sformatf("rx %02h want %02h", b, b2));
      check(!rx_rdy, "rx_rd clears ready");
    end

    // Overrun: two frames without a read.
    put_rxd(8'h11);
    put_rxd(8'h22);
    wait_rx(BIT);
    repeat (4) @(negedge clk);
    check(status[ST_OVERRUN], "overrun flagged");
    check(rx_dout == 8'h22, "newest byte kept");
    read_rx(b);
    check(!status[ST_OVERRUN], "overrun cleared by read");

    // Loopback.
    set_ctrl(8'h07);
    for (int k = 0; k < 4; k++) begin
      b2 = 8'($urandom);
      write_tx(b2);
      wait_rx(12 * BIT);
      read_rx(b);
      check(b == b2, $sformatf("loopback %02h want %02h", b, b2));
    end

    // Transmit disabled: byte held.
    set_ctrl(8'h02);
    write_tx(8'h5A);
    repeat (3 * BIT) @(negedge clk);
    check(tx_full && !status[ST_TX_BUSY] && txd, "tx disabled holds byte");
    set_ctrl(8'h03);
    get_txd(b, ok);
    check(ok && b == 8'h5A, "held byte sent after enable");

    // Receive disabled: frame ignored.
    set_ctrl(8'h01);
    put_rxd(8'hE7);
    repeat (BIT) @(negedge clk);
    check(!rx_rdy, "rx disabled ignores rxd");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
