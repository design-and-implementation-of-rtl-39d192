// tb_baud_rate_unit: checks the baud setting registers and the per-channel
// enables of the controller's baud rate generator.
//
// After reset each channel's divisors must equal round(50e6/baud) and
// round(50e6/(16*baud)) for 115200, 57600, 19200, 9600 and 9600 baud,
// worked out here, and each channel's txclk_en and rxclk_en periods must
// match them. The test then writes new divisors into one channel over the
// register port and checks that only that channel changes and that its
// enables follow.
module tb_baud_rate_unit;
  localparam int NCH = 5;
  logic clk = 0, rst_n = 0, wr = 0, sel_rx = 0;
  logic [2:0] ch = 0;
  logic [31:0] wdata = 0;
  logic [NCH-1:0][31:0] tx_div;
  logic [NCH-1:0][15:0] rx_div;
  logic [NCH-1:0] txclk_en, rxclk_en;
  int checks = 0, failures = 0;

  baud_rate_unit dut (.clk, .rst_n, .wr, .ch, .sel_rx, .wdata, .tx_div, .rx_div, .txclk_en, .rxclk_en);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask


  task automatic measure(input int i, input bit is_rx, input int want);
    int c = 0;
    if (is_rx) begin
      while (!rxclk_en[i]) @(negedge clk);
      @(negedge clk); c = 1;
      while (!rxclk_en[i]) begin @(negedge clk); c++; end
    end else begin
      while (!txclk_en[i]) @(negedge clk);
      @(negedge clk); c = 1;
      while (!txclk_en[i]) begin @(negedge clk); c++; end
    end
    check(c == want, $sformatf("ch%0d %s period %0d want %0d", i, is_rx ? "rx" : "tx", c, want));
  endtask

  initial begin
    automatic int want_tx[NCH] = '{434, 868, 2604, 5208, 5208};
    automatic int want_rx[NCH] = '{27, 54, 163, 326, 326};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NCH; i++) begin
      check(tx_div[i] == want_tx[i], $sformatf("ch%0d tx_div %0d", i, tx_div[i]));
      check(rx_div[i] == 16'(want_rx[i]), $sformatf("ch%0d rx_div %0d", i, rx_div[i]));
    end
    for (int i = 0; i < NCH; i++) begin
      measure(i, 0, want_tx[i]);
      measure(i, 1, want_rx[i]);
    end
    // Reprogram channel 2 to 38400 baud.
    @(negedge clk); wr = 1; ch = 2; sel_rx = 0; wdata = 1302;
    @(negedge clk); sel_rx = 1; wdata = 81;
    @(negedge clk); wr = 0;
    check(tx_div[2] == 1302 && rx_div[2] == 81, "ch2 divisors written");
    for (int i = 0; i < NCH; i++)
      if (i != 2) check(tx_div[i] == want_tx[i] && rx_div[i] == 16'(want_rx[i]), $sformatf("ch%0d unchanged", i));
    measure(2, 0, 1302); measure(2, 0, 1302);
    measure(2, 1, 81);   measure(2, 1, 81);
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
