// tb_uart: loopback test of the single-channel UART at its default setting
// (9600 baud from a 50 MHz clock).
//
// tx is wired back to rx. The test sends the bytes 0, 1, ..., 255 in turn:
// it writes a byte with wr_en, waits for rdy, compares dout with the byte,
// clears rdy with rdy_clr and moves on to the next value, ending after 255.
// For every byte it checks the time from wr_en to rdy: the receiver raises
// rdy at the end of the stop bit, so a frame takes 10 bit times of 5208
// cycles, plus up to one bit time of waiting for the first bit-rate enable
// (with 1/8 bit of slack for the receiver's 326-cycle sample period).
// tx_busy must be high while the frame is on the line.
module tb_uart;
  localparam int BIT = 5208;   // round(50e6 / 9600)

  logic clk_50m = 0, rst_n = 0, wr_en = 0, rdy_clr = 0;
  logic [7:0] din = 0, dout;
  logic rdy, tx, tx_busy, loopback;
  int checks = 0, failures = 0;
  int busy_seen = 0;

  assign loopback = tx;

  uart dut (.clk_50m, .rst_n, .din, .wr_en, .rdy_clr, .rx(loopback), .dout, .rdy, .tx, .tx_busy);

  always #10 clk_50m = ~clk_50m;   // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk_50m);
    rst_n = 1;
    repeat (10) @(negedge clk_50m);
    check(!rdy && !tx_busy && tx, "idle after reset");
    for (int data = 0; data < 256; data++) begin
      int t;
      t = 0;
      din = 8'(data); wr_en = 1;
      @(negedge clk_50m); wr_en = 0;
      while (!rdy && t < 12 * BIT) begin
        @(negedge clk_50m); t++;
        if (tx_busy) busy_seen++;
      end
      check(rdy, $sformatf("rdy for byte %0d", data));
      check(dout == 8'(data), $sformatf("rxdata %02h want %02h", dout, data));
      check(t >= 10 * BIT - BIT / 8 && t <= 11 * BIT + BIT / 8,
            $sformatf("byte %0d took %0d cycles", data, t));
      rdy_clr = 1; @(negedge clk_50m); rdy_clr = 0;
      @(negedge clk_50m);
      check(!rdy, "rdy cleared");
      while (tx_busy) @(negedge clk_50m);
    end
    check(busy_seen > 256 * 8 * BIT, "tx_busy high during frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (256 * 12 * BIT) @(posedge clk_50m);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
