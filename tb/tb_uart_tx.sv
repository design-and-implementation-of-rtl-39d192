// tb_uart_tx: self-checking test of the UART transmitter.
//
// A clock enable pulses every BIT cycles. For a set of random bytes (and
// 0x00/0xFF) the test starts a frame with wr_en, finds the falling start
// edge, samples tx in the middle of every bit and compares with the frame
// built from the byte here (start 0, data LSB first, stop 1). It also checks
// that tx_busy falls exactly 9 bit periods after the start edge (start bit
// plus 8 data bits) and that a wr_en while busy is ignored.
module tb_uart_tx;
  localparam int BIT = 8;

  logic clk = 0, rst_n = 0, wr_en = 0, clken = 0;
  logic [7:0] din = 0;
  logic tx, tx_busy;
  int checks = 0, failures = 0, cyc = 0;

  uart_tx dut (.clk, .rst_n, .din, .wr_en, .clken, .tx, .tx_busy);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    clken <= ((cyc % BIT) == BIT - 1);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_and_check(input logic [7:0] b);
    int t0, t1;
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};
    @(negedge clk); din = b; wr_en = 1;
    @(negedge clk); wr_en = 0; din = ~b;   // din may change after the load
    check(tx_busy, "tx_busy after wr_en");
    while (tx) @(negedge clk);
    t0 = cyc;
    repeat (BIT/2) @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      check(tx == frame[i], $sformatf("byte %02h bit %0d", b, i));
      if (i == 3) begin
        // A write while busy must not disturb the frame.
        wr_en = 1; din = 8'h5A; @(negedge clk); wr_en = 0;
        repeat (BIT - 1) @(negedge clk);
      end else begin
        repeat (BIT) @(negedge clk);
      end
    end
    check(!tx_busy, "tx_busy low after stop bit");
    // Measure the busy length for the next frame.
    @(negedge clk); din = b; wr_en = 1;
    @(negedge clk); wr_en = 0;
    while (tx) @(negedge clk);
    t0 = cyc;
    while (tx_busy) @(negedge clk);
    t1 = cyc;
    check(t1 - t0 == 9 * BIT, $sformatf("busy %0d cycles after start, want %0d", t1 - t0, 9 * BIT));
    repeat (BIT + 1) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(tx == 1 && !tx_busy, "idle after reset");
    send_and_check(8'h00);
    send_and_check(8'hFF);
    send_and_check(8'hA5);
    for (int k = 0; k < 12; k++) send_and_check(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
