// tb_uart_rx: self-checking test of the 16x-oversampling UART receiver.
//
// The receiver's enable pulses every R cycles, so a bit lasts 16*R cycles.
// The test sends frames bit by bit on rx (start 0, data LSB first, stop 1),
// with idle gaps and also back to back, and checks after each frame that
// data holds the byte, rdy is set, done pulsed once, and that rdy_clr clears
// rdy. rdy must rise no later than one bit time after the middle of the
// stop bit. The last two frames are sent with a shortened stop bit, so the
// receiver must leave its stop state early to catch the second one.
module tb_uart_rx;
  localparam int R = 3;
  localparam int BIT = 16 * R;

  logic clk = 0, rst_n = 0, rx = 1, clken = 0, rdy_clr = 0;
  logic rdy, done;
  logic [7:0] data;
  int checks = 0, failures = 0, cyc = 0, done_count = 0;

  uart_rx dut (.clk, .rst_n, .rx, .clken, .rdy_clr, .rdy, .data, .done);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    clken <= ((cyc % R) == R - 1);
    if (done) done_count <= done_count + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Sends a frame; returns after the first half of the stop bit.
  task automatic send_frame(input logic [7:0] b);
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};
    for (int i = 0; i < 9; i++) begin
      rx = frame[i];
      repeat (BIT) @(negedge clk);
    end
    rx = 1'b1;
    repeat (BIT / 2 - 2 * R) @(negedge clk);
  endtask

  task automatic expect_byte(input logic [7:0] b, input int n_before);
    int waited = 0;
    while (!rdy && waited < BIT) begin @(negedge clk); waited++; end
    check(rdy, $sformatf("rdy for byte %02h", b));
    check(data == b, $sformatf("data %02h want %02h", data, b));
    @(negedge clk);
    check(done_count == n_before + 1, "one done pulse per frame");
  endtask

  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (BIT) @(negedge clk);
    check(!rdy, "rdy low after reset");
    for (int k = 0; k < 20; k++) begin
      logic [7:0] b;
      b = (k == 0) ? 8'h00 : (k == 1) ? 8'hFF : 8'($urandom);
      n = done_count;
      send_frame(b);
      expect_byte(b, n);
      rdy_clr = 1; @(negedge clk); rdy_clr = 0; @(negedge clk);
      check(!rdy, "rdy cleared by rdy_clr");
      // Finish the stop bit, then idle for a random time or none.
      repeat (BIT / 2 + ((k % 3 == 0) ? 0 : int'($urandom % BIT))) @(negedge clk);
    end
    // Stop bit cut short by the next start bit (early exit from stop).
    n = done_count;
    send_frame(8'h3C);
    expect_byte(8'h3C, n);
    rdy_clr = 1; @(negedge clk); rdy_clr = 0;
    n = done_count;
    send_frame(8'hC3);
    expect_byte(8'hC3, n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
