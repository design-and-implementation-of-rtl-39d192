// tb_fifo_block: self-checking test of the COM <-> COM1 FIFO block.
//
// Side a (the PC's COM UART) runs on a 10-unit clock, side b (COM1) on a
// 26-unit clock. On each side the test models the UART: a Receive Buffer
// that offers a new random byte (rx_rdy/rx_data) until the block takes it,
// and a Transmit Buffer that is busy (tx_full) for a random number of
// cycles after each byte written into it. Bytes must arrive at the far side
// complete and in order in both directions. Side b's transmitter is held
// busy for a while so that FIFO11 fills: Full11 must rise and the byte
// must wait in the Receive Buffer (back-pressure) without being lost.
module tb_fifo_block;
  localparam int N = 120;
  logic clk_a = 0, clk_b = 0, rst_a_n = 0, rst_b_n = 0;
  logic a_rx_rdy = 0, a_tx_full = 0, b_rx_rdy = 0, b_tx_full = 0;
  logic [7:0] a_rx_data = 0, b_rx_data = 0, a_tx_data, b_tx_data;
  logic a_rx_rd, a_tx_wr, b_rx_rd, b_tx_wr;
  logic full11, empty11, full12, empty12;
  int checks = 0, failures = 0;
  logic [7:0] q_ab[$], q_ba[$];
  int sent_ab = 0, sent_ba = 0, got_ab = 0, got_ba = 0, full11_seen = 0;
  bit hold_b = 1;

  fifo_block #(.AW(4)) dut (.*);

  always #5 clk_a = ~clk_a;
  always #13 clk_b = ~clk_b;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Side a: COM receive buffer (source of a->b) and transmit buffer (sink of b->a).
  int a_busy = 0;
  always @(posedge clk_a) begin
    bit rd, wr; logic [7:0] d;
    rd = a_rx_rd; wr = a_tx_wr; d = a_tx_data;
    #1;
    if (rst_a_n) begin
      if (rd) begin
        check(a_rx_rdy, "a: take only a ready byte");
        q_ab.push_back(a_rx_data);
        sent_ab++;
        a_rx_rdy = 0;
      end
      if (!a_rx_rdy && sent_ab < N && ($urandom % 2 == 0)) begin
        a_rx_rdy = 1; a_rx_data = 8'($urandom);
      end
      if (wr) begin
        check(!a_tx_full, "a: write only a free transmit buffer");
        check(q_ba.size() > 0 && d == q_ba[0], $sformatf("b->a byte %0d", got_ba));
        if (q_ba.size() > 0) void'(q_ba.pop_front());
        got_ba++;
        a_busy = $urandom % 6;
      end
      a_tx_full = (a_busy > 0);
      if (a_busy > 0) a_busy--;
      if (full11) full11_seen++;
    end
  end

  // Side b: COM1 receive buffer (source of b->a) and transmit buffer (sink of a->b).
  int b_busy = 0;
  always @(posedge clk_b) begin
    bit rd, wr; logic [7:0] d;
    rd = b_rx_rd; wr = b_tx_wr; d = b_tx_data;
    #1;
    if (rst_b_n) begin
      if (rd) begin
        check(b_rx_rdy, "b: take only a ready byte");
        q_ba.push_back(b_rx_data);
        sent_ba++;
        b_rx_rdy = 0;
      end
      if (!b_rx_rdy && sent_ba < N && ($urandom % 3 == 0)) begin
        b_rx_rdy = 1; b_rx_data = 8'($urandom);
      end
      if (wr) begin
        check(!b_tx_full, "b: write only a free transmit buffer");
        check(q_ab.size() > 0 && d == q_ab[0], $sformatf("a->b byte %0d", got_ab));
        if (q_ab.size() > 0) void'(q_ab.pop_front());
        got_ab++;
        b_busy = $urandom % 4;
      end
      b_tx_full = hold_b || (b_busy > 0);
      if (b_busy > 0) b_busy--;
    end
  end

  initial begin
    repeat (3) @(negedge clk_b);
    rst_a_n = 1; rst_b_n = 1;
    @(negedge clk_a);
    check(empty11 && empty12 && !full11 && !full12, "flags after reset");
    // Hold COM1's transmitter until FIFO11 (16) and the status buffer (1) are full.
    wait (full11);
    repeat (50) @(negedge clk_a);
    check(sent_ab == 17 && a_rx_rdy, $sformatf("back-pressure: %0d bytes taken", sent_ab));
    hold_b = 0;
    wait (got_ab == N && got_ba == N);
    repeat (20) @(negedge clk_b);
    check(empty11 && empty12, "both FIFOs empty at the end");
    check(full11_seen > 0, "Full11 reached");
    $display("a->b %0d bytes, b->a %0d bytes", got_ab, got_ba);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
