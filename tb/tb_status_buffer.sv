// tb_status_buffer: self-checking test of the FIFO output holding stage.
//
// A FIFO is modelled here as a queue with a show-ahead head word and an
// empty flag. The consumer takes words at random times (only when valid is
// high, as the stage requires). Every word taken must be the next one in
// order, none may be lost or repeated, the stage must never pop an empty
// FIFO, and with a consumer that takes every cycle it must pass one word
// per cycle.
module tb_status_buffer;
  localparam int DW = 8, N = 300;
  logic clk = 0, rst_n = 0, take = 0;
  logic fifo_empty, fifo_rd, valid;
  logic [DW-1:0] fifo_data, data;
  logic [DW-1:0] q[$];
  int checks = 0, failures = 0, n_taken = 0, next_exp = 0;

  status_buffer #(.DW(DW)) dut (.clk, .rst_n, .fifo_empty, .fifo_data, .fifo_rd, .valid, .data, .take);

  always #5 clk = ~clk;

  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = (q.size() != 0) ? q[0] : '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int pushed = 0;
  // Sample the handshake at the clock edge, update the model just after it.
  always @(posedge clk) begin
    bit p, t;
    logic [DW-1:0] d;
    p = fifo_rd; t = take; d = data;
    #1;
    if (rst_n) begin
      if (p) begin
        check(q.size() != 0, "pop from non-empty FIFO only");
        void'(q.pop_front());
      end
      if (t) begin
        check(d == DW'(next_exp), $sformatf("took %0d want %0d", d, next_exp));
        next_exp++;
        n_taken++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!valid, "empty after reset");
    for (int i = 0; i < 64; i++) q.push_back(DW'(pushed++));
    // Random consumer.
    while (n_taken < 150) begin
      @(negedge clk);
      take = valid && ($urandom % 2 == 0);
      if ($urandom % 3 == 0 && pushed < N) q.push_back(DW'(pushed++));
    end
    @(negedge clk); take = 0;
    // Full-rate consumer: one word per cycle.
    while (pushed < N) q.push_back(DW'(pushed++));
    @(negedge clk);
    begin
      int t0, n0;
      t0 = 0; n0 = n_taken;
      while (n_taken < N - 10) begin
        take = valid;
        @(negedge clk);
        t0++;
      end
      check(n_taken - n0 == t0, $sformatf("%0d words in %0d cycles", n_taken - n0, t0));
    end
    take = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
