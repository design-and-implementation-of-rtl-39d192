// tb_async_fifo: self-checking test of the dual-clock FIFO.
//
// Write clock period 10, read clock period 37 (unrelated), so the FIFO
// fills; in the second half the writer slows down, so the FIFO runs empty
// again and again. A writer pushes 200 random bytes whenever full is low (and with
// random pauses); a reader pops with random pauses. A queue kept here is the
// reference: every popped byte must be the oldest one pushed. The test also
// checks that the FIFO reports full at 16 entries (and never accepts a 17th)
// and that it is empty at reset and after draining.
module tb_async_fifo;
  localparam int DW = 8, AW = 4, N = 200;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0, wr = 0, rd = 0;
  logic [DW-1:0] wdata = 0, rdata;
  logic full, empty;
  int checks = 0, failures = 0, full_seen = 0;
  logic [DW-1:0] model[$];
  int n_wr = 0, n_rd = 0;

  async_fifo #(.DW(DW), .AW(AW)) dut (.wclk, .wrst_n, .wr, .wdata, .full, .rclk, .rrst_n, .rd, .rdata, .empty);

  always #5 wclk = ~wclk;
  always #18.5 rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Writer.
  initial begin
    repeat (3) @(negedge wclk);
    wrst_n = 1;
    while (n_wr < N) begin
      @(negedge wclk);
      wr = 0;
      // Second half: a slow writer, so that the reader keeps draining the
      // FIFO and the empty flag is exercised.
      if (n_wr >= N / 2) repeat (6 + $urandom % 10) @(negedge wclk);
      if (full) full_seen++;
      if (!full && ($urandom % 4 != 0)) begin
        wr = 1; wdata = 8'($urandom);
        model.push_back(wdata);
        n_wr++;
      end
    end
    @(negedge wclk); wr = 0;
  end

  // Reader: slow at first so that the FIFO fills.
  initial begin
    repeat (3) @(negedge rclk);
    rrst_n = 1;
    @(negedge rclk);
    check(empty, "empty after reset");
    repeat (40) @(negedge rclk);
    check(full && model.size() == 2 ** AW, $sformatf("full at %0d entries", model.size()));
    while (n_rd < N) begin
      @(negedge rclk);
      rd = 0;
      if (!empty && ($urandom % 3 != 0)) begin
        check(model.size() > 0 && rdata == model[0], $sformatf("pop %0d: %02h", n_rd, rdata));
        if (model.size() > 0) void'(model.pop_front());
        rd = 1;
        n_rd++;
      end
    end
    @(negedge rclk); rd = 0;
    repeat (4) @(negedge rclk);
    check(empty && model.size() == 0, "empty after draining");
    check(full_seen > 0, "full was reached");
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
