// tb_mc_uart_top: end-to-end test of the multichannel UART controller at
// its default parameters (50 MHz clock, reset baud rates 115200 / 57600 /
// 19200 / 9600 / 9600).
//
// Serial models here play the PC on COM and the equipment on UART1..UART4;
// a bus model plays the local processor. Bit times are computed here from
// the baud rates (round(50e6/baud) cycles). The test checks:
//  1. baud conversion PC -> UART1: a burst from the PC at 115200 baud comes
//     out on UART1 at 57600 baud, complete and in order. Then, with UART1's
//     transmitter disabled, the PC sends until FIFO11 reports full and one
//     byte more, which must wait in COM's Receive Buffer (back-pressure);
//     once UART1 is enabled again every byte must come out in order;
//  2. baud conversion UART1 -> PC through FIFO22;
//  3. bus reads of the reset divisors and control registers;
//  4. bus transmit and receive on UART2..UART4 at their own rates, all
//     three running at the same time;
//  5. a baud-rate change of UART2 over the bus (to 38400 baud);
//  6. loopback mode on UART3;
//  7. overrun on UART4;
//  8. the stand-alone 9600-baud UART beside the controller, in loopback.
// Each mechanism is counted; one that never happened is a failure.
module tb_mc_uart_top;
  import uart_pkg::*;

  localparam int CLK_HZ = 50_000_000;
  function automatic int bit_cycles(int baud);
    return (CLK_HZ + baud / 2) / baud;
  endfunction

  logic clk = 0, rst_n = 0;
  logic bus_wr = 0, bus_rd = 0;
  logic [5:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic com_rxd = 1, com_txd;
  logic [3:0] ch_rxd = 4'hF, ch_txd, fifo_flags;
  logic [7:0] sc_din = 0, sc_dout;
  logic sc_wr_en = 0, sc_rdy_clr = 0, sc_rx, sc_rdy, sc_tx, sc_tx_busy;
  assign sc_rx = sc_tx;   // loopback of the stand-alone UART
  int checks = 0, failures = 0;

  int n_conv_ab = 0, n_conv_ba = 0, n_full11 = 0, n_backpressure = 0, n_bus_tx = 0,
      n_bus_rx = 0, n_baud_change = 0, n_loopback = 0, n_overrun = 0, n_single = 0;

  mc_uart_top dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- serial line models ----------------
  // line 0: COM, lines 1..4: UART1..UART4
  function automatic logic txd_of(int line);
    return (line == 0) ? com_txd : ch_txd[line-1];
  endfunction

  task automatic drive(int line, logic v);
    if (line == 0) com_rxd = v; else ch_rxd[line-1] = v;
  endtask

  task automatic send_serial(input int line, input int bitlen, input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      drive(line, f[i]);
      repeat (bitlen) @(negedge clk);
    end
  endtask

  // Waits for a frame on the line and decodes it; ok=0 on timeout or a
  // missing stop bit.
  task automatic recv_serial(input int line, input int bitlen, input int timeout,
                             output logic [7:0] b, output bit ok);
    int t;
    t = 0; ok = 0; b = '0;
    while (txd_of(line) && t < timeout) begin @(negedge clk); t++; end
    if (txd_of(line)) return;
    repeat (bitlen / 2) @(negedge clk);
    if (txd_of(line)) return;
    for (int i = 0; i < 8; i++) begin
      repeat (bitlen) @(negedge clk);
      b[i] = txd_of(line);
    end
    repeat (bitlen) @(negedge clk);
    ok = txd_of(line);
  endtask

  // ---------------- bus model ----------------
  // The bus is shared by concurrent threads: a semaphore serialises access.
  semaphore bus_lock = new(1);

  task automatic bus_write(input int ch, input logic [2:0] r, input logic [31:0] v);
    bus_lock.get(1);
    @(negedge clk);
    bus_wr = 1; bus_addr = {3'(ch), r}; bus_wdata = v;
    @(negedge clk);
    bus_wr = 0;
    bus_lock.put(1);
  endtask

  task automatic bus_read(input int ch, input logic [2:0] r, output logic [31:0] v);
    bus_lock.get(1);
    @(negedge clk);
    bus_rd = 1; bus_addr = {3'(ch), r};
    @(negedge clk);
    bus_rd = 0;
    v = bus_rdata;
    bus_lock.put(1);
  endtask

  // Polls STATUS until rx ready, then reads DATA.
  task automatic bus_get_byte(input int ch, input int timeout, output logic [7:0] b, output bit ok);
    logic [31:0] v;
    int t;
    t = 0; ok = 0;
    do begin
      bus_read(ch, REG_STATUS, v);
      t++;
    end while (!v[ST_RX_RDY] && t < timeout);
    if (!v[ST_RX_RDY]) return;
    bus_read(ch, REG_DATA, v);
    b = v[7:0];
    ok = 1;
  endtask

  task automatic bus_put_byte(input int ch, input logic [7:0] b);
    logic [31:0] v;
    do bus_read(ch, REG_STATUS, v); while (v[ST_TX_FULL]);
    bus_write(ch, REG_DATA, 32'(b));
  endtask

  always @(posedge clk) if (fifo_flags[0]) n_full11++;

  // One channel of UART2..UART4: send a byte to its equipment over the bus
  // and receive one from it, at the channel's reset baud rate.
  task automatic chan_test(input int ch);
    int bl;
    logic [7:0] b_out, b_in, b;
    bit ok;
    bl = bit_cycles(ch == 2 ? 19200 : 9600);
    b_out = 8'($urandom); b_in = 8'($urandom);
    fork
      bus_put_byte(ch, b_out);
      begin
        logic [7:0] bb;
        bit okk;
        recv_serial(ch, bl, 3 * bl, bb, okk);
        check(okk && bb == b_out, $sformatf("UART%0d tx %02h want %02h", ch, bb, b_out));
        if (okk && bb == b_out) n_bus_tx++;
      end
      send_serial(ch, bl, b_in);
    join
    bus_get_byte(ch, 2000, b, ok);
    check(ok && b == b_in, $sformatf("UART%0d rx %02h want %02h", ch, b, b_in));
    if (ok && b == b_in) n_bus_rx++;
  endtask

  // ---------------- test ----------------
  initial begin
    logic [31:0] v;
    int bit_com, bit_u1;
    bit_com = bit_cycles(115200);
    bit_u1  = bit_cycles(57600);

    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // 3. Reset values over the bus.
    begin
      automatic int bauds[5] = '{115200, 57600, 19200, 9600, 9600};
      for (int c = 0; c < 5; c++) begin
        bus_read(c, REG_TXDIV, v);
        check(v == 32'(bit_cycles(bauds[c])), $sformatf("ch%0d TXDIV %0d", c, v));
        bus_read(c, REG_RXDIV, v);
        check(v == 32'((CLK_HZ + 8 * bauds[c]) / (16 * bauds[c])), $sformatf("ch%0d RXDIV %0d", c, v));
        bus_read(c, REG_CTRL, v);
        check(v == 32'(CTRL_RESET), "CTRL reset value");
      end
    end

    // 1a. PC -> COM -> FIFO11 -> UART1 while both lines run: a burst of 24
    //     bytes at 115200 baud leaves at 57600 baud, so FIFO11 fills up.
    begin
      logic [7:0] sent[$];
      fork
        for (int k = 0; k < 24; k++) begin
          logic [7:0] b;
          b = 8'($urandom);
          sent.push_back(b);
          send_serial(0, bit_com, b);
        end
        for (int k = 0; k < 24; k++) begin
          logic [7:0] b;
          bit ok;
          recv_serial(1, bit_u1, 20 * bit_u1, b, ok);
          check(ok && k < sent.size() && b == sent[k], $sformatf("UART1 byte %0d = %02h", k, b));
          if (ok) n_conv_ab++;
        end
      join
    end

    // 1b. Back-pressure: with UART1's transmitter disabled over the bus, the
    //     PC sends until FIFO11 reports full, then one more byte, which must
    //     wait in COM's Receive Buffer. After re-enabling, every byte must
    //     come out on UART1 in order.
    begin
      logic [7:0] sent[$];
      int got;
      bus_write(1, REG_CTRL, 32'h02);
      while (!fifo_flags[0] && sent.size() < 40) begin
        logic [7:0] b;
        b = 8'($urandom);
        sent.push_back(b);
        send_serial(0, bit_com, b);
        repeat (bit_com) @(negedge clk);
      end
      check(sent.size() == 18, $sformatf("Full11 after %0d bytes (16 FIFO + status buffer + Transmit Buffer)", sent.size()));
      begin
        logic [7:0] b;
        b = 8'($urandom);
        sent.push_back(b);
        send_serial(0, bit_com, b);
      end
      repeat (2 * bit_com) @(negedge clk);
      bus_read(0, REG_STATUS, v);
      check(v[ST_RX_RDY] && v[4] && !v[ST_OVERRUN], "byte held in COM Receive Buffer while FIFO11 full");
      if (v[ST_RX_RDY] && v[4]) n_backpressure++;
      bus_write(1, REG_CTRL, 32'h03);
      got = 0;
      for (int k = 0; k < sent.size(); k++) begin
        logic [7:0] b;
        bit ok;
        recv_serial(1, bit_u1, 4 * bit_u1, b, ok);
        check(ok && b == sent[k], $sformatf("UART1 byte %0d after back-pressure = %02h", k, b));
        if (ok) begin got++; n_conv_ab++; end
      end
      check(got == sent.size(), $sformatf("UART1 got %0d of %0d bytes", got, sent.size()));
    end

    // 2. UART1 -> FIFO22 -> COM -> PC.
    begin
      logic [7:0] sent[$];
      fork
        begin
          for (int k = 0; k < 12; k++) begin
            logic [7:0] b;
            b = 8'($urandom);
            sent.push_back(b);
            send_serial(1, bit_u1, b);
          end
        end
        begin
          for (int k = 0; k < 12; k++) begin
            logic [7:0] b;
            bit ok;
            recv_serial(0, bit_com, 20 * bit_u1, b, ok);
            check(ok && k < sent.size() && b == sent[k], $sformatf("PC byte %0d = %02h", k, b));
            if (ok) n_conv_ba++;
          end
        end
      join
    end

    // 4. UART2..UART4 over the bus, all at once: each channel sends a byte to
    //    its equipment and receives one from it.
    fork
      chan_test(2);
      chan_test(3);
      chan_test(4);
    join

    // 5. Change UART2 to 38400 baud and exchange a byte at the new rate.
    begin
      int bl;
      logic [7:0] b;
      bit ok;
      bl = bit_cycles(38400);
      bus_write(2, REG_TXDIV, 32'(bl));
      bus_write(2, REG_RXDIV, 32'((CLK_HZ + 8 * 38400) / (16 * 38400)));
      n_baud_change++;
      fork
        bus_put_byte(2, 8'hC6);
        begin
          recv_serial(2, bl, 3 * bl, b, ok);
          check(ok && b == 8'hC6, $sformatf("UART2 at 38400: %02h", b));
        end
      join
      send_serial(2, bl, 8'h39);
      bus_get_byte(2, 2000, b, ok);
      check(ok && b == 8'h39, $sformatf("UART2 rx at 38400: %02h", b));
    end

    // 6. Loopback on UART3.
    begin
      logic [7:0] b;
      bit ok;
      bus_write(3, REG_CTRL, 32'h07);
      bus_put_byte(3, 8'hA7);
      bus_get_byte(3, 40000, b, ok);
      check(ok && b == 8'hA7, $sformatf("UART3 loopback %02h", b));
      if (ok && b == 8'hA7) n_loopback++;
      bus_write(3, REG_CTRL, 32'h03);
    end

    // 7. Overrun on UART4.
    begin
      logic [7:0] b;
      bit ok;
      int bl;
      bl = bit_cycles(9600);
      send_serial(4, bl, 8'h01);
      send_serial(4, bl, 8'h02);
      repeat (bl) @(negedge clk);
      bus_read(4, REG_STATUS, v);
      check(v[ST_OVERRUN] && v[ST_RX_RDY], "UART4 overrun flagged");
      if (v[ST_OVERRUN]) n_overrun++;
      bus_get_byte(4, 10, b, ok);
      check(ok && b == 8'h02, "UART4 keeps newest byte");
      bus_read(4, REG_STATUS, v);
      check(!v[ST_OVERRUN] && !v[ST_RX_RDY], "UART4 overrun cleared by read");
    end

    // 8. Stand-alone UART in loopback: bytes 0..3.
    for (int d = 0; d < 4; d++) begin
      int t;
      @(negedge clk); sc_din = 8'(d); sc_wr_en = 1;
      @(negedge clk); sc_wr_en = 0;
      t = 0;
      while (!sc_rdy && t < 12 * bit_cycles(9600)) begin @(negedge clk); t++; end
      check(sc_rdy && sc_dout == 8'(d), $sformatf("single UART byte %0d: %02h", d, sc_dout));
      if (sc_rdy && sc_dout == 8'(d)) n_single++;
      @(negedge clk); sc_rdy_clr = 1; @(negedge clk); sc_rdy_clr = 0;
      while (sc_tx_busy) @(negedge clk);
    end

    // Every mechanism must have happened.
    $display("conversions PC->UART1 %0d, UART1->PC %0d; Full11 cycles %0d; back-pressure %0d",
             n_conv_ab, n_conv_ba, n_full11, n_backpressure);
    $display("bus tx %0d, bus rx %0d, baud change %0d, loopback %0d, overrun %0d",
             n_bus_tx, n_bus_rx, n_baud_change, n_loopback, n_overrun);
    $display("stand-alone UART loopback %0d", n_single);
    check(n_conv_ab > 16, "PC->UART1 conversion happened");
    check(n_conv_ba > 0, "UART1->PC conversion happened");
    check(n_full11 > 0, "FIFO11 full happened");
    check(n_backpressure > 0, "back-pressure happened");
    check(n_bus_tx == 3 && n_bus_rx == 3, "bus transfers on UART2..4 happened");
    check(n_baud_change > 0, "baud change happened");
    check(n_loopback > 0, "loopback happened");
    check(n_overrun > 0, "overrun happened");
    check(n_single == 4, "stand-alone UART loopback happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
