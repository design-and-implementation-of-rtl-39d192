// tb_baud_rate_gen: checks the period of both baud rate timers.
//
// For several divisor pairs, including the 9600-baud values for a 50 MHz
// clock (5208 and 326), the test counts the cycles between successive
// txclk_en and rxclk_en pulses and requires them to equal the divisors, and
// requires each pulse to last one cycle. It also changes the divisors on
// the fly and checks that the new period holds afterwards.
module tb_baud_rate_gen;
  logic clk = 0, rst_n = 0;
  logic [31:0] tx_div;
  logic [15:0] rx_div;
  logic txclk_en, rxclk_en;
  int checks = 0, failures = 0;

  baud_rate_gen dut (.clk, .rst_n, .tx_div, .rx_div, .txclk_en, .rxclk_en);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Measures n periods of an enable and compares with want.
  task automatic measure_tx(input int want, input int n);
    int c;
    while (!txclk_en) @(negedge clk);
    for (int k = 0; k < n; k++) begin
      c = 0;
      @(negedge clk); c++;
      if (want > 1) check(!txclk_en, "txclk_en one cycle wide");
      while (!txclk_en) begin @(negedge clk); c++; end
      check(c == want, $sformatf("tx period %0d want %0d", c, want));
    end
  endtask

  task automatic measure_rx(input int want, input int n);
    int c;
    while (!rxclk_en) @(negedge clk);
    for (int k = 0; k < n; k++) begin
      c = 0;
      @(negedge clk); c++;
      if (want > 1) check(!rxclk_en, "rxclk_en one cycle wide");
      while (!rxclk_en) begin @(negedge clk); c++; end
      check(c == want, $sformatf("rx period %0d want %0d", c, want));
    end
  endtask

  initial begin
    tx_div = 5208; rx_div = 326;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      measure_tx(5208, 3);
      measure_rx(326, 20);
    join
    tx_div = 434; rx_div = 27;     // 115200 baud at 50 MHz
    repeat (6000) @(negedge clk);
    fork
      measure_tx(434, 5);
      measure_rx(27, 30);
    join
    tx_div = 7; rx_div = 3;
    repeat (50) @(negedge clk);
    fork
      measure_tx(7, 10);
      measure_rx(3, 10);
    join
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
