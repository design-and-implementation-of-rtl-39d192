// tb_status_detector: exhaustive check of the FIFO full detector.
//
// For AW = 4 (16 entries) every pair of binary pointers is tried. The
// expected flag is worked out in binary, independently of Gray code: full
// when the write pointer is exactly 16 ahead of the read pointer (modulo
// 32). The pointers are converted to Gray code here before being applied.
module tb_status_detector;
  localparam int AW = 4;
  logic [AW:0] wgray_next, rgray_sync;
  logic full;
  int checks = 0, failures = 0;

  status_detector #(.AW(AW)) dut (.wgray_next, .rgray_sync, .full);

  initial begin
    for (int w = 0; w < 2 ** (AW + 1); w++) begin
      for (int r = 0; r < 2 ** (AW + 1); r++) begin
        logic [AW:0] wb, rb;
        bit want;
        wb = (AW+1)'(w); rb = (AW+1)'(r);
        wgray_next = wb ^ (wb >> 1);
        rgray_sync = rb ^ (rb >> 1);
        want = ((AW+1)'(wb - rb) == (AW+1)'(2 ** AW));
        #1;
        checks++;
        if (full !== want) begin
          failures++;
          $display("FAIL: w=%0d r=%0d full=%0b want %0b", w, r, full, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
