// status_detector: full-flag detector of an asynchronous FIFO.
//
// Works on Gray-coded pointers that carry one extra wrap bit (AW+1 bits for
// 2**AW entries). The FIFO is full when the write pointer, after the write
// being made, has wrapped once more than the read pointer: in Gray code that
// is the two top bits inverted and all lower bits equal. rgray_sync is the
// read pointer already synchronised into the write clock domain, so the flag
// may stay set a few write-clock cycles after a read (a safe, pessimistic
// full). Purely combinational; the FIFO registers the result. The Gray-code
// method is this design's choice; the document names the block and its Full
// output only.
module status_detector #(
  parameter int unsigned AW = 4
) (
  input  logic [AW:0] wgray_next,
  input  logic [AW:0] rgray_sync,
  output logic        full
);

  assign full = (wgray_next == {~rgray_sync[AW:AW-1], rgray_sync[AW-2:0]});

endmodule
