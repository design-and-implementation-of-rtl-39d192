// async_fifo: dual-clock FIFO between two UART clock domains.
//
// A 2**AW-entry memory written in the wclk domain and read in the rclk
// domain. Binary pointers with one wrap bit are kept in each domain and
// converted to Gray code; each Gray pointer crosses to the other domain
// through two flip-flops. The write side takes its Full flag from a
// status_detector; the read side is empty when its Gray pointer equals the
// synchronised write pointer. Both flags are registered.
//
// Interface: a write with wr while full, or a read with rd while empty, is
// ignored. The read port shows ahead: rdata is the oldest entry whenever
// empty is low, and rd removes it. Depth, show-ahead reading and the
// Gray-code scheme are this design's choices.
//
// Timing: a written word becomes visible on the read side 2-3 rclk cycles
// later; a freed slot reaches the write side 2-3 wclk cycles later.
module async_fifo #(
  parameter int unsigned DW = 8,
  parameter int unsigned AW = 4
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr,
  input  logic [DW-1:0] wdata,
  output logic          full,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd,
  output logic [DW-1:0] rdata,
  output logic          empty
);

  localparam int unsigned DEPTH = 1 << AW;

  logic [DW-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in read domain
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in write domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write domain.
  logic        do_wr, full_next;
  logic [AW:0] wbin_next, wgray_next;

  assign do_wr      = wr && !full;
  assign wbin_next  = wbin + (AW+1)'(do_wr);
  assign wgray_next = bin2gray(wbin_next);

  status_detector #(.AW(AW)) u_full (
    .wgray_next(wgray_next),
    .rgray_sync(rgray_w2),
    .full      (full_next)
  );

  always_ff @(posedge wclk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      full     <= 1'b0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= wgray_next;
      full     <= full_next;
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // Read domain.
  logic        do_rd;
  logic [AW:0] rbin_next, rgray_next;

  assign do_rd      = rd && !empty;
  assign rbin_next  = rbin + (AW+1)'(do_rd);
  assign rgray_next = bin2gray(rbin_next);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      empty    <= 1'b1;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= rgray_next;
      empty    <= (rgray_next == wgray_r2);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  assign rdata = mem[rbin[AW-1:0]];

endmodule
