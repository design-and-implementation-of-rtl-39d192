// status_buffer: one-word holding stage behind an asynchronous FIFO.
//
// When the FIFO is not empty and the buffer is free, the buffer pops the
// FIFO's head word (fifo_rd) and holds it with valid high until the consumer
// pulses take. A take and a refill may happen in the same cycle, so a
// steady stream passes one word per cycle. This lets the consumer (a UART
// Transmit Buffer) see a plain valid/data pair that does not depend on the
// FIFO's flags. The function is this design's reading of a block the
// document only names.
module status_buffer #(
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          fifo_empty,
  input  logic [DW-1:0] fifo_data,
  output logic          fifo_rd,
  output logic          valid,
  output logic [DW-1:0] data,
  input  logic          take
);

  assign fifo_rd = !fifo_empty && (!valid || take);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      data  <= '0;
    end else if (fifo_rd) begin
      valid <= 1'b1;
      data  <= fifo_data;
    end else if (take) begin
      valid <= 1'b0;
    end
  end

  // The consumer may only take a word that is there.
  a_take_valid: assert property (@(posedge clk) disable iff (!rst_n) take |-> valid);

endmodule
