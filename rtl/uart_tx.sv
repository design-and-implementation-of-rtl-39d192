// uart_tx: UART transmitter (transmit shift register and its state machine).
//
// Sends one frame per wr_en: a low start bit, eight data bits least
// significant first, and a high stop bit, advancing one bit on each clken
// pulse (clken comes from the baud rate generator at the bit rate).
// The four states STATE_IDLE, STATE_START, STATE_DATA and STATE_STOP and
// their conditions follow the transmitter flow chart: in STATE_IDLE din is
// loaded into the data register and bitpos cleared when wr_en is high; in
// STATE_START tx goes low on clken; STATE_DATA shifts out bits until bitpos
// has reached 7; STATE_STOP drives tx high on clken and returns to idle.
// tx_busy is high in every state but STATE_IDLE. The bit order, the reset
// state and ignoring wr_en while busy are this design's choices.
//
// Timing: wr_en is taken on the clock edge where it is high and the state is
// idle; the start bit appears on the first clken after that, so a frame lasts
// 10 clken periods plus up to one period of waiting for the first clken.
module uart_tx
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] din,
  input  logic       wr_en,
  input  logic       clken,
  output logic       tx,
  output logic       tx_busy
);

  tx_state_e  state;
  logic [7:0] data;
  logic [2:0] bitpos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= STATE_IDLE;
      data   <= '0;
      bitpos <= '0;
      tx     <= 1'b1;
    end else begin
      unique case (state)
        STATE_IDLE: begin
          if (wr_en) begin
            data   <= din;
            bitpos <= '0;
            state  <= STATE_START;
          end
        end
        STATE_START: begin
          if (clken) begin
            tx    <= 1'b0;
            state <= STATE_DATA;
          end
        end
        STATE_DATA: begin
          if (clken) begin
            tx     <= data[bitpos];
            bitpos <= bitpos + 3'd1;
            if (bitpos == 3'd7) state <= STATE_STOP;
          end
        end
        STATE_STOP: begin
          if (clken) begin
            tx    <= 1'b1;
            state <= STATE_IDLE;
          end
        end
        default: state <= STATE_IDLE;
      endcase
    end
  end

  assign tx_busy = (state != STATE_IDLE);

endmodule
