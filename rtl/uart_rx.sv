// uart_rx: UART receiver (receive shift register, receive buffer and state
// machine) with 16x oversampling.
//
// clken pulses 16 times per bit. A 4-bit sample counter times each bit:
// RX_STATE_START counts samples while rx is low (or once counting has begun)
// and after 16 samples enters RX_STATE_DATA with bitpos, sample and the shift
// register (scratch) cleared. RX_STATE_DATA stores rx into scratch[bitpos] at
// sample 8, the middle of the bit, and after eight bits and sample 15 goes
// to RX_STATE_STOP. RX_STATE_STOP waits for sample 15, or leaves early from
// sample 8 on if rx is already low again (the next start bit); it then copies
// scratch into the receive buffer data, raises rdy and returns to
// RX_STATE_START. States and conditions follow the receiver flow chart.
//
// Interface: rdy stays high until rdy_clr; done is a one-cycle pulse on the
// clock edge after data was loaded (added here so a wrapper can detect an
// overrun). The stop bit's level is not checked, as in the flow chart.
module uart_rx
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  input  logic       clken,
  input  logic       rdy_clr,
  output logic       rdy,
  output logic [7:0] data,
  output logic       done
);

  rx_state_e  state;
  logic [3:0] sample;
  logic [3:0] bitpos;   // counts to 8
  logic [7:0] scratch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= RX_STATE_START;
      sample  <= '0;
      bitpos  <= '0;
      scratch <= '0;
      data    <= '0;
      rdy     <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (rdy_clr) rdy <= 1'b0;
      if (clken) begin
        unique case (state)
          RX_STATE_START: begin
            if (!rx || sample != 4'd0) sample <= sample + 4'd1;
            if (sample == 4'd15) begin
              state   <= RX_STATE_DATA;
              bitpos  <= '0;
              sample  <= '0;
              scratch <= '0;
            end
          end
          RX_STATE_DATA: begin
            sample <= sample + 4'd1;
            if (sample == 4'd8) begin
              scratch[bitpos[2:0]] <= rx;
              bitpos               <= bitpos + 4'd1;
            end
            if (bitpos == 4'd8 && sample == 4'd15) state <= RX_STATE_STOP;
          end
          RX_STATE_STOP: begin
            if (sample == 4'd15 || (sample >= 4'd8 && !rx)) begin
              state  <= RX_STATE_START;
              data   <= scratch;
              rdy    <= 1'b1;
              done   <= 1'b1;
              sample <= '0;
            end else begin
              sample <= sample + 4'd1;
            end
          end
          default: state <= RX_STATE_START;
        endcase
      end
    end
  end

endmodule
