// UART receive macro: a deserialiser followed by a byte buffer.
//
// Ports as in the receive macro the exerciser uses: serial_in is the line
// from the PC, en_16_x_baud the timing reference (16 pulses per bit),
// dout the oldest received byte, data_present high while the buffer holds a
// byte, read removes it, buffer_full says the buffer cannot take another.
// Frames are 8N1.  The line is synchronised, a falling edge starts a frame,
// the start bit is re-checked 8 pulses later (mid-bit) and every following
// bit is sampled 16 pulses after the previous one.  A byte whose stop bit is
// low is discarded as a framing error, and a byte that arrives while the
// buffer is full is lost.  reset_buffer empties the buffer and restarts the
// deserialiser.  Depth and sampling scheme are this design's choices.
module uart_rx #(
  parameter int unsigned DEPTH = 16
) (
  input  logic       clk,
  input  logic       reset_buffer,
  input  logic       serial_in,
  input  logic       en_16_x_baud,
  input  logic       read,
  output logic [7:0] dout,
  output logic       buffer_full,
  output logic       data_present
);
  logic rxd, rxd_q;
  logic empty;
  logic push;
  logic [7:0] shreg;

  bit_sync #(.RESET_VAL(1'b1)) u_sync (
    .clk(clk), .rst(reset_buffer), .d(serial_in), .q(rxd));

  sync_fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_fifo (
    .clk(clk), .clr(reset_buffer), .wr(push), .din(shreg), .rd(read),
    .dout(dout), .full(buffer_full), .empty(empty));

  assign data_present = !empty;

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;
  rx_state_e  state;
  logic [3:0] tick;
  logic [2:0] nbit;

  always_ff @(posedge clk) begin
    push  <= 1'b0;
    rxd_q <= rxd;
    if (reset_buffer) begin
      state <= RX_IDLE;
      tick  <= '0;
      nbit  <= '0;
      shreg <= '0;
      rxd_q <= 1'b1;
    end else begin
      case (state)
        RX_IDLE: begin
          tick <= '0;
          if (rxd_q && !rxd) state <= RX_START;  // falling edge
        end
        RX_START: if (en_16_x_baud) begin
          tick <= tick + 1'b1;
          if (tick == 4'd7) begin
            tick  <= '0;
            nbit  <= '0;
            state <= rxd ? RX_IDLE : RX_DATA;  // glitch, not a start bit
          end
        end
        RX_DATA: if (en_16_x_baud) begin
          tick <= tick + 1'b1;
          if (tick == 4'd15) begin
            shreg <= {rxd, shreg[7:1]};
            nbit  <= nbit + 1'b1;
            if (nbit == 3'd7) state <= RX_STOP;
          end
        end
        RX_STOP: if (en_16_x_baud) begin
          tick <= tick + 1'b1;
          if (tick == 4'd15) begin
            push  <= rxd;
            state <= RX_IDLE;
          end
        end
        default: state <= RX_IDLE;
      endcase
    end
  end
endmodule
