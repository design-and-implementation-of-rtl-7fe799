// UART transmit macro: a byte buffer followed by a serialiser.
//
// Ports as in the transmit macro the exerciser uses: din and write put a byte
// into the first-in first-out buffer, buffer_full says that another write
// would be lost, serial_out is the line to the PC's RS-232 port, and
// en_16_x_baud is the timing reference (one clock pulse at 16 x the bit rate).
// Frames are 8N1: a low start bit, eight data bits least significant first,
// a high stop bit, each 16 reference pulses long.  reset_buffer empties the
// buffer and returns the serialiser to idle (line high).
// The buffer depth of 16 and the internal structure are this design's own.
module uart_tx #(
  parameter int unsigned DEPTH = 16
) (
  input  logic       clk,
  input  logic       reset_buffer,
  input  logic [7:0] din,
  input  logic       write,
  input  logic       en_16_x_baud,
  output logic       buffer_full,
  output logic       serial_out
);
  logic [7:0] head;
  logic       empty, pop;

  sync_fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_fifo (
    .clk(clk), .clr(reset_buffer), .wr(write), .din(din), .rd(pop),
    .dout(head), .full(buffer_full), .empty(empty));

  // bit_idx: 0 = start bit, 1..8 = data bits, 9 = stop bit
  logic       busy;
  logic [3:0] tick;
  logic [3:0] bit_idx;
  logic [7:0] shreg;

  assign pop = !busy && !empty;

  always_ff @(posedge clk) begin
    if (reset_buffer) begin
      busy       <= 1'b0;
      tick       <= '0;
      bit_idx    <= '0;
      shreg      <= '0;
      serial_out <= 1'b1;
    end else if (pop) begin
      busy       <= 1'b1;
      tick       <= '0;
      bit_idx    <= '0;
      shreg      <= head;
      serial_out <= 1'b0;  // start bit
    end else if (busy && en_16_x_baud) begin
      tick <= tick + 1'b1;
      if (tick == 4'd15) begin
        if (bit_idx == 4'd9) begin
          busy       <= 1'b0;
          serial_out <= 1'b1;
        end else begin
          bit_idx <= bit_idx + 1'b1;
          if (bit_idx == 4'd8) begin
            serial_out <= 1'b1;  // stop bit
          end else begin
            serial_out <= shreg[0];
            shreg      <= {1'b0, shreg[7:1]};
          end
        end
      end
    end
  end
endmodule
