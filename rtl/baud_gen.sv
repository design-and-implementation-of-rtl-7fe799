// Timing reference for the UART macros: a one-clock pulse, en_16_x_baud, at
// sixteen times the serial bit rate.
//
// The serial link runs at 9600 baud, 8 data bits, no parity, one stop bit.
// The pulse comes from a counter that wraps every DIV clocks, with
// DIV = round(CLK_HZ / (16 * BAUD)); at the assumed 50 MHz board clock this
// is 326, a rate error of 0.15 %.  The baud rate is the specification's; the
// clock frequency and the counter are this design's choices.
module baud_gen #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic clk,
  input  logic rst,
  output logic en_16_x_baud
);
  localparam int unsigned DIV = (CLK_HZ + 8 * BAUD) / (16 * BAUD);
  localparam int unsigned CW  = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt          <= '0;
      en_16_x_baud <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt          <= '0;
      en_16_x_baud <= 1'b1;
    end else begin
      cnt          <= cnt + 1'b1;
      en_16_x_baud <= 1'b0;
    end
  end
endmodule
