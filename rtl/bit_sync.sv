// Two-flip-flop synchroniser for a signal that changes without regard to the
// local clock, such as a VMEbus handshake line or the serial input.
// q follows d two clock edges later.  Both stages reset to RESET_VAL so an
// idle-high bus line does not look asserted after reset.
//
// The synchroniser is this design's own addition; the exerciser's
// specification does not say how asynchronous inputs are sampled.
module bit_sync #(
  parameter logic RESET_VAL = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
