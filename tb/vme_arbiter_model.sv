// Behavioural level-3 arbiter of a VMEbus system controller for the
// testbenches: after GRANT_DELAY clocks of BR3* low with BBSY* high it drives
// BG3IN* low, and takes the grant away DROP_DELAY clocks after BBSY* falls.
// hold_off keeps the bus "owned by another master" (no grant) while high.
//
// The arbiter is a simple stand-in of this design's testbenches; the
// specification only says the system controller arbitrates.
module vme_arbiter_model #(
  parameter int GRANT_DELAY = 5,
  parameter int DROP_DELAY  = 2
) (
  input  logic clk,
  input  logic hold_off,
  input  logic br3_n,
  input  logic bbsy_n,
  output logic bg3in_n
);
  int cnt;
  int n_grants;
  initial begin bg3in_n = 1'b1; cnt = 0; n_grants = 0; end
  always @(posedge clk) begin
    if (bg3in_n) begin
      if (!br3_n && bbsy_n && !hold_off) begin
        cnt++;
        if (cnt >= GRANT_DELAY) begin bg3in_n <= 1'b0; cnt = 0; n_grants++; end
      end else cnt = 0;
    end else begin
      if (!bbsy_n) begin
        cnt++;
        if (cnt >= DROP_DELAY) begin bg3in_n <= 1'b1; cnt = 0; end
      end
    end
  end
endmodule
