// Status display on the daughter-card's LEDs and four-digit 7-segment
// display.
//
// The left-most LED (led[7]) lights when the last cycle completed
// successfully, as the exerciser's functional tests use it.  led[6] lights
// after a bus error; this is this design's addition, the other LEDs stay off.
// The display shows read data in hexadecimal: the low 16 bits, or the high
// 16 bits while show_high is set (a slide switch), so that a D32 read can be
// seen in two halves; this split is this design's choice.
// The four digits share the segment lines and are lit one at a time for
// DIGIT_CYC clocks each (1 ms at the assumed 50 MHz clock).  Segments
// seg_n = {dp, g, f, e, d, c, b, a} and digit enables an_n (an_n[3] is the
// left-most digit) are active low, as on common-anode displays.  The decimal
// point stays off.  All outputs are registered.
module status_display #(
  parameter int unsigned DIGIT_CYC = 50_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cycle_ok,
  input  logic        cycle_berr,
  input  logic [31:0] rdata,
  input  logic        show_high,
  output logic [7:0]  led,
  output logic [7:0]  seg_n,
  output logic [3:0]  an_n
);
  localparam int unsigned CW = (DIGIT_CYC > 1) ? $clog2(DIGIT_CYC) : 1;

  logic [CW-1:0] cnt;
  logic [1:0]    digit;
  logic [15:0]   shown;
  logic [3:0]    nib;

  // segments {g,f,e,d,c,b,a}, active high, for one hexadecimal digit
  function automatic logic [6:0] hex7(logic [3:0] h);
    case (h)
      4'h0: return 7'b0111111;
      4'h1: return 7'b0000110;
      4'h2: return 7'b1011011;
      4'h3: return 7'b1001111;
      4'h4: return 7'b1100110;
      4'h5: return 7'b1101101;
      4'h6: return 7'b1111101;
      4'h7: return 7'b0000111;
      4'h8: return 7'b1111111;
      4'h9: return 7'b1101111;
      4'hA: return 7'b1110111;
      4'hB: return 7'b1111100;
      4'hC: return 7'b0111001;
      4'hD: return 7'b1011110;
      4'hE: return 7'b1111001;
      default: return 7'b1110001;  // F
    endcase
  endfunction

  assign shown = show_high ? rdata[31:16] : rdata[15:0];
  assign nib   = shown[{digit, 2'b00} +: 4];

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      digit <= '0;
      led   <= '0;
      seg_n <= '1;
      an_n  <= '1;
    end else begin
      if (cnt == CW'(DIGIT_CYC - 1)) begin
        cnt   <= '0;
        digit <= digit + 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
      led   <= {cycle_ok, cycle_berr, 6'b000000};
      seg_n <= {1'b1, ~hex7(nib)};
      an_n  <= ~(4'b0001 << digit);
    end
  end
endmodule
