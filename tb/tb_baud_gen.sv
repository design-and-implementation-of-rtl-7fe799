// Testbench for baud_gen at the default 50 MHz clock and 9600 baud: the
// en_16_x_baud pulse must be one clock wide and come every
// round(50e6 / (16 * 9600)) = 326 clocks; the derived bit rate,
// 50e6 / (16 * 326) = 9586 baud, is within 0.2 % of 9600.
// A second instance at 153600 baud must give 20 clocks.
//
// The 9600 baud rate is the exerciser's line setting; the 50 MHz clock and
// the rounding of the divider are this design's choices.
module tb_baud_gen;
  logic clk = 1'b0, rst = 1'b1;
  logic en, en2;
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  baud_gen dut (.clk(clk), .rst(rst), .en_16_x_baud(en));
  baud_gen #(.CLK_HZ(50_000_000), .BAUD(153_600)) dut2 (.clk(clk), .rst(rst), .en_16_x_baud(en2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc, last, last2, npulse;
  always @(negedge clk) if (!rst) begin
    cyc++;
    if (en) begin
      if (last >= 0) check(cyc - last == 326, $sformatf("period %0d", cyc - last));
      last = cyc;
      npulse++;
    end
    if (en2) begin
      if (last2 >= 0) check(cyc - last2 == 20, $sformatf("period2 %0d", cyc - last2));
      last2 = cyc;
    end
  end

  initial begin
    last = -1; last2 = -1; cyc = 0; npulse = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    while (npulse < 12) @(negedge clk);
    check(last2 > 0, "second instance pulsed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
