// Testbench for status_display with DIGIT_CYC = 5.  Checks the LEDs
// (led[7] = last cycle ok, led[6] = bus error, the rest off), that exactly
// one digit is enabled at a time, that each digit stays on for DIGIT_CYC
// clocks and the four take turns, and that the segments of each digit are
// the 7-segment pattern of the right hexadecimal digit of the low or high
// half of the data.  The expected patterns are listed here as a table.
//
// The use of the left-most LED and of the display for read data follows
// the specification; the bus-error LED and the scan order are this design's.
module tb_status_display;
  logic clk = 1'b0, rst = 1'b1;
  logic ok = 1'b0, be = 1'b0, hi = 1'b0;
  logic [31:0] rdata;
  logic [7:0] led, seg_n;
  logic [3:0] an_n;
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  status_display #(.DIGIT_CYC(5)) dut (
    .clk(clk), .rst(rst), .cycle_ok(ok), .cycle_berr(be), .rdata(rdata),
    .show_high(hi), .led(led), .seg_n(seg_n), .an_n(an_n));

  task automatic check(bit ok_, string what);
    checks++;
    if (!ok_) begin failures++; $display("FAIL: %s", what); end
  endtask

  // active-low {dp,g,f,e,d,c,b,a} for 0..F
  logic [7:0] pat [16] = '{8'hC0, 8'hF9, 8'hA4, 8'hB0, 8'h99, 8'h92, 8'h82, 8'hF8,
                           8'h80, 8'h90, 8'h88, 8'h83, 8'hC6, 8'hA1, 8'h86, 8'h8E};

  task automatic scan(logic [15:0] v);
    int seen [4];
    int run_len, last_an, nruns;
    for (int i = 0; i < 4; i++) seen[i] = 0;
    last_an = -1; run_len = 0; nruns = 0;
    repeat (45) begin
      @(negedge clk);
      check($countones(~an_n) == 1, "one digit enabled");
      for (int d = 0; d < 4; d++)
        if (!an_n[d]) begin
          seen[d]++;
          check(seg_n == pat[v[4*d +: 4]], $sformatf("digit %0d seg %h expected %h", d, seg_n, pat[v[4*d +: 4]]));
          if (d != last_an) begin
            // the first run of a scan may have started before it
            if (nruns > 1) check(run_len == 5, $sformatf("digit on for %0d clocks", run_len));
            nruns++;
            if (last_an >= 0) check(d == ((last_an + 1) % 4), "digits take turns");
            run_len = 0; last_an = d;
          end
          run_len++;
        end
    end
    for (int d = 0; d < 4; d++) check(seen[d] >= 5, $sformatf("digit %0d lit", d));
  endtask

  initial begin
    rdata = 32'h0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(led == 8'h00, "LEDs off");
    ok = 1'b1;
    repeat (2) @(negedge clk);
    check(led == 8'h80, "left-most LED for a completed cycle");
    ok = 1'b0; be = 1'b1;
    repeat (2) @(negedge clk);
    check(led == 8'h40, "bus error LED");
    be = 1'b0;
    rdata = 32'h89AB_0123;
    repeat (2) @(negedge clk);
    scan(16'h0123);
    hi = 1'b1;
    repeat (2) @(negedge clk);
    scan(16'h89AB);
    rdata = 32'hCDEF_4567;
    repeat (2) @(negedge clk);
    scan(16'hCDEF);
    hi = 1'b0;
    repeat (2) @(negedge clk);
    scan(16'h4567);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
