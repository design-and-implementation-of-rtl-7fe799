// Testbench for uart_tx.  en_16_x_baud comes from a counter here, one pulse
// every 4 clocks, so a bit lasts 64 clocks.  A receiver in the testbench
// decodes serial_out at mid-bit and checks each frame: start bit low, eight
// data bits least significant first, stop bit high.  Also checks: the line
// idles high after reset; buffer_full after 16 bytes in the buffer plus one
// in the serialiser; a write while full is dropped; back-to-back frames are
// exactly 10 bits (640 clocks) apart; reset_buffer empties the buffer.
//
// 8N1 framing and the port names follow the UART macro's figure; the
// buffer depth checked here is this design's choice.
module tb_uart_tx;
  localparam int BIT = 64;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] din;
  logic write = 1'b0, en16, full, sout;
  int checks = 0, failures = 0;
  int div = 0;

  always #1 clk = ~clk;
  always @(posedge clk) div <= (div == 3) ? 0 : div + 1;
  assign en16 = (div == 3);

  uart_tx dut (.clk(clk), .reset_buffer(rst), .din(din), .write(write),
               .en_16_x_baud(en16), .buffer_full(full), .serial_out(sout));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  byte unsigned expq[$];
  bit ignore = 1'b0;
  int nrx = 0, t = 0, last_start = -1, spacing_bad = 0, back2back = 0;
  always @(posedge clk) t++;

  // serial receiver
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge sout);
      if (last_start >= 0 && t - last_start < 10 * BIT - 2) spacing_bad++;
      if (last_start >= 0 && t - last_start <= 10 * BIT + 2) back2back++;
      last_start = t;
      repeat (BIT / 2) @(posedge clk);
      if (ignore) continue;
      check(sout == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        b[i] = sout;
      end
      repeat (BIT) @(posedge clk);
      check(sout == 1'b1, "stop bit");
      if (expq.size() == 0) check(1'b0, "unexpected frame");
      else begin
        byte unsigned e;
        e = expq.pop_front();
        check(b == e, $sformatf("got %h expected %h", b, e));
      end
      nrx++;
    end
  end

  initial begin
    din = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (4) @(negedge clk);
    check(sout == 1'b1 && !full, "idle line high, buffer empty");
    // one byte
    @(negedge clk) begin din = 8'hA5; write = 1'b1; expq.push_back(8'hA5); end
    @(negedge clk) write = 1'b0;
    repeat (12 * BIT) @(negedge clk);
    check(nrx == 1, "one frame");
    // fill the buffer
    for (int i = 0; i < 17; i++) begin
      @(negedge clk) begin din = 8'(i * 13 + 1); write = 1'b1; expq.push_back(8'(i * 13 + 1)); end
    end
    @(negedge clk) write = 1'b0;
    check(full, "buffer_full after 17 writes");
    @(negedge clk) begin din = 8'hEE; write = 1'b1; end   // dropped
    @(negedge clk) write = 1'b0;
    repeat (18 * 10 * BIT) @(negedge clk);
    check(nrx == 18, $sformatf("%0d frames", nrx));
    check(expq.size() == 0, "all bytes sent");
    check(spacing_bad == 0, "frames at least 10 bits apart");
    check(back2back >= 15, $sformatf("back-to-back frames %0d", back2back));
    check(!full, "buffer drained");
    // reset empties the buffer
    ignore = 1'b1;
    for (int i = 0; i < 5; i++) begin
      @(negedge clk) begin din = 8'h55; write = 1'b1; end
    end
    @(negedge clk) begin write = 1'b0; rst = 1'b1; end
    @(negedge clk) rst = 1'b0;
    @(negedge clk) rst = 1'b0;
    repeat (4 * 10 * BIT) @(negedge clk);
    check(sout == 1'b1, "line idle after reset_buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
