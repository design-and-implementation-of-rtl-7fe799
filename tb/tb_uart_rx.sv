// Testbench for uart_rx.  en_16_x_baud comes from a counter here, one pulse
// every 4 clocks, so a bit lasts 64 clocks.  A transmitter in the testbench
// sends 8N1 frames, some 2 % slow and some 2 % fast.  Checks: bytes come out
// in order on dout with data_present; read removes them; buffer_full after
// 16 unread bytes and a 17th byte is lost; a frame with a low stop bit is
// discarded; a low glitch shorter than half a bit starts no frame.
//
// 8N1 framing and the port names follow the UART macro's figure; the
// sampling details checked here are this design's.
module tb_uart_rx;
  localparam int BIT = 64;
  logic clk = 1'b0, rst = 1'b1;
  logic sin = 1'b1, en16, rd = 1'b0, full, present;
  logic [7:0] dout;
  int checks = 0, failures = 0;
  int div = 0;

  always #1 clk = ~clk;
  always @(posedge clk) div <= (div == 3) ? 0 : div + 1;
  assign en16 = (div == 3);

  uart_rx dut (.clk(clk), .reset_buffer(rst), .serial_in(sin), .en_16_x_baud(en16),
               .read(rd), .dout(dout), .buffer_full(full), .data_present(present));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(logic [7:0] b, int bitlen, bit stop);
    sin = 1'b0; repeat (bitlen) @(negedge clk);
    for (int i = 0; i < 8; i++) begin sin = b[i]; repeat (bitlen) @(negedge clk); end
    sin = stop; repeat (bitlen) @(negedge clk);
    sin = 1'b1; repeat (bitlen) @(negedge clk);
  endtask

  task automatic take(logic [7:0] e);
    check(present, "data_present");
    check(dout == e, $sformatf("dout %h expected %h", dout, e));
    @(negedge clk) rd = 1'b1;
    @(negedge clk) rd = 1'b0;
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (4) @(negedge clk);
    check(!present && !full, "empty after reset");
    send(8'h3C, BIT, 1'b1);
    take(8'h3C);
    check(!present, "empty after read");
    send(8'h81, BIT * 102 / 100, 1'b1);
    send(8'h7E, BIT * 98 / 100, 1'b1);
    take(8'h81);
    take(8'h7E);
    // framing error: stop bit low
    send(8'hF0, BIT, 1'b0);
    repeat (2 * BIT) @(negedge clk);
    check(!present, "frame with low stop bit discarded");
    // glitch
    sin = 1'b0; repeat (BIT / 4) @(negedge clk); sin = 1'b1;
    repeat (12 * BIT) @(negedge clk);
    check(!present, "glitch ignored");
    // overflow
    for (int i = 0; i < 17; i++) send(8'(i * 5 + 2), BIT, 1'b1);
    check(full, "buffer_full after 16 bytes");
    for (int i = 0; i < 16; i++) take(8'(i * 5 + 2));
    check(!present && !full, "17th byte lost, buffer empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
