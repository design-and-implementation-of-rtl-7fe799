// Testbench for cmd_sequencer with CHAR_GAP_US = 1 (50 clocks at 50 MHz).
// The UART buffers, the requester and the cycle cores are stand-ins written
// here: a queue for the receive buffer, a byte log for the transmit buffer
// (whose full flag is raised now and then), a grant that follows the request
// after a few clocks, and cores that finish a few clocks after their start.
// Checks: every received byte is echoed in order; at least GAP clocks pass
// between two transmitted bytes and none is written while full; each frame
// gives exactly one start of the right core, only while the bus is granted;
// the decoded operation, widths, AM, address and data; the read reply
// (1, 2 or 4 bytes, most significant first); the bus is released after each
// cycle; an invalid command byte is dropped; cycle_ok / cycle_berr.
//
// The echo and the pause after each sent character follow the exerciser's
// program; the frame layout checked here is this design's own encoding.
module tb_cmd_sequencer;
  import vme_pkg::*;
  localparam int GAP = 50;

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] rx_data, tx_data;
  logic rx_present, rx_read, tx_write, tx_full;
  logic bus_req, bus_granted;
  vme_cmd_t cmd;
  logic start_ado, start_write, start_read;
  logic xfer_done, xfer_berr;
  logic [31:0] xfer_rdata, last_rdata;
  logic cycle_ok, cycle_berr;
  initial tx_full = 1'b0;
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  cmd_sequencer #(.CLK_HZ(50_000_000), .CHAR_GAP_US(1)) dut (
    .clk(clk), .rst(rst), .rx_data(rx_data), .rx_present(rx_present), .rx_read(rx_read),
    .tx_data(tx_data), .tx_write(tx_write), .tx_full(tx_full),
    .bus_req(bus_req), .bus_granted(bus_granted), .cmd(cmd),
    .start_ado(start_ado), .start_write(start_write), .start_read(start_read),
    .xfer_done(xfer_done), .xfer_berr(xfer_berr), .xfer_rdata(xfer_rdata),
    .cycle_ok(cycle_ok), .cycle_berr(cycle_berr), .last_rdata(last_rdata));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // receive buffer
  byte unsigned rxq[$];
  assign rx_present = rxq.size() > 0;
  assign rx_data    = rx_present ? rxq[0] : 8'h00;
  always @(posedge clk) if (rx_read && rxq.size() > 0) void'(rxq.pop_front());

  // transmit buffer (sequencer states: 0 = waiting for a byte, 2 = sending)
  byte unsigned txlog[$];
  int t = 0, last_tx = -1000, n_full_wait = 0;
  bit blocked = 1'b0;
  always @(posedge clk) begin
    t++;
    // like a real buffer, full rises only on a write and drains later
    if (tx_write) tx_full <= ($urandom % 3) == 0;
    else if (tx_full) tx_full <= ($urandom % 20) != 0;
    if (tx_write) begin
      check(!tx_full, "no write while full");
      check(t - last_tx >= GAP, $sformatf("gap %0d clocks", t - last_tx));
      // a write that follows a full buffer seen after the gap had run out
      if (blocked) n_full_wait++;
      blocked = 1'b0;
      last_tx = t;
      txlog.push_back(tx_data);
    end else if (tx_full && t - last_tx >= GAP && rxq.size() == 0) blocked = 1'b1;
  end

  // requester stand-in
  int gcnt = 0;
  always @(posedge clk) begin
    if (rst) begin bus_granted <= 1'b0; gcnt = 0; end
    else if (bus_req && !bus_granted) begin gcnt++; if (gcnt == 4) begin bus_granted <= 1'b1; gcnt = 0; end end
    else if (!bus_req && bus_granted) begin gcnt++; if (gcnt == 2) begin bus_granted <= 1'b0; gcnt = 0; end end
    else gcnt = 0;
  end

  // cycle core stand-in
  int ccnt = -1, n_starts = 0, bad_start = 0;
  vme_op_e started;
  logic next_berr;
  logic [31:0] next_rdata;
  always @(posedge clk) begin
    xfer_done <= 1'b0;
    if (!rst && (start_ado || start_write || start_read)) begin
      n_starts++;
      if (!bus_granted) bad_start++;
      started = start_ado ? OP_ADO : start_write ? OP_WRITE : OP_READ;
      ccnt = 6;
    end else if (ccnt > 0) begin
      ccnt--;
      if (ccnt == 0) begin
        xfer_done <= 1'b1; xfer_berr <= next_berr; xfer_rdata <= next_rdata; ccnt = -1;
      end
    end
  end

  task automatic frame(vme_op_e op, vme_dw_e dw, vme_aw_e aw, logic [5:0] am,
                       logic [31:0] addr, logic [31:0] data, bit berr, logic [31:0] rd);
    byte unsigned f[$];
    int n0, s0, nb;
    f.push_back({2'b00, 2'(aw), 2'(dw), 2'(op)});
    f.push_back({2'b11, am});
    for (int i = 3; i >= 0; i--) f.push_back(addr[8*i +: 8]);
    if (op == OP_WRITE) for (int i = 3; i >= 0; i--) f.push_back(data[8*i +: 8]);
    next_berr = berr; next_rdata = rd;
    n0 = txlog.size(); s0 = n_starts;
    foreach (f[i]) rxq.push_back(f[i]);
    nb = (op == OP_READ) ? ((dw == DW_D32) ? 4 : (dw == DW_D16) ? 2 : 1) : 0;
    while (txlog.size() < n0 + f.size() + nb || rxq.size() > 0 || n_starts == s0 || bus_req)
      @(negedge clk);
    repeat (2 * GAP) @(negedge clk);   // anything extra would have been sent by now
    check(n_starts == s0 + 1, "one core start per frame");
    check(started == op, "right core started");
    check(cmd.op == op && cmd.dw == dw && cmd.aw == aw && cmd.am == am, "command fields");
    check(cmd.addr == addr, $sformatf("address %h", cmd.addr));
    if (op == OP_WRITE) check(cmd.data == data, $sformatf("data %h", cmd.data));
    for (int i = 0; i < f.size(); i++) check(txlog[n0 + i] == f[i], $sformatf("echo byte %0d", i));
    for (int i = 0; i < nb; i++)
      check(txlog[n0 + f.size() + i] == rd[8*(nb-1-i) +: 8], $sformatf("reply byte %0d", i));
    check(txlog.size() == n0 + f.size() + nb, "nothing else sent");
    check(cycle_ok == !berr && cycle_berr == berr, "cycle status");
    if (op == OP_READ) check(last_rdata == rd, "last_rdata");
    check(!bus_req, "bus released");
  endtask

  initial begin
    xfer_berr = 1'b0; xfer_rdata = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);
    frame(OP_ADO,   DW_D16,   AW_A16, 6'h29, 32'h0000_1234, 32'h0, 1'b0, 32'h0);
    frame(OP_WRITE, DW_D32,   AW_A32, 6'h09, 32'hDEAD_BEEC, 32'h0102_0304, 1'b0, 32'h0);
    frame(OP_READ,  DW_D32,   AW_A24, 6'h39, 32'h0012_3458, 32'h0, 1'b0, 32'hA1B2_C3D4);
    frame(OP_READ,  DW_D16,   AW_A16, 6'h29, 32'h0000_0102, 32'h0, 1'b0, 32'h0000_5A6B);
    frame(OP_READ,  DW_D08EO, AW_A16, 6'h29, 32'h0000_0103, 32'h0, 1'b0, 32'h0000_00C7);
    frame(OP_WRITE, DW_D08O,  AW_A24, 6'h39, 32'h0000_0011, 32'h0000_0099, 1'b1, 32'h0);
    // an invalid command byte is echoed and dropped
    begin
      int n0, s0;
      n0 = txlog.size(); s0 = n_starts;
      rxq.push_back(8'h03);
      while (txlog.size() < n0 + 1 || rxq.size() > 0) @(negedge clk);
      repeat (GAP + 5) @(negedge clk);
      check(txlog[n0] == 8'h03 && n_starts == s0 && !bus_req, "invalid command dropped");
    end
    frame(OP_ADO,   DW_D32,   AW_A32, 6'h0D, 32'hFFFF_0000, 32'h0, 1'b0, 32'h0);
    check(bad_start == 0, "cores started only with the bus granted");
    check(n_full_wait > 0, "transmit buffer full was waited out");
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
