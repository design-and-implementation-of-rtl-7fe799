// End-to-end testbench for vme_exerciser_top with every parameter at its
// default (50 MHz clock, 9600 baud, 1 ms pause after each sent character).
//
// The testbench plays the PC on the serial line (8N1 at 9600 baud, 5208
// clocks per bit), the system controller's level-3 arbiter, and a slave
// memory on the VMEbus.  It runs the exerciser's functional test list:
// address-only cycles with A16, A24 and A32; writes with every address width
// and D08, D16 and D32; then reads of the same locations, whose data must be
// what was written.  On top of that: D08(O) and odd/even D08(EO) bytes, a
// cycle that ends in a bus error, an invalid command byte, a request that
// has to wait while another master holds the bus, and a grant for another
// board passed down the daisy chain.  Every received character must come
// back as an echo; read data must follow, most significant byte first; the
// LEDs and the 7-segment display must show the outcome.  Each mechanism is
// counted and one that never happened counts as a failure.
//
// The test list mirrors the exerciser's functional tests; the frame
// encoding and the slave and arbiter behaviour are this design's own.
module tb_vme_exerciser_top;
  import vme_pkg::*;
  localparam int BIT = 5208;   // 50 MHz / 9600 baud

  logic clk = 1'b0, rst = 1'b1;
  logic rxd = 1'b1, txd;
  vme_dtb_out_t dtb;
  logic [31:0] d_slave;
  logic dtack_n, berr_n, br3_n, bbsy_n, bg3in_n, bg3out_n, bg_arb, bg_other;
  logic hold_off = 1'b0, show_high = 1'b0;
  logic [7:0] led, seg_n;
  logic [3:0] an_n;
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  vme_exerciser_top dut (
    .clk(clk), .rst(rst), .rs232_rxd(rxd), .rs232_txd(txd),
    .dtb_o(dtb), .d_i(d_slave), .dtack_n_i(dtack_n), .berr_n_i(berr_n),
    .br3_n_o(br3_n), .bbsy_n_o(bbsy_n), .bg3in_n_i(bg3in_n), .bg3out_n_o(bg3out_n),
    .show_high(show_high), .led(led), .seg_n(seg_n), .an_n(an_n));

  vme_slave_model slave (.clk(clk), .dtb(dtb), .d_out(d_slave), .dtack_n(dtack_n), .berr_n(berr_n));
  vme_arbiter_model arb (.clk(clk), .hold_off(hold_off), .br3_n(br3_n), .bbsy_n(bbsy_n), .bg3in_n(bg_arb));
  assign bg3in_n = bg_arb & bg_other;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // PC receiver: collects what the exerciser sends
  byte unsigned rxlog[$];
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge txd);
      repeat (BIT / 2) @(posedge clk);
      if (txd) continue;
      for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); b[i] = txd; end
      repeat (BIT) @(posedge clk);
      check(txd == 1'b1, "stop bit from exerciser");
      rxlog.push_back(b);
      if ($test$plusargs("trace")) $display("%0t rx %h", $time, b);
    end
  end

  // PC transmitter
  task automatic send_byte(logic [7:0] b);
    if ($test$plusargs("trace")) $display("%0t tx %h", $time, b);
    rxd = 1'b0; repeat (BIT) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (BIT) @(negedge clk); end
    rxd = 1'b1; repeat (BIT) @(negedge clk);
  endtask

  // mechanism counters
  int m_ado, m_write, m_read, m_berr, m_wait_arb, m_daisy, m_echo, m_reply, m_drop;
  int m_aw[3], m_dw[4], m_led_ok, m_led_berr, m_display;
  int br_low_run, max_br_wait;
  always @(posedge clk) begin
    if (!br3_n && bbsy_n) br_low_run++; else br_low_run = 0;
    if (br_low_run > max_br_wait) max_br_wait = br_low_run;
  end

  // a model of the bus target's expected contents, filled by the writes
  logic [31:0] written [$];

  task automatic command(vme_op_e op, vme_dw_e dw, vme_aw_e aw, logic [5:0] am,
                         logic [31:0] addr, logic [31:0] data, bit expect_berr,
                         output logic [31:0] rd);
    byte unsigned f[$];
    int n0, nb, w;
    f.push_back({2'b00, 2'(aw), 2'(dw), 2'(op)});
    f.push_back({2'b00, am});
    for (int i = 3; i >= 0; i--) f.push_back(addr[8*i +: 8]);
    if (op == OP_WRITE) for (int i = 3; i >= 0; i--) f.push_back(data[8*i +: 8]);
    nb = (op == OP_READ) ? ((dw == DW_D32) ? 4 : (dw == DW_D16) ? 2 : 1) : 0;
    n0 = rxlog.size();
    foreach (f[i]) send_byte(f[i]);
    w = 0;
    while (rxlog.size() < n0 + f.size() + nb && w < 100 * BIT) begin @(negedge clk); w++; end
    repeat (2 * BIT) @(negedge clk);
    check(rxlog.size() == n0 + f.size() + nb, $sformatf("%0d bytes back, expected %0d",
          rxlog.size() - n0, f.size() + nb));
    for (int i = 0; i < f.size(); i++) begin
      check(rxlog[n0 + i] == f[i], $sformatf("echo byte %0d", i));
      m_echo++;
    end
    rd = '0;
    for (int i = 0; i < nb; i++) begin
      rd = {rd[23:0], rxlog[n0 + f.size() + i]};
      m_reply++;
    end
    check(led[7] == !expect_berr && led[6] == expect_berr, "LED status");
    if (!expect_berr) m_led_ok++; else m_led_berr++;
    if (!expect_berr) begin m_aw[aw]++; m_dw[dw]++; end
  endtask

  // 7-segment pattern of a hexadecimal digit, active low {dp,g,f,e,d,c,b,a}
  logic [7:0] pat [16] = '{8'hC0, 8'hF9, 8'hA4, 8'hB0, 8'h99, 8'h92, 8'h82, 8'hF8,
                           8'h80, 8'h90, 8'h88, 8'h83, 8'hC6, 8'hA1, 8'h86, 8'h8E};
  task automatic check_display(logic [15:0] v);
    int seen;
    seen = 0;
    for (int k = 0; k < 4 * 50_000 + 10; k += 997) begin
      repeat (997) @(negedge clk);
      for (int d = 0; d < 4; d++)
        if (!an_n[d]) begin
          check(seg_n == pat[v[4*d +: 4]], $sformatf("display digit %0d", d));
          seen |= 1 << d;
        end
    end
    check(seen == 4'hF, "all four digits shown");
    m_display++;
  endtask

  initial begin
    logic [31:0] rd, a, d, exp_d;
    logic [31:0] addrs [9];
    logic [31:0] datas [9];
    int s0;
    m_ado = 0; m_write = 0; m_read = 0; m_berr = 0; m_wait_arb = 0; m_daisy = 0;
    m_echo = 0; m_reply = 0; m_drop = 0; m_led_ok = 0; m_led_berr = 0; m_display = 0;
    br_low_run = 0; max_br_wait = 0; bg_other = 1'b1;
    for (int i = 0; i < 3; i++) m_aw[i] = 0;
    for (int i = 0; i < 4; i++) m_dw[i] = 0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (20) @(negedge clk);
    check(br3_n && bbsy_n && dtb.as_n && txd, "idle after reset");

    // daisy chain: a grant meant for a board further down passes through
    bg_other = 1'b0;
    repeat (2) @(negedge clk);
    check(!bg3out_n, "grant passed down the daisy chain");
    if (!bg3out_n) m_daisy++;
    bg_other = 1'b1;

    // ADO cycles, A16 / A24 / A32
    for (int aw = 0; aw < 3; aw++) begin
      s0 = slave.n_ado;
      command(OP_ADO, DW_D32, vme_aw_e'(aw), 6'h2D, 32'h1357_9BDF, 32'h0, 1'b0, rd);
      check(slave.n_ado == s0 + 1, "slave saw the ADO cycle");
      m_ado++;
    end

    // writes: A16/A24/A32 x D08/D16/D32
    for (int aw = 0; aw < 3; aw++)
      for (int k = 0; k < 3; k++) begin
        vme_dw_e dw;
        int i;
        i = aw * 3 + k;
        dw = (k == 0) ? DW_D08EO : (k == 1) ? DW_D16 : DW_D32;
        a = 32'h00C0_0100 + 32'(i * 8) + ((k == 0) ? 32'(i % 2) : 0);
        d = $urandom & dw_mask(dw);
        addrs[i] = a; datas[i] = d;
        s0 = slave.n_write;
        command(OP_WRITE, dw, vme_aw_e'(aw), 6'h09, a, d, 1'b0, rd);
        check(slave.n_write == s0 + 1, "slave saw the write");
        m_write++;
      end
    // the same locations read back
    for (int aw = 0; aw < 3; aw++)
      for (int k = 0; k < 3; k++) begin
        vme_dw_e dw;
        int i;
        i = aw * 3 + k;
        dw = (k == 0) ? DW_D08EO : (k == 1) ? DW_D16 : DW_D32;
        command(OP_READ, dw, vme_aw_e'(aw), 6'h0D, addrs[i], 32'h0, 1'b0, rd);
        check(rd == datas[i], $sformatf("read back %h expected %h", rd, datas[i]));
        m_read++;
      end
    check_display(datas[8][15:0]);
    show_high = 1'b1;
    check_display(datas[8][31:16]);
    show_high = 1'b0;

    // D08(O): odd byte only, whatever A00 says
    command(OP_WRITE, DW_D08O, AW_A24, 6'h39, 32'h0000_0200, 32'h0000_005A, 1'b0, rd);
    check(slave.mem[10'h201] == 8'h5A, "D08(O) wrote the odd byte");
    m_write++;
    exp_d = {24'h0, slave.mem[10'h203]};
    command(OP_READ, DW_D08O, AW_A24, 6'h39, 32'h0000_0202, 32'h0, 1'b0, rd);
    check(rd == exp_d, "D08(O) read of the odd byte");
    m_read++;

    // bus error
    s0 = slave.n_berr;
    command(OP_WRITE, DW_D16, AW_A32, 6'h09, 32'h00EE_0000, 32'h0000_1111, 1'b1, rd);
    check(slave.n_berr == s0 + 1, "bus error seen");
    m_berr++;

    // invalid command byte: echoed, nothing happens
    begin
      int n0;
      n0 = rxlog.size(); s0 = arb.n_grants;
      send_byte(8'hFF);
      repeat (15 * BIT) @(negedge clk);
      check(rxlog.size() == n0 + 1 && rxlog[n0] == 8'hFF, "invalid byte echoed");
      check(arb.n_grants == s0 && br3_n, "no bus request for it");
      m_drop++;
    end

    // the bus is busy with another master for a while
    hold_off = 1'b1;
    fork
      begin
        command(OP_READ, DW_D32, AW_A32, 6'h0D, addrs[8], 32'h0, 1'b0, rd);
      end
      begin
        repeat (20 * BIT) @(negedge clk);   // the frame takes longer than this
        while (br3_n) @(negedge clk);
        repeat (2000) @(negedge clk);
        check(bbsy_n && !br3_n, "request waits while the bus is held");
        hold_off = 1'b0;
      end
    join
    check(rd == datas[8], "read after waiting for the bus");
    if (max_br_wait >= 2000) m_wait_arb++;
    m_read++;

    // every mechanism happened
    check(m_ado > 0, "ADO cycles");
    check(m_write > 0, "write cycles");
    check(m_read > 0, "read cycles");
    check(m_berr > 0, "bus error");
    check(m_wait_arb > 0, "waiting for a grant");
    check(m_daisy > 0, "daisy-chain pass-through");
    check(m_echo > 0 && m_reply > 0, "echo and read reply");
    check(m_drop > 0, "invalid command dropped");
    check(m_led_ok > 0 && m_led_berr > 0 && m_display > 0, "LEDs and display");
    for (int i = 0; i < 3; i++) check(m_aw[i] > 0, $sformatf("address width %0d used", i));
    for (int i = 0; i < 4; i++) check(m_dw[i] > 0, $sformatf("data width %0d used", i));
    $display("mechanisms: ado=%0d write=%0d read=%0d berr=%0d arb_wait=%0d daisy=%0d echo=%0d reply=%0d drop=%0d display=%0d",
             m_ado, m_write, m_read, m_berr, m_wait_arb, m_daisy, m_echo, m_reply, m_drop, m_display);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
