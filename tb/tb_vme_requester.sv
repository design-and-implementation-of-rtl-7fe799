// Testbench for vme_requester against a behavioural level-3 arbiter.
// Checks: BR3* falls on a request; BBSY* falls only after BG3IN* has been
// low, and within 3-4 clocks of it (two-flip-flop synchroniser plus the
// state change); BR3* is withdrawn once BBSY* is driven; granted follows
// BBSY*; BBSY* is held while the request stays; the bus is released after
// the request drops and the grant is gone; a request is held off while the
// arbiter is busy with another master; BG3IN* is passed on to BG3OUT* only
// while this board neither requests nor owns the bus.
//
// Request, grant and BBSY* follow the specified bus request and release
// routines; BR3* withdrawal and the daisy-chain pass-through follow VMEbus
// practice, which the specification does not spell out.
module tb_vme_requester;
  logic clk = 1'b0, rst = 1'b1, req = 1'b0, hold_off = 1'b0;
  logic granted, bg3in_n, bg3out_n, br3_n, bbsy_n;
  logic bg_force, bg_arb;
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  vme_requester dut (
    .clk(clk), .rst(rst), .req(req), .granted(granted), .bg3in_n(bg3in_n),
    .bg3out_n(bg3out_n), .br3_n(br3_n), .bbsy_n(bbsy_n));
  vme_arbiter_model #(.GRANT_DELAY(5), .DROP_DELAY(2)) arb (
    .clk(clk), .hold_off(hold_off), .br3_n(br3_n), .bbsy_n(bbsy_n), .bg3in_n(bg_arb));

  // bg_force lets the test drive a grant meant for a board further down
  assign bg3in_n = bg_arb & bg_force;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int t_grant, t_bbsy, n;
  logic bbsy_without_grant;
  logic saw_grant;
  int n_passed_own = 0;
  always @(posedge clk) begin
    if (!rst && (req || !bbsy_n) && !bg3out_n) n_passed_own++;
    if (!bg3in_n) saw_grant = 1'b1;
    if (!bbsy_n && !saw_grant) bbsy_without_grant = 1'b1;
  end

  task automatic one_tenure(int hold_cycles, bit busy_bus);
    saw_grant = 1'b0;
    hold_off = busy_bus;
    @(negedge clk) req = 1'b1;
    @(negedge clk);
    check(!br3_n, "BR3* low after request");
    check(bg3out_n, "grant not passed on while requesting");
    if (busy_bus) begin
      repeat (30) @(negedge clk);
      check(bbsy_n && !granted && !br3_n, "waits while another master holds the bus");
      hold_off = 1'b0;
    end
    n = 0;
    while (bg3in_n && n < 100) begin @(negedge clk); n++; end
    t_grant = n;
    check(bg3out_n, "own grant not passed on to BG3OUT*");
    n = 0;
    while (bbsy_n && n < 100) begin @(negedge clk); n++; end
    check(n >= 2 && n <= 4, $sformatf("BBSY* %0d clocks after grant", n));
    check(granted, "granted with BBSY* low");
    @(negedge clk);
    check(br3_n, "BR3* withdrawn after BBSY*");
    repeat (hold_cycles) begin
      @(negedge clk);
      check(!bbsy_n && granted, "BBSY* held while the request stays");
    end
    req = 1'b0;
    n = 0;
    while (!bbsy_n && n < 100) begin @(negedge clk); n++; end
    check(bbsy_n && !granted, "bus released after request drops");
    check(bg3in_n, "released only after grant removed");
  endtask

  initial begin
    bg_force = 1'b1; bbsy_without_grant = 1'b0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);
    check(br3_n && bbsy_n && !granted, "idle after reset");
    // grant for another board passes through the daisy chain
    bg_force = 1'b0;
    @(negedge clk);
    check(!bg3out_n, "BG3IN* passed to BG3OUT* while idle");
    bg_force = 1'b1;
    @(negedge clk);
    check(bg3out_n, "BG3OUT* follows BG3IN* high");
    one_tenure(0, 1'b0);
    one_tenure(10, 1'b0);
    one_tenure(3, 1'b1);
    repeat (5) @(negedge clk);
    one_tenure(1, 1'b0);
    check(n_passed_own == 0, $sformatf("BG3OUT* low on %0d clocks of own tenure", n_passed_own));
    check(!bbsy_without_grant, "BBSY* never driven without a grant");
    check(arb.n_grants == 4, $sformatf("%0d grants", arb.n_grants));
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
