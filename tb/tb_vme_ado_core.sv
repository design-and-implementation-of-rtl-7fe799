// Testbench for vme_ado_core: address-only cycles with A16, A24 and A32
// addresses against a behavioural slave that acknowledges an address-only
// cycle ADO_WAIT clocks after AS*.  Checks that the address (masked to its
// width), the address modifier and LWORD* are on the bus, that AS* follows
// the set-up time, that no data strobe or data line is ever driven, the
// bus-error path, and the cycle length: done rises SETUP_CYC + ADO_WAIT + 4
// clocks after the edge that takes start (+1 in the count below).
//
// The step order checked follows the address-only cycle as specified; the
// clock counts are those of this design's state machine.
module tb_vme_ado_core;
  import vme_pkg::*;
  localparam int SETUP = 2;
  localparam int ADOW  = 12;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  vme_cmd_t cmd;
  logic busy, done, berr;
  vme_dtb_out_t dtb;
  logic [31:0] sd;
  logic dtack_n, berr_n;
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  vme_ado_core #(.SETUP_CYC(SETUP)) dut (
    .clk(clk), .rst(rst), .start(start), .cmd(cmd), .busy(busy), .done(done),
    .berr(berr), .dtb(dtb), .dtack_n(dtack_n), .berr_n(berr_n));
  vme_slave_model #(.ADO_WAIT(ADOW)) slave (
    .clk(clk), .dtb(dtb), .d_out(sd), .dtack_n(dtack_n), .berr_n(berr_n));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int addr_cyc, setup_seen;
  logic any_strobe;
  logic [31:0] seen_addr;
  logic [5:0] seen_am;
  always @(posedge clk) begin
    if (dtb.addr_oe && dtb.as_n) addr_cyc++;
    if (!dtb.addr_oe) addr_cyc = 0;
    if (!dtb.as_n && setup_seen < 0) begin
      setup_seen = addr_cyc; seen_addr = {dtb.a, 1'b0}; seen_am = dtb.am;
    end
    if (!dtb.ds0_n || !dtb.ds1_n || dtb.d_oe) any_strobe = 1'b1;
  end

  task automatic run(vme_aw_e aw, logic [31:0] addr, logic [5:0] am, bit expect_berr);
    int cyc;
    logic [31:0] ea;
    cmd = '{op: OP_ADO, aw: aw, dw: DW_D16, am: am, addr: addr, data: 32'h0};
    ea = (aw == AW_A16) ? (addr & 32'hFFFF) : (aw == AW_A24) ? (addr & 32'hFF_FFFF) : addr;
    setup_seen = -1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    check(done, "done pulse");
    check(berr == expect_berr, $sformatf("berr=%0d expected %0d", berr, expect_berr));
    check(setup_seen >= SETUP, $sformatf("address set-up %0d clocks", setup_seen));
    check(seen_addr[31:1] == ea[31:1], $sformatf("address %h expected %h", seen_addr, ea));
    check(seen_am == am, "address modifier");
    if (!expect_berr) check(cyc == SETUP + ADOW + 5, $sformatf("cycle length %0d", cyc));
    repeat (3) @(negedge clk);
    check(dtb.as_n && !dtb.addr_oe, "bus released after cycle");
  endtask

  initial begin
    cmd = '0; any_strobe = 1'b0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);
    any_strobe = 1'b0;
    for (int aw = 0; aw < 3; aw++)
      for (int k = 0; k < 6; k++) begin
        logic [31:0] ad;
        ad = $urandom;
        if (ad[23:16] == 8'hEE) ad[16] = 1'b0;
        run(vme_aw_e'(aw), ad, 6'($urandom), 1'b0);
      end
    run(AW_A24, 32'h00EE_1234, 6'h3D, 1'b1);
    check(!any_strobe, "no data strobe or data drive in an ADO cycle");
    check(slave.n_ado == 18, $sformatf("slave saw %0d ADO cycles", slave.n_ado));
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
