// Testbench for vme_read_core: every address width with every data width,
// random addresses, against a behavioural slave memory.  The expected data
// is taken byte by byte from the slave's memory by the VMEbus lane rules.
// Also checks the byte-lane controls, WRITE* high, the address set-up time,
// that the data lines are never driven, the bus-error path (rdata = 0), and
// the cycle length: done rises SETUP_CYC + 6 + ACK_DELAY + READ_WAIT_CYC
// clocks after the edge that takes start (+1 in the count below), where
// READ_WAIT_CYC = 2 covers the 25 ns wait at a 50 MHz clock.
//
// The step order and the 25 ns wait follow the specified read cycle; the
// lane rules come from the VMEbus standard, the clock counts from this design.
module tb_vme_read_core;
  import vme_pkg::*;
  localparam int SETUP = 2;
  localparam int ACKD  = 3;
  localparam int RWAIT = 2;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  vme_cmd_t cmd;
  logic busy, done, berr;
  logic [31:0] rdata;
  vme_dtb_out_t dtb;
  logic [31:0] sd;
  logic dtack_n, berr_n;
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  vme_read_core #(.SETUP_CYC(SETUP)) dut (
    .clk(clk), .rst(rst), .start(start), .cmd(cmd), .busy(busy), .done(done),
    .berr(berr), .rdata(rdata), .dtb(dtb), .dtack_n(dtack_n), .berr_n(berr_n), .d_in(sd));
  vme_slave_model #(.ACK_DELAY(ACKD)) slave (
    .clk(clk), .dtb(dtb), .d_out(sd), .dtack_n(dtack_n), .berr_n(berr_n));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int addr_cyc, setup_seen;
  logic seen_ds0, seen_ds1, seen_lw, seen_a01, seen_wr, ever_doe;
  logic [31:0] seen_addr;
  always @(posedge clk) begin
    if (dtb.addr_oe && dtb.as_n) addr_cyc++;
    if (!dtb.addr_oe) addr_cyc = 0;
    if (!dtb.as_n && setup_seen < 0) setup_seen = addr_cyc;
    if (dtb.d_oe) ever_doe = 1'b1;
    if (!dtb.ds0_n || !dtb.ds1_n) begin
      seen_ds0 = dtb.ds0_n; seen_ds1 = dtb.ds1_n; seen_lw = dtb.lword_n;
      seen_a01 = dtb.a[1]; seen_addr = {dtb.a, 1'b0}; seen_wr = dtb.write_n;
    end
  end

  task automatic run(vme_aw_e aw, vme_dw_e dw, logic [31:0] addr, bit expect_berr);
    int cyc;
    logic [31:0] ea, base, exp_d;
    cmd = '{op: OP_READ, aw: aw, dw: dw, am: 6'h0D, addr: addr, data: 32'hFFFF_FFFF};
    ea = (aw == AW_A16) ? (addr & 32'hFFFF) : (aw == AW_A24) ? (addr & 32'hFF_FFFF) : addr;
    if (dw == DW_D32) ea[1:0] = 2'b00;
    base = {22'd0, ea[9:2], 2'b00};
    case (dw)
      DW_D32:  exp_d = {slave.mem[base], slave.mem[base+1], slave.mem[base+2], slave.mem[base+3]};
      DW_D16:  exp_d = {16'h0, slave.mem[{base[31:2], ea[1], 1'b0}], slave.mem[{base[31:2], ea[1], 1'b1}]};
      DW_D08O: exp_d = {24'h0, slave.mem[{base[31:2], ea[1], 1'b1}]};
      default: exp_d = {24'h0, slave.mem[{base[31:2], ea[1], ea[0]}]};
    endcase
    setup_seen = -1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    check(done, "done pulse");
    check(berr == expect_berr, $sformatf("berr=%0d expected %0d", berr, expect_berr));
    check(setup_seen >= SETUP, $sformatf("address set-up %0d clocks", setup_seen));
    check(seen_wr == 1'b1, "WRITE* high");
    if (expect_berr) begin
      check(rdata == 32'h0, "rdata zero after bus error");
    end else begin
      check(rdata == exp_d, $sformatf("rdata %h expected %h (dw %0d)", rdata, exp_d, dw));
      check(cyc == SETUP + 7 + ACKD + RWAIT, $sformatf("cycle length %0d", cyc));
      check(seen_addr[31:2] == ea[31:2], $sformatf("address %h expected %h", seen_addr, ea));
      case (dw)
        DW_D32:  check({seen_ds1, seen_ds0, seen_lw, seen_a01} == 4'b0000, "D32 lanes");
        DW_D16:  check({seen_ds1, seen_ds0, seen_lw, seen_a01} == {3'b001, ea[1]}, "D16 lanes");
        DW_D08O: check({seen_ds1, seen_ds0, seen_lw, seen_a01} == {3'b101, ea[1]}, "D08(O) lanes");
        default: check({seen_ds1, seen_ds0, seen_lw, seen_a01} == {ea[0], ~ea[0], 1'b1, ea[1]}, "D08(EO) lanes");
      endcase
    end
    repeat (3) @(negedge clk);
    check(dtb.as_n && !dtb.addr_oe, "bus released after cycle");
  endtask

  initial begin
    cmd = '0; ever_doe = 1'b0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);
    ever_doe = 1'b0;
    for (int aw = 0; aw < 3; aw++)
      for (int dw = 0; dw < 4; dw++)
        for (int k = 0; k < 4; k++) begin
          logic [31:0] ad;
          ad = $urandom;
          if (ad[23:16] == 8'hEE) ad[16] = 1'b0;
          run(vme_aw_e'(aw), vme_dw_e'(dw), ad, 1'b0);
        end
    run(AW_A32, DW_D32, 32'h00EE_0040, 1'b1);
    check(!ever_doe, "data lines never driven");
    check(slave.n_read == 48, $sformatf("slave saw %0d reads", slave.n_read));
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
