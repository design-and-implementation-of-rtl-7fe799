// Testbench for vme_write_core: every address width with every data width,
// random addresses and data, against a behavioural slave memory.  Checks the
// bytes that land in the slave, the byte-lane controls seen while DS* is low
// (worked out here from the VMEbus lane rules), the upper address bits for
// A16/A24, the address set-up time ahead of AS*, WRITE* and IACK*, the
// bus-error path, and the cycle length:
// done rises SETUP_CYC + 7 + ACK_DELAY clocks after the edge that takes
// start (the loop below counts that edge too, hence + 8).
//
// The step order checked follows the specified write cycle; the lane rules
// come from the VMEbus standard, the clock counts from this design.
module tb_vme_write_core;
  import vme_pkg::*;
  localparam int SETUP = 2;
  localparam int ACKD  = 3;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  vme_cmd_t cmd;
  logic busy, done, berr;
  vme_dtb_out_t dtb;
  logic [31:0] sd;
  logic dtack_n, berr_n;
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  vme_write_core #(.SETUP_CYC(SETUP)) dut (
    .clk(clk), .rst(rst), .start(start), .cmd(cmd), .busy(busy), .done(done),
    .berr(berr), .dtb(dtb), .dtack_n(dtack_n), .berr_n(berr_n));
  vme_slave_model #(.ACK_DELAY(ACKD)) slave (
    .clk(clk), .dtb(dtb), .d_out(sd), .dtack_n(dtack_n), .berr_n(berr_n));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bus monitor: what the strobes looked like, and the set-up time
  int addr_cyc, setup_seen;
  logic seen_ds0, seen_ds1, seen_lw, seen_a01, seen_iack, seen_wr;
  logic [31:0] seen_addr;
  always @(posedge clk) begin
    if (dtb.addr_oe && dtb.as_n) addr_cyc++;
    if (!dtb.addr_oe) addr_cyc = 0;
    if (!dtb.as_n && setup_seen < 0) setup_seen = addr_cyc;
    if (!dtb.ds0_n || !dtb.ds1_n) begin
      seen_ds0 = dtb.ds0_n; seen_ds1 = dtb.ds1_n; seen_lw = dtb.lword_n;
      seen_a01 = dtb.a[1]; seen_addr = {dtb.a, 1'b0}; seen_iack = dtb.iack_n;
      seen_wr = dtb.write_n;
    end
  end

  task automatic run(vme_aw_e aw, vme_dw_e dw, logic [31:0] addr, logic [31:0] data,
                     bit expect_berr);
    int cyc;
    logic [31:0] ea, base;
    logic [7:0] prev_b [4];
    cmd = '{op: OP_WRITE, aw: aw, dw: dw, am: 6'h09, addr: addr, data: data};
    ea = (aw == AW_A16) ? (addr & 32'hFFFF) : (aw == AW_A24) ? (addr & 32'hFF_FFFF) : addr;
    if (dw == DW_D32) ea[1:0] = 2'b00;
    base = {22'd0, ea[9:2], 2'b00};
    for (int i = 0; i < 4; i++) prev_b[i] = slave.mem[base + i];
    setup_seen = -1; seen_ds0 = 1; seen_ds1 = 1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    check(done, "done pulse");
    check(berr == expect_berr, $sformatf("berr=%0d expected %0d", berr, expect_berr));
    check(setup_seen >= SETUP, $sformatf("address set-up %0d clocks", setup_seen));
    check(seen_iack == 1'b1 && seen_wr == 1'b0, "IACK* high and WRITE* low");
    if (!expect_berr) begin
      check(cyc == SETUP + 8 + ACKD, $sformatf("cycle length %0d", cyc));
      check(seen_addr[31:2] == ea[31:2], $sformatf("address %h expected %h", seen_addr, ea));
      case (dw)
        DW_D32: begin
          check({seen_ds1, seen_ds0, seen_lw, seen_a01} == 4'b0000, "D32 lanes");
          check({slave.mem[base], slave.mem[base+1], slave.mem[base+2], slave.mem[base+3]} == data,
                "D32 data in slave");
        end
        DW_D16: begin
          check({seen_ds1, seen_ds0, seen_lw, seen_a01} == {3'b001, ea[1]}, "D16 lanes");
          check({slave.mem[{base[31:2], ea[1], 1'b0}], slave.mem[{base[31:2], ea[1], 1'b1}]} == data[15:0],
                "D16 data in slave");
        end
        DW_D08O: begin
          check({seen_ds1, seen_ds0, seen_lw, seen_a01} == {3'b101, ea[1]}, "D08(O) lanes");
          check(slave.mem[{base[31:2], ea[1], 1'b1}] == data[7:0], "D08(O) data in slave");
        end
        default: begin
          check({seen_ds1, seen_ds0, seen_lw} == {ea[0], ~ea[0], 1'b1} && seen_a01 == ea[1], "D08(EO) lanes");
          check(slave.mem[{base[31:2], ea[1], ea[0]}] == data[7:0], "D08(EO) data in slave");
          // the other byte of the word is untouched
          check(slave.mem[{base[31:2], ea[1], ~ea[0]}] == prev_b[{ea[1], ~ea[0]}], "neighbour byte kept");
        end
      endcase
    end
    repeat (3) @(negedge clk);
    check(dtb.as_n && !dtb.addr_oe && !dtb.d_oe, "bus released after cycle");
  endtask

  initial begin
    cmd = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);
    for (int aw = 0; aw < 3; aw++)
      for (int dw = 0; dw < 4; dw++)
        for (int k = 0; k < 4; k++) begin
          logic [31:0] ad;
          ad = $urandom;
          if (ad[23:16] == 8'hEE) ad[16] = 1'b0;
          run(vme_aw_e'(aw), vme_dw_e'(dw), ad, $urandom, 1'b0);
        end
    run(AW_A24, DW_D16, 32'h00EE_0010, 32'h1234, 1'b1);
    run(AW_A32, DW_D32, 32'h12EE_0020, 32'hCAFE_F00D, 1'b1);
    check(slave.n_berr == 2, "slave saw both bus-error cycles");
    check(slave.n_write == 48, $sformatf("slave saw %0d writes", slave.n_write));
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
