// Behavioural VMEbus slave for the testbenches: a 1 KiB byte memory at any
// address (only A09..A00 decode), answering DS-strobed cycles with DTACK*
// after ACK_DELAY clocks and address-only cycles (AS* low with no data
// strobe for ADO_WAIT clocks) with DTACK* as well.  Addresses whose bits
// [23:16] equal 8'hEE answer with BERR* instead.  Byte lanes follow the
// VMEbus standard: D32 puts the byte at the lowest address on D31..D24; D16
// the even byte on D15..D08; DS1* alone is the even byte on D15..D08, DS0*
// alone the odd byte on D07..D00.  Counters record what was seen.
//
// The slave, its memory and its bus-error address are testbench choices;
// the specification tests against a real slave board.
module vme_slave_model
  import vme_pkg::*;
#(
  parameter int ACK_DELAY = 3,
  parameter int ADO_WAIT  = 12
) (
  input  logic         clk,
  input  vme_dtb_out_t dtb,
  output logic [31:0]  d_out,
  output logic         dtack_n,
  output logic         berr_n
);
  logic [7:0] mem [1024];
  int n_write, n_read, n_ado, n_berr;
  int as_cnt, ds_cnt;
  logic [31:0] a;
  logic [9:0]  b;
  logic        any_ds, bad;

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = 8'(i * 7 + 3);
    dtack_n = 1'b1; berr_n = 1'b1; d_out = '0;
    n_write = 0; n_read = 0; n_ado = 0; n_berr = 0; as_cnt = 0; ds_cnt = 0;
  end

  assign a      = {dtb.a, 1'b0};
  assign b      = a[9:0];
  assign any_ds = !dtb.ds0_n || !dtb.ds1_n;
  assign bad    = (a[23:16] == 8'hEE);

  task automatic respond();
    if (bad) begin berr_n <= 1'b0; n_berr++; end
    else dtack_n <= 1'b0;
  endtask

  always @(posedge clk) begin
    if (dtb.as_n) begin
      as_cnt = 0; ds_cnt = 0;
      dtack_n <= 1'b1; berr_n <= 1'b1;
    end else begin
      as_cnt++;
      if (any_ds) begin
        ds_cnt++;
        if (ds_cnt == ACK_DELAY) begin
          respond();
          if (!bad && !dtb.write_n) begin
            n_write++;
            if (!dtb.lword_n) begin
              mem[{b[9:2], 2'd0}] = dtb.d[31:24]; mem[{b[9:2], 2'd1}] = dtb.d[23:16];
              mem[{b[9:2], 2'd2}] = dtb.d[15:8];  mem[{b[9:2], 2'd3}] = dtb.d[7:0];
            end else begin
              if (!dtb.ds1_n) mem[{b[9:1], 1'b0}] = dtb.d[15:8];
              if (!dtb.ds0_n) mem[{b[9:1], 1'b1}] = dtb.d[7:0];
            end
          end else if (!bad) begin
            n_read++;
            d_out <= '0;
            if (!dtb.lword_n)
              d_out <= {mem[{b[9:2], 2'd0}], mem[{b[9:2], 2'd1}], mem[{b[9:2], 2'd2}], mem[{b[9:2], 2'd3}]};
            else
              d_out <= {16'h0, dtb.ds1_n ? 8'h00 : mem[{b[9:1], 1'b0}],
                               dtb.ds0_n ? 8'h00 : mem[{b[9:1], 1'b1}]};
          end
        end
      end else if (ds_cnt > 0) begin
        dtack_n <= 1'b1; berr_n <= 1'b1;       // strobes released
      end else if (as_cnt == ADO_WAIT) begin
        respond();
        if (!bad) n_ado++;
      end
    end
  end
endmodule
