// Single-cycle read core: reads one byte, word or long word from a VMEbus
// slave.
//
// Sequence, as the exerciser's read cycle is defined:
//   1-4. present address, address modifier, LWORD*, and IACK* high;
//   5.   wait the address set-up time (SETUP_CYC clocks);
//   6-7. drive AS* low with WRITE* high;
//   8.   wait until DTACK* and BERR* are both high;
//   9.   drive DS0*/DS1* to the values of the data width;
//   10.  wait for DTACK* low (BERR* low ends the cycle as a bus error);
//   11.  wait 25 ns (READ_WAIT_CYC clocks, rounded up from the clock period);
//   12.  take the data from its byte lanes, right-aligned, into rdata;
//   13.  drive DS0* and DS1* high;
//   14.  one clock later drive AS* high,
// then release the address lines and pulse done.  After a bus error rdata is
// zero.  The 25 ns wait is the specification's; SETUP_CYC, the 50 MHz clock
// assumption and the one-clock spacing are this design's.  DTACK* and BERR*
// pass through two-flip-flop synchronisers, so the data lines have been
// valid for at least two clocks more than the 25 ns when they are sampled.
module vme_read_core
  import vme_pkg::*;
#(
  parameter int unsigned SETUP_CYC    = 2,
  parameter int unsigned CLK_HZ       = 50_000_000,
  parameter int unsigned READ_WAIT_NS = 25
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  vme_cmd_t     cmd,
  output logic         busy,
  output logic         done,
  output logic         berr,
  output logic [31:0]  rdata,
  output vme_dtb_out_t dtb,
  input  logic         dtack_n,
  input  logic         berr_n,
  input  logic [31:0]  d_in
);
  localparam longint unsigned WAIT_PS = longint'(READ_WAIT_NS) * 1000;
  localparam longint unsigned CLK_PS  = 64'd1_000_000_000_000 / longint'(CLK_HZ);
  localparam int unsigned READ_WAIT_CYC = int'((WAIT_PS + CLK_PS - 1) / CLK_PS);

  typedef enum logic [2:0] {
    RD_IDLE, RD_SETUP, RD_WAIT_FREE, RD_WAIT_ACK, RD_HOLD, RD_END_AS, RD_END
  } rd_state_e;
  rd_state_e   state;
  logic [7:0]  cnt;
  vme_cmd_t    c;
  vme_lanes_t  lanes;
  logic        dtack_s, berr_s;

  bit_sync #(.RESET_VAL(1'b1)) u_dtack_sync (.clk(clk), .rst(rst), .d(dtack_n), .q(dtack_s));
  bit_sync #(.RESET_VAL(1'b1)) u_berr_sync  (.clk(clk), .rst(rst), .d(berr_n),  .q(berr_s));

  assign busy  = (state != RD_IDLE);
  assign lanes = dtb_lanes(c.dw, addr_masked(c.aw, c.addr));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= RD_IDLE;
      dtb   <= DTB_IDLE;
      cnt   <= '0;
      c     <= '0;
      done  <= 1'b0;
      berr  <= 1'b0;
      rdata <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        RD_IDLE: if (start) begin
          c     <= cmd;
          dtb   <= dtb_address_phase(cmd);
          cnt   <= '0;
          state <= RD_SETUP;
        end
        RD_SETUP: begin
          cnt <= cnt + 1'b1;
          if (cnt >= 8'(SETUP_CYC - 1)) begin
            dtb.as_n    <= 1'b0;
            dtb.write_n <= 1'b1;
            state       <= RD_WAIT_FREE;
          end
        end
        RD_WAIT_FREE: if (dtack_s && berr_s) begin
          dtb.ds0_n <= lanes.ds0_n;
          dtb.ds1_n <= lanes.ds1_n;
          state     <= RD_WAIT_ACK;
        end
        RD_WAIT_ACK: if (!berr_s) begin
          berr      <= 1'b1;
          rdata     <= '0;
          dtb.ds0_n <= 1'b1;
          dtb.ds1_n <= 1'b1;
          state     <= RD_END_AS;
        end else if (!dtack_s) begin
          berr  <= 1'b0;
          cnt   <= '0;
          state <= RD_HOLD;
        end
        RD_HOLD: begin
          cnt <= cnt + 1'b1;
          if (cnt >= 8'(READ_WAIT_CYC - 1)) begin
            rdata     <= (d_in >> {lanes.shift, 3'b000}) & dw_mask(c.dw);
            dtb.ds0_n <= 1'b1;
            dtb.ds1_n <= 1'b1;
            state     <= RD_END_AS;
          end
        end
        RD_END_AS: begin
          dtb.as_n <= 1'b1;
          state    <= RD_END;
        end
        RD_END: begin
          dtb   <= DTB_IDLE;
          done  <= 1'b1;
          state <= RD_IDLE;
        end
        default: state <= RD_IDLE;
      endcase
    end
  end

  // A read never drives the data lines.
  a_no_drive_on_read: assert property (@(posedge clk) disable iff (rst) !dtb.d_oe);
endmodule
