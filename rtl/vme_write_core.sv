// Single-cycle write core: writes one byte, word or long word to a VMEbus
// slave.
//
// Sequence, as the exerciser's write cycle is defined:
//   1-4. present address, address modifier, LWORD*, and IACK* high;
//   5.   wait the address set-up time (SETUP_CYC clocks);
//   6-7. drive AS* low and WRITE* low;
//   8.   wait until DTACK* and BERR* are both high (the previous slave has
//        let go of them);
//   9.   place the data on its byte lanes;
//   10.  one clock later drive DS0*/DS1* to the values of the data width;
//   11.  wait for DTACK* low (BERR* low ends the cycle as a bus error);
//   12.  drive DS0* and DS1* high;
//   13.  one clock later drive AS* high,
// then release the bus lines and pulse done, with berr for a bus error.
// Byte lanes follow the VMEbus standard (see vme_pkg::dtb_lanes); the write
// data in cmd.data is right-aligned.  SETUP_CYC and the one-clock spacing of
// the steps are this design's choices.  DTACK* and BERR* are synchronised
// with two flip-flops.
module vme_write_core
  import vme_pkg::*;
#(
  parameter int unsigned SETUP_CYC = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  vme_cmd_t     cmd,
  output logic         busy,
  output logic         done,
  output logic         berr,
  output vme_dtb_out_t dtb,
  input  logic         dtack_n,
  input  logic         berr_n
);
  typedef enum logic [2:0] {
    WR_IDLE, WR_SETUP, WR_WAIT_FREE, WR_DATA, WR_WAIT_ACK, WR_END_AS, WR_END
  } wr_state_e;
  wr_state_e   state;
  logic [7:0]  cnt;
  vme_cmd_t    c;
  vme_lanes_t  lanes;
  logic        dtack_s, berr_s;

  bit_sync #(.RESET_VAL(1'b1)) u_dtack_sync (.clk(clk), .rst(rst), .d(dtack_n), .q(dtack_s));
  bit_sync #(.RESET_VAL(1'b1)) u_berr_sync  (.clk(clk), .rst(rst), .d(berr_n),  .q(berr_s));

  assign busy  = (state != WR_IDLE);
  assign lanes = dtb_lanes(c.dw, addr_masked(c.aw, c.addr));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= WR_IDLE;
      dtb   <= DTB_IDLE;
      cnt   <= '0;
      c     <= '0;
      done  <= 1'b0;
      berr  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        WR_IDLE: if (start) begin
          c     <= cmd;
          dtb   <= dtb_address_phase(cmd);
          cnt   <= '0;
          state <= WR_SETUP;
        end
        WR_SETUP: begin
          cnt <= cnt + 1'b1;
          if (cnt >= 8'(SETUP_CYC - 1)) begin
            dtb.as_n    <= 1'b0;
            dtb.write_n <= 1'b0;
            state       <= WR_WAIT_FREE;
          end
        end
        WR_WAIT_FREE: if (dtack_s && berr_s) begin
          dtb.d_oe <= 1'b1;
          dtb.d    <= (c.data & dw_mask(c.dw)) << {lanes.shift, 3'b000};
          state    <= WR_DATA;
        end
        WR_DATA: begin
          dtb.ds0_n <= lanes.ds0_n;
          dtb.ds1_n <= lanes.ds1_n;
          state     <= WR_WAIT_ACK;
        end
        WR_WAIT_ACK: if (!dtack_s || !berr_s) begin
          berr      <= !berr_s;
          dtb.ds0_n <= 1'b1;
          dtb.ds1_n <= 1'b1;
          state     <= WR_END_AS;
        end
        WR_END_AS: begin
          dtb.as_n <= 1'b1;
          state    <= WR_END;
        end
        WR_END: begin
          dtb   <= DTB_IDLE;
          done  <= 1'b1;
          state <= WR_IDLE;
        end
        default: state <= WR_IDLE;
      endcase
    end
  end

  // Data strobes only while AS* is low, and never before the data is driven.
  a_ds_inside_as: assert property (@(posedge clk) disable iff (rst)
    (!dtb.ds0_n || !dtb.ds1_n) |-> (!dtb.as_n && dtb.d_oe && !dtb.write_n));
endmodule
