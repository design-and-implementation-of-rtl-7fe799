// Address-only (ADO) cycle core: broadcasts an address on the VMEbus
// without moving data.
//
// Sequence, as the exerciser's ADO cycle is defined:
//   1-3. present the address, the address modifier and LWORD*;
//   4.   wait the address set-up time (SETUP_CYC clocks);
//   5.   drive AS* low;
//   6.   wait for the slave's answer, DTACK* or BERR* low;
//   7.   leave DS0*/DS1* high and drive AS* high,
// then release the address lines and pulse done for one clock, with berr
// set if the answer was BERR*.  The data strobes are never driven low.
// SETUP_CYC = 2 (40 ns at the assumed 50 MHz clock, above the 35 ns the
// VMEbus standard asks for) is this design's choice; the specification only says
// "wait for set-up time".  DTACK* and BERR* are synchronised (two flip-flops).
// The core must be given the bus (BBSY* owned) before start.  start is
// ignored while busy.
module vme_ado_core
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
  typedef enum logic [1:0] {AD_IDLE, AD_SETUP, AD_WAIT_ACK, AD_END} ad_state_e;
  ad_state_e   state;
  logic [7:0]  cnt;
  logic        dtack_s, berr_s;

  bit_sync #(.RESET_VAL(1'b1)) u_dtack_sync (.clk(clk), .rst(rst), .d(dtack_n), .q(dtack_s));
  bit_sync #(.RESET_VAL(1'b1)) u_berr_sync  (.clk(clk), .rst(rst), .d(berr_n),  .q(berr_s));

  assign busy = (state != AD_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= AD_IDLE;
      dtb   <= DTB_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
      berr  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        AD_IDLE: if (start) begin
          dtb   <= dtb_address_phase(cmd);
          cnt   <= '0;
          state <= AD_SETUP;
        end
        AD_SETUP: begin
          cnt <= cnt + 1'b1;
          if (cnt >= 8'(SETUP_CYC - 1)) begin
            dtb.as_n <= 1'b0;
            state    <= AD_WAIT_ACK;
          end
        end
        AD_WAIT_ACK: if (!dtack_s || !berr_s) begin
          berr      <= !berr_s;
          dtb.ds0_n <= 1'b1;
          dtb.ds1_n <= 1'b1;
          dtb.as_n  <= 1'b1;
          state     <= AD_END;
        end
        AD_END: begin
          dtb   <= DTB_IDLE;
          done  <= 1'b1;
          state <= AD_IDLE;
        end
        default: state <= AD_IDLE;
      endcase
    end
  end

  a_no_data_strobe: assert property (@(posedge clk) disable iff (rst)
    dtb.ds0_n && dtb.ds1_n && !dtb.d_oe);
endmodule
