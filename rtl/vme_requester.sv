// VMEbus requester: obtains and gives up ownership of the data transfer bus.
//
// The exerciser uses single-level (SGL) arbitration on request level 3 and
// the release-when-done (RWD) option.  While req is high it drives BR3* low
// and watches BG3IN*; once the grant arrives it drives BBSY* low and reports
// granted.  When req falls it drives BBSY* high again (bus release).
// These three steps are the specification's bus request and bus release routines.
// This design adds, where the specification says nothing:
//  * BR3* is withdrawn once BBSY* is driven, as the VMEbus arbitration
//    protocol expects of a requester;
//  * BBSY* is held until the arbiter has taken BG3IN* away, so a quick cycle
//    cannot be mistaken for a second grant;
//  * while this board neither requests nor owns the bus, BG3IN* is passed on
//    to BG3OUT* so that boards further down the daisy chain can be granted.
// BG3IN* is synchronised to clk (two flip-flops), so a grant is seen 2-3
// clocks after it arrives.  Bus lines are active low; br3_n and bbsy_n are
// meant for open-collector drivers on the main board.
module vme_requester (
  input  logic clk,
  input  logic rst,
  input  logic req,        // keep high for as long as the bus is needed
  output logic granted,    // this board owns the bus (BBSY* driven low)
  input  logic bg3in_n,    // bus grant in, level 3, from the daisy chain
  output logic bg3out_n,   // bus grant out, level 3, to the next slot
  output logic br3_n,      // bus request, level 3
  output logic bbsy_n      // bus busy
);
  typedef enum logic [1:0] {RQ_IDLE, RQ_REQUEST, RQ_OWN} rq_state_e;
  rq_state_e state;
  logic      bg_s;

  bit_sync #(.RESET_VAL(1'b1)) u_bg_sync (
    .clk(clk), .rst(rst), .d(bg3in_n), .q(bg_s));

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= RQ_IDLE;
      br3_n  <= 1'b1;
      bbsy_n <= 1'b1;
    end else begin
      case (state)
        RQ_IDLE: if (req) begin
          br3_n <= 1'b0;                 // drive BR3* low
          state <= RQ_REQUEST;
        end
        RQ_REQUEST: if (!bg_s) begin     // BG3IN* low: bus granted
          bbsy_n <= 1'b0;                // drive BBSY* low
          br3_n  <= 1'b1;
          state  <= RQ_OWN;
        end
        RQ_OWN: if (!req && bg_s) begin  // done, and the grant is gone
          bbsy_n <= 1'b1;                // release the bus
          state  <= RQ_IDLE;
        end
        default: state <= RQ_IDLE;
      endcase
    end
  end

  assign granted  = (state == RQ_OWN);
  assign bg3out_n = (state == RQ_IDLE && !req) ? bg3in_n : 1'b1;

  // BBSY* is driven low only after BG3IN* has been seen low.
  a_bbsy_only_after_grant: assert property (@(posedge clk) disable iff (rst)
    $fell(bbsy_n) |-> $past(!bg_s));
endmodule
