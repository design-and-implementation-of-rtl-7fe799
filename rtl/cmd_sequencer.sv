// Command sequencer: the exerciser's main program, as a state machine.
//
// It takes command frames from the UART receive buffer, runs each one on the
// VMEbus as bus request -> data transfer -> bus release, and answers the PC.
//
// Serial frame (this design's encoding; the specification fixes only the fields
// the PC sends: a header, the address modifier, four address bytes and, for
// a write, four data bytes):
//   byte 0  command byte (see vme_pkg): operation, data width, address width
//   byte 1  address modifier in bits [5:0]
//   byte 2-5 address, most significant byte first
//   byte 6-9 write data, most significant byte first (writes only)
// A command byte with operation 3 or address width 3 is dropped, so the
// receiver re-aligns on the next byte.
//
// As in the exerciser's receive routine, every received character is echoed
// back.  As in its send routine, the sequencer waits while the transmit
// buffer is full and pauses CHAR_GAP_US microseconds (1 ms in the specification)
// after handing over each character.  After a read the data bytes
// (1, 2 or 4 by data width) are sent, most significant first.
//
// The bus is requested only once a whole frame is in, held for exactly one
// data transfer, and released (release when done).  cycle_ok/cycle_berr
// report the last cycle for the LEDs; both clear when a new frame starts.
module cmd_sequencer
  import vme_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned CHAR_GAP_US = 1000
) (
  input  logic        clk,
  input  logic        rst,
  // UART receive buffer
  input  logic [7:0]  rx_data,
  input  logic        rx_present,
  output logic        rx_read,
  // UART transmit buffer
  output logic [7:0]  tx_data,
  output logic        tx_write,
  input  logic        tx_full,
  // bus requester
  output logic        bus_req,
  input  logic        bus_granted,
  // cycle cores
  output vme_cmd_t    cmd,
  output logic        start_ado,
  output logic        start_write,
  output logic        start_read,
  input  logic        xfer_done,
  input  logic        xfer_berr,
  input  logic [31:0] xfer_rdata,
  // status
  output logic        cycle_ok,
  output logic        cycle_berr,
  output logic [31:0] last_rdata
);
  localparam longint unsigned GAP_L = longint'(CLK_HZ) * longint'(CHAR_GAP_US) / 1_000_000;
  localparam int unsigned GAP_CYC = (GAP_L < 1) ? 1 : int'(GAP_L);
  localparam int unsigned GW = $clog2(GAP_CYC + 1);

  typedef enum logic [3:0] {
    SQ_RECV, SQ_STORE, SQ_SEND, SQ_GAP, SQ_REQUEST, SQ_XFER, SQ_WAIT_DONE,
    SQ_RELEASE, SQ_REPLY
  } sq_state_e;

  sq_state_e  state, ret_state;
  logic [7:0] byte_q;
  logic [3:0] idx;        // frame byte index
  logic [2:0] nreply;     // read data bytes still to send
  logic [GW-1:0] gap;

  function automatic logic [3:0] frame_len(vme_op_e op);
    return (op == OP_WRITE) ? 4'd10 : 4'd6;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= SQ_RECV;
      ret_state   <= SQ_RECV;
      byte_q      <= '0;
      idx         <= '0;
      nreply      <= '0;
      gap         <= '0;
      cmd         <= '0;
      rx_read     <= 1'b0;
      tx_write    <= 1'b0;
      tx_data     <= '0;
      bus_req     <= 1'b0;
      start_ado   <= 1'b0;
      start_write <= 1'b0;
      start_read  <= 1'b0;
      cycle_ok    <= 1'b0;
      cycle_berr  <= 1'b0;
      last_rdata  <= '0;
    end else begin
      rx_read     <= 1'b0;
      tx_write    <= 1'b0;
      start_ado   <= 1'b0;
      start_write <= 1'b0;
      start_read  <= 1'b0;
      case (state)
        // wait for a character; take it and echo it
        SQ_RECV: if (rx_present && !rx_read) begin
          byte_q    <= rx_data;
          rx_read   <= 1'b1;
          tx_data   <= rx_data;
          ret_state <= SQ_STORE;
          state     <= SQ_SEND;
        end
        // put the character into the frame
        SQ_STORE: begin
          state <= SQ_RECV;
          case (idx)
            4'd0: if (byte_q[1:0] != 2'd3 && byte_q[5:4] != 2'd3) begin
              cmd.op     <= vme_op_e'(byte_q[1:0]);
              cmd.dw     <= vme_dw_e'(byte_q[3:2]);
              cmd.aw     <= vme_aw_e'(byte_q[5:4]);
              cmd.am     <= '0;
              cmd.addr   <= '0;
              cmd.data   <= '0;
              cycle_ok   <= 1'b0;
              cycle_berr <= 1'b0;
              idx        <= 4'd1;
            end
            4'd1: begin
              cmd.am <= byte_q[5:0];
              idx    <= 4'd2;
            end
            4'd2, 4'd3, 4'd4, 4'd5: begin
              cmd.addr <= {cmd.addr[23:0], byte_q};
              idx      <= idx + 1'b1;
            end
            default: begin
              cmd.data <= {cmd.data[23:0], byte_q};
              idx      <= idx + 1'b1;
            end
          endcase
          if (idx != 4'd0 && idx + 1'b1 == frame_len(cmd.op)) begin
            idx   <= '0;
            state <= SQ_REQUEST;
          end
        end
        // hand tx_data to the transmit buffer, then pause
        SQ_SEND: if (!tx_full) begin
          tx_write <= 1'b1;
          gap      <= '0;
          state    <= SQ_GAP;
        end
        SQ_GAP: begin
          gap <= gap + 1'b1;
          if (gap >= GW'(GAP_CYC - 1)) state <= ret_state;
        end
        // bus_request routine
        SQ_REQUEST: begin
          bus_req <= 1'b1;
          if (bus_granted) state <= SQ_XFER;
        end
        // data_transfer routine
        SQ_XFER: begin
          start_ado   <= (cmd.op == OP_ADO);
          start_write <= (cmd.op == OP_WRITE);
          start_read  <= (cmd.op == OP_READ);
          state       <= SQ_WAIT_DONE;
        end
        SQ_WAIT_DONE: if (xfer_done) begin
          cycle_ok   <= !xfer_berr;
          cycle_berr <= xfer_berr;
          if (cmd.op == OP_READ) last_rdata <= xfer_rdata;
          state      <= SQ_RELEASE;
        end
        // bus_release routine
        SQ_RELEASE: begin
          bus_req <= 1'b0;
          if (!bus_granted) begin
            nreply <= (cmd.op == OP_READ) ? dw_bytes(cmd.dw) : 3'd0;
            state  <= SQ_REPLY;
          end
        end
        // send the read data, most significant byte first
        SQ_REPLY: if (nreply == 3'd0) begin
          state <= SQ_RECV;
        end else begin
          tx_data   <= last_rdata[8*(nreply-1) +: 8];
          nreply    <= nreply - 1'b1;
          ret_state <= SQ_REPLY;
          state     <= SQ_SEND;
        end
        default: state <= SQ_RECV;
      endcase
    end
  end

  // Exactly one cycle core is started at a time, and only while the bus is owned.
  a_one_start: assert property (@(posedge clk) disable iff (rst)
    $onehot0({start_ado, start_write, start_read}));
  a_start_owned: assert property (@(posedge clk) disable iff (rst)
    (start_ado || start_write || start_read) |-> bus_granted);
endmodule
