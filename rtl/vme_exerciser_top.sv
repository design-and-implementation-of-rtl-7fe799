// VMEbus exerciser: a single-cycle-transfer VMEbus master driven from a PC
// over RS-232.
//
// The PC sends command frames (see cmd_sequencer) at 9600 baud, 8N1.  The
// UART receive macro buffers them; the command sequencer echoes each
// character, assembles the frame, asks the requester for the bus (BR3*,
// single-level arbitration, release when done), starts the ADO, write or read
// core, releases the bus and, after a read, sends the data back through the
// UART transmit macro.  The LEDs and 7-segment display show the outcome.
//
// VMEbus side: the data transfer bus leaves as one struct, dtb_o, holding
// every address-group and strobe line with an output enable (addr_oe) and
// the data lines with theirs (d_oe); these enables are for the main board's
// transceivers and drivers, which sit between these ports and the backplane.
// DTACK*, BERR*, BG3IN* and the data lines come back as plain inputs; the
// cores and the requester synchronise the handshake inputs themselves.
// All bus signals use backplane polarity (names ending in _n are active low).
// rst is synchronous and active high.
//
// Timing: a command takes as long as its characters take on the serial line
// (about 1.04 ms each at 9600 baud, plus a 1 ms pause after every character
// sent back); the bus cycle itself lasts a few clocks plus the slave's
// response time (see the cycle cores).
//
// What follows the exerciser's specification: the chain PC - UART - program -
// I/O ports - main board, the UART ports and line settings, the echo and the
// 1 ms pause after each sent character, request/transfer/release around every
// cycle, the three cycle types with their step order, the LED and display
// use.  This design's own choices: the program is a set of hardware state
// machines instead of code on an 8-bit soft processor, the frame encoding,
// the 50 MHz clock, the way the three cores share the bus pins (a multiplexer
// on their busy flags) and the bus-error LED.  The receive buffer's full flag
// is left open: the sequencer drains the buffer faster than characters
// arrive.  LEDs 5..0 and the display's decimal point are unused and held off.
module vme_exerciser_top
  import vme_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 50_000_000,
  parameter int unsigned BAUD         = 9600,
  parameter int unsigned CHAR_GAP_US  = 1000,
  parameter int unsigned SETUP_CYC    = 2,
  parameter int unsigned READ_WAIT_NS = 25,
  parameter int unsigned DIGIT_CYC    = 50_000,
  parameter int unsigned FIFO_DEPTH   = 16
) (
  input  logic         clk,
  input  logic         rst,
  // RS-232 to the PC
  input  logic         rs232_rxd,
  output logic         rs232_txd,
  // VMEbus data transfer bus
  output vme_dtb_out_t dtb_o,
  input  logic [31:0]  d_i,
  input  logic         dtack_n_i,
  input  logic         berr_n_i,
  // VMEbus arbitration bus
  output logic         br3_n_o,
  output logic         bbsy_n_o,
  input  logic         bg3in_n_i,
  output logic         bg3out_n_o,
  // front panel
  input  logic         show_high,
  output logic [7:0]   led,
  output logic [7:0]   seg_n,
  output logic [3:0]   an_n
);
  logic en16;
  logic [7:0] rx_data, tx_data;
  logic rx_present, rx_read, tx_write, tx_full;
  logic bus_req, bus_granted;
  vme_cmd_t cmd;
  logic start_ado, start_write, start_read;
  logic ado_busy, wr_busy, rd_busy;
  logic ado_done, wr_done, rd_done;
  logic ado_berr, wr_berr, rd_berr;
  logic [31:0] rd_data, last_rdata;
  vme_dtb_out_t ado_dtb, wr_dtb, rd_dtb;
  logic cycle_ok, cycle_berr;

  baud_gen #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_baud (
    .clk(clk), .rst(rst), .en_16_x_baud(en16));

  uart_rx #(.DEPTH(FIFO_DEPTH)) u_rx (
    .clk(clk), .reset_buffer(rst), .serial_in(rs232_rxd), .en_16_x_baud(en16),
    .read(rx_read), .dout(rx_data), .buffer_full(), .data_present(rx_present));

  uart_tx #(.DEPTH(FIFO_DEPTH)) u_tx (
    .clk(clk), .reset_buffer(rst), .din(tx_data), .write(tx_write),
    .en_16_x_baud(en16), .buffer_full(tx_full), .serial_out(rs232_txd));

  cmd_sequencer #(.CLK_HZ(CLK_HZ), .CHAR_GAP_US(CHAR_GAP_US)) u_seq (
    .clk(clk), .rst(rst),
    .rx_data(rx_data), .rx_present(rx_present), .rx_read(rx_read),
    .tx_data(tx_data), .tx_write(tx_write), .tx_full(tx_full),
    .bus_req(bus_req), .bus_granted(bus_granted),
    .cmd(cmd), .start_ado(start_ado), .start_write(start_write), .start_read(start_read),
    .xfer_done(ado_done | wr_done | rd_done),
    .xfer_berr((ado_done & ado_berr) | (wr_done & wr_berr) | (rd_done & rd_berr)),
    .xfer_rdata(rd_data),
    .cycle_ok(cycle_ok), .cycle_berr(cycle_berr), .last_rdata(last_rdata));

  vme_requester u_req (
    .clk(clk), .rst(rst), .req(bus_req), .granted(bus_granted),
    .bg3in_n(bg3in_n_i), .bg3out_n(bg3out_n_o), .br3_n(br3_n_o), .bbsy_n(bbsy_n_o));

  vme_ado_core #(.SETUP_CYC(SETUP_CYC)) u_ado (
    .clk(clk), .rst(rst), .start(start_ado), .cmd(cmd), .busy(ado_busy),
    .done(ado_done), .berr(ado_berr), .dtb(ado_dtb),
    .dtack_n(dtack_n_i), .berr_n(berr_n_i));

  vme_write_core #(.SETUP_CYC(SETUP_CYC)) u_wr (
    .clk(clk), .rst(rst), .start(start_write), .cmd(cmd), .busy(wr_busy),
    .done(wr_done), .berr(wr_berr), .dtb(wr_dtb),
    .dtack_n(dtack_n_i), .berr_n(berr_n_i));

  vme_read_core #(.SETUP_CYC(SETUP_CYC), .CLK_HZ(CLK_HZ), .READ_WAIT_NS(READ_WAIT_NS)) u_rd (
    .clk(clk), .rst(rst), .start(start_read), .cmd(cmd), .busy(rd_busy),
    .done(rd_done), .berr(rd_berr), .rdata(rd_data), .dtb(rd_dtb),
    .dtack_n(dtack_n_i), .berr_n(berr_n_i), .d_in(d_i));

  // Only one core is active at a time; the idle ones output DTB_IDLE.
  always_comb begin
    if (wr_busy)       dtb_o = wr_dtb;
    else if (rd_busy)  dtb_o = rd_dtb;
    else if (ado_busy) dtb_o = ado_dtb;
    else               dtb_o = DTB_IDLE;
  end

  status_display #(.DIGIT_CYC(DIGIT_CYC)) u_disp (
    .clk(clk), .rst(rst), .cycle_ok(cycle_ok), .cycle_berr(cycle_berr),
    .rdata(last_rdata), .show_high(show_high), .led(led), .seg_n(seg_n), .an_n(an_n));

  a_one_core: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ado_busy, wr_busy, rd_busy}));
  a_bus_owned: assert property (@(posedge clk) disable iff (rst)
    (ado_busy || wr_busy || rd_busy) |-> !bbsy_n_o);
endmodule
