// Shared types and helpers of the VMEbus exerciser.
//
// The exerciser is a single-cycle-transfer (SCT) VMEbus master that runs three
// kinds of cycle: address-only (ADO), write and read.  Each cycle uses one of
// the A16, A24 or A32 address widths and one of the D08(EO), D08(O), D16 and
// D32 data widths, as the exerciser's specification lists them.
//
// dtb_lanes() turns an address and a data width into the VMEbus byte-lane
// controls (DS0*, DS1*, LWORD*, A01) and the data-line position.  The lane
// rules are those of the VMEbus standard (IEEE 1014): DS1* selects the even
// byte on D15..D08, DS0* the odd byte on D07..D00, both for D16, and LWORD*
// low with both strobes for D32.  D08(O) is an odd-byte-only transfer, so its
// strobe is always DS0*.
//
// Command byte (first byte of a command frame on the serial link), this
// design's own encoding:
//   [1:0] operation    0 = ADO, 1 = write, 2 = read (3 is not a command)
//   [3:2] data width   0 = D08(EO), 1 = D08(O), 2 = D16, 3 = D32
//   [5:4] address width 0 = A16, 1 = A24, 2 = A32
//   [7:6] ignored
package vme_pkg;

  typedef enum logic [1:0] {
    OP_ADO   = 2'd0,
    OP_WRITE = 2'd1,
    OP_READ  = 2'd2,
    OP_NONE  = 2'd3
  } vme_op_e;

  typedef enum logic [1:0] {
    AW_A16 = 2'd0,
    AW_A24 = 2'd1,
    AW_A32 = 2'd2,
    AW_BAD = 2'd3
  } vme_aw_e;

  typedef enum logic [1:0] {
    DW_D08EO = 2'd0,
    DW_D08O  = 2'd1,
    DW_D16   = 2'd2,
    DW_D32   = 2'd3
  } vme_dw_e;

  // One exerciser command as the sequencer hands it to a cycle core.
  typedef struct packed {
    vme_op_e     op;
    vme_aw_e     aw;
    vme_dw_e     dw;
    logic [5:0]  am;     // address modifier, sent by the host as given
    logic [31:0] addr;   // byte address
    logic [31:0] data;   // write data, right-aligned (D08 in [7:0], D16 in [15:0])
  } vme_cmd_t;

  // What a cycle core drives onto the data transfer bus.  All strobes are
  // active low as on the backplane; the *_oe bits enable the main-board
  // drivers for the address group and the data lines.
  typedef struct packed {
    logic        addr_oe;   // drive A31..A01, AM, LWORD*, IACK*, WRITE*, AS*, DS*
    logic [31:1] a;
    logic [5:0]  am;
    logic        lword_n;
    logic        iack_n;
    logic        write_n;
    logic        as_n;
    logic        ds0_n;
    logic        ds1_n;
    logic        d_oe;      // drive D31..D00
    logic [31:0] d;
  } vme_dtb_out_t;

  localparam vme_dtb_out_t DTB_IDLE = '{
    addr_oe: 1'b0, a: '0, am: '0, lword_n: 1'b1, iack_n: 1'b1,
    write_n: 1'b1, as_n: 1'b1, ds0_n: 1'b1, ds1_n: 1'b1, d_oe: 1'b0, d: '0};

  // Byte-lane controls for one transfer.
  typedef struct packed {
    logic       ds0_n;
    logic       ds1_n;
    logic       lword_n;
    logic       a01;
    logic [1:0] shift;   // position of the data on D31..D00, in bytes
  } vme_lanes_t;

  // Address as it is put on the bus: bits above the address width are zero.
  function automatic logic [31:0] addr_masked(vme_aw_e aw, logic [31:0] addr);
    case (aw)
      AW_A16:  return {16'h0000, addr[15:0]};
      AW_A24:  return {8'h00, addr[23:0]};
      default: return addr;
    endcase
  endfunction

  function automatic vme_lanes_t dtb_lanes(vme_dw_e dw, logic [31:0] addr);
    vme_lanes_t l;
    l.a01     = addr[1];
    l.lword_n = 1'b1;
    l.shift   = 2'd0;
    case (dw)
      DW_D08EO: begin
        // even byte (A00 = 0) on D15..D08 with DS1*, odd byte on D07..D00 with DS0*
        l.ds1_n = addr[0];
        l.ds0_n = ~addr[0];
        l.shift = addr[0] ? 2'd0 : 2'd1;
      end
      DW_D08O: begin
        l.ds1_n = 1'b1;
        l.ds0_n = 1'b0;
      end
      DW_D16: begin
        l.ds1_n = 1'b0;
        l.ds0_n = 1'b0;
      end
      default: begin  // D32: quad-byte aligned, LWORD* low, A01 low
        l.ds1_n   = 1'b0;
        l.ds0_n   = 1'b0;
        l.lword_n = 1'b0;
        l.a01     = 1'b0;
      end
    endcase
    return l;
  endfunction

  // Mask of the meaningful bits of right-aligned data for a width.
  function automatic logic [31:0] dw_mask(vme_dw_e dw);
    case (dw)
      DW_D16:  return 32'h0000_FFFF;
      DW_D32:  return 32'hFFFF_FFFF;
      default: return 32'h0000_00FF;
    endcase
  endfunction

  // Number of data bytes a width moves.
  function automatic logic [2:0] dw_bytes(vme_dw_e dw);
    case (dw)
      DW_D16:  return 3'd2;
      DW_D32:  return 3'd4;
      default: return 3'd1;
    endcase
  endfunction

  // Data-transfer-bus outputs common to all three cycle types.
  function automatic vme_dtb_out_t dtb_address_phase(vme_cmd_t c);
    vme_dtb_out_t o;
    logic [31:0]  a;
    vme_lanes_t   l;
    a         = addr_masked(c.aw, c.addr);
    l         = dtb_lanes(c.dw, a);
    o         = DTB_IDLE;
    o.addr_oe = 1'b1;
    o.a       = {a[31:2], l.a01};
    o.am      = c.am;
    o.lword_n = l.lword_n;
    o.iack_n  = 1'b1;
    return o;
  endfunction

endpackage
