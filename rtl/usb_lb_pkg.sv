// usb_lb_pkg: types and constants shared by the USB to local bus bridge.
//
// The host talks to the bridge through a byte stream. Every byte carries a
// start-of-frame marker in bit 7 and seven payload bits in bits 6..0. The
// command codes keep the order of the two-bit code of the block protocol
// (write, read, block write, block read) and add the scattered block read
// and write; the 3-bit code, its place in the header byte and the status
// byte layout are this design's own choice.
//
// Internally every bus operation is an "access": a request held stable from
// valid until the target answers with a one-cycle done pulse.
package usb_lb_pkg;

  localparam int unsigned AW = 16;   // local bus address width
  localparam int unsigned DW = 16;   // local bus data width

  // Command codes, bits 6..4 of the header byte.
  typedef enum logic [2:0] {
    OP_WRITE      = 3'd0,  // one (address, data) record
    OP_READ       = 3'd1,  // one address record
    OP_BLK_WRITE  = 3'd2,  // length, start address, L data words
    OP_BLK_READ   = 3'd3,  // length, start address
    OP_SCAT_WRITE = 3'd4,  // length, L (address, data) records
    OP_SCAT_READ  = 3'd5   // length, L address records
  } op_e;

  // Payload bytes of the records (7 payload bits per byte).
  localparam int unsigned ADDR_BYTES = 3;  // 16-bit address in 21 bits
  localparam int unsigned WORD_BYTES = 3;  // 16-bit data in 21 bits
  localparam int unsigned PAIR_BYTES = 5;  // address and data in 35 bits

  // Status byte: {1, op[2:0], bad_op, frame_err, bus_err, err}.
  localparam int unsigned ST_ERR       = 0;
  localparam int unsigned ST_BUS_ERR   = 1;
  localparam int unsigned ST_FRAME_ERR = 2;
  localparam int unsigned ST_BAD_OP    = 3;

  typedef struct packed {
    logic          valid;  // request pending; fields stable until done
    logic          we;     // 1 = write, 0 = read
    logic [AW-1:0] addr;
    logic [DW-1:0] wdata;
    logic          first;  // first word of a block (starts an I2C transaction)
    logic          last;   // last word of a block (ends an I2C transaction)
  } acc_req_t;

  typedef struct packed {
    logic          done;   // one-cycle pulse: access finished
    logic          err;    // access failed (bus timeout, I2C no-acknowledge)
    logic [DW-1:0] rdata;  // read data, valid with done
  } acc_rsp_t;

  function automatic logic is_read_op(logic [2:0] op);
    return op == OP_READ || op == OP_BLK_READ || op == OP_SCAT_READ;
  endfunction

endpackage
