// nic_pkg -- shared types and constants of the network interface chip (NIC).
//
// A message is five 32-bit words m0..m4 plus a 4-bit type field; the upper
// 8 bits of m0 carry the routing address of the destination node. The
// processor sees fourteen interface registers (o0..o4, i0..i4, CONTROL,
// STATUS, CODEBASE, MSGIP) through loads and stores in a 64 KiB window;
// the low address bits of each access also carry a SEND and a NEXT command.
//
// Taken from the architecture: message format, register set, the address
// line assignment (register number in a[5:2], type in a[10:6], NEXT in a[11],
// send mode in a[13:12]) and the MsgIP layout. The register numbering of
// CONTROL/STATUS/CODEBASE/MSGIP (10..13, the order in which the register set
// is listed), and the bit layouts of CONTROL and STATUS, are this design's own.
package nic_pkg;

  localparam int unsigned WORD_W  = 32;   // machine word
  localparam int unsigned NWORDS  = 5;    // words per message, m0..m4
  localparam int unsigned TYPE_W  = 4;    // message type field

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [TYPE_W-1:0] mtype_t;

  // One message as it sits in a queue or in the input registers.
  typedef struct packed {
    mtype_t                  mtype;
    logic [NWORDS-1:0][WORD_W-1:0] w;     // w[k] is word mk
  } msg_t;

  // Interface register numbers (address bits 5:2).
  typedef enum logic [3:0] {
    R_O0 = 4'd0, R_O1 = 4'd1, R_O2 = 4'd2, R_O3 = 4'd3, R_O4 = 4'd4,
    R_I0 = 4'd5, R_I1 = 4'd6, R_I2 = 4'd7, R_I3 = 4'd8, R_I4 = 4'd9,
    R_CONTROL  = 4'd10,
    R_STATUS   = 4'd11,
    R_CODEBASE = 4'd12,
    R_MSGIP    = 4'd13
  } reg_num_e;

  // SEND mode (address bits 13:12).
  typedef enum logic [1:0] {
    SEND_NONE    = 2'b00,
    SEND_PLAIN   = 2'b01,
    SEND_REPLY   = 2'b10,   // m0,m1 <- i1,i2
    SEND_FORWARD = 2'b11    // m3,m4 <- i3,i4
  } send_mode_e;

  // Decoded low address bits of one access.
  typedef struct packed {
    reg_num_e   regnum;
    mtype_t     stype;      // type of the message to send
    logic       next;
    send_mode_e mode;
  } nic_cmd_t;

  // MsgIP handler IDs that are not message types.
  localparam mtype_t HID_NOMSG = 4'd14;
  localparam mtype_t HID_EXC   = 4'd15;

  // CONTROL register fields (this design's layout).
  localparam int unsigned CTL_ITHR_LSB = 0;    // [4:0]  input queue threshold
  localparam int unsigned CTL_OTHR_LSB = 8;    // [12:8] output queue threshold
  localparam int unsigned CTL_STALL    = 16;   // 1: stall on full output queue, 0: exception
  localparam int unsigned CNT_W        = 5;    // width of a queue count / threshold

  // STATUS register fields (this design's layout).
  localparam int unsigned ST_VALID   = 0;    // input registers hold a message
  localparam int unsigned ST_IAFULL  = 1;
  localparam int unsigned ST_OAFULL  = 2;
  localparam int unsigned ST_EXC     = 3;    // any exceptional condition
  localparam int unsigned ST_TYPE    = 8;    // [11:8] type of the current input message
  localparam int unsigned ST_SOVF    = 12;   // SEND refused, output queue full (write 1 to clear)
  localparam int unsigned ST_INERR   = 13;   // framing error at the input port (write 1 to clear)
  localparam int unsigned ST_ICNT    = 16;   // [20:16] messages in the input queue
  localparam int unsigned ST_OCNT    = 24;   // [28:24] messages in the output queue

endpackage
