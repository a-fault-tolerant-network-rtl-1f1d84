// brain_pkg: types and constants shared by the braided-ring (BRAIN) node logic.
//
// A frame on a ring link is four bytes, each sent as a 10-bit serial character
// (start bit 0, eight data bits, stop bit 1):
//   byte 0  mode selection identifier: [7:4] target node ID, [3:0] relaying number
//   byte 1  data word, high byte
//   byte 2  data word, low byte
//   byte 3  integrity flag (8'h01 valid, 8'h00 invalid)
// The identifier layout and the 16-bit data word follow the published node
// design; the byte order of the frame and the coding of the flag byte are this
// design's own choice.
package brain_pkg;

  localparam int unsigned ID_W    = 4;   // node ID width
  localparam int unsigned RELAY_W = 4;   // relaying number width
  localparam int unsigned DATA_W  = 16;  // checked data word width
  localparam int unsigned FRAME_BYTES = 4;
  localparam int unsigned BITS_PER_CHAR = 10;  // start + 8 data + stop

  // relaying number written by the sending node
  localparam logic [RELAY_W-1:0] RELAY_SENDER = 4'h1;

  typedef struct packed {
    logic [ID_W-1:0]    dst;    // node ID of the receiving node
    logic [RELAY_W-1:0] relay;  // relaying number
  } ident_t;

  typedef struct packed {
    ident_t              ident;
    logic [DATA_W-1:0]   data;
    logic                flag;  // integrity flag
  } frame_t;

  // operating mode chosen from a received identifier
  typedef enum logic [1:0] {
    MODE_NONE    = 2'd0,
    MODE_PRIMARY = 2'd1,  // primary relaying node
    MODE_CHECK   = 2'd2,  // checking-relaying node
    MODE_RECEIVE = 2'd3   // receiving node
  } mode_e;

endpackage
