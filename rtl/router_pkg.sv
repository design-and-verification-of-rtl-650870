// router_pkg: types and constants shared by the blocks of the 1x3 packet router.
//
// A packet is a header byte, 1 to 63 payload bytes and a parity byte. The header
// carries the destination port in bits [1:0] (0, 1 or 2; 3 is not a valid port)
// and the payload length in bits [7:2], six bits, which
// covers the 1..63 byte range. The parity byte is the XOR of the header and every
// payload byte. Each output is buffered by a FIFO of 16 entries of 9 bits: the
// byte plus a flag that marks a header. The bit positions of the two header fields
// are this design's choice; the packet format, the sizes and the 30-cycle read
// time-out follow the router's description.
package router_pkg;

  localparam int unsigned DATA_W       = 8;   // byte width of every bus
  localparam int unsigned ADDR_W       = 2;   // destination field of the header
  localparam int unsigned LEN_W        = 6;   // payload length field of the header
  localparam int unsigned NUM_PORTS    = 3;   // client ports
  localparam int unsigned FIFO_DEPTH   = 16;  // entries per output FIFO
  localparam int unsigned FIFO_WIDTH   = 9;   // byte + header flag
  localparam int unsigned READ_TIMEOUT = 30;  // cycles a client may leave vld_out unanswered
  localparam int unsigned MAX_PAYLOAD  = 63;

  typedef logic [DATA_W-1:0] byte_t;
  typedef logic [ADDR_W-1:0] port_t;

  // Controller states, in the order the router description lists them.
  typedef enum logic [2:0] {
    DECODE_ADDRESS     = 3'd0,
    LOAD_FIRST_DATA    = 3'd1,
    LOAD_DATA          = 3'd2,
    LOAD_PARITY        = 3'd3,
    FIFO_FULL_STATE    = 3'd4,
    LOAD_AFTER_FULL    = 3'd5,
    WAIT_TILL_EMPTY    = 3'd6,
    CHECK_PARITY_ERROR = 3'd7
  } state_e;

  function automatic logic [LEN_W-1:0] hdr_len(byte_t header);
    return header[DATA_W-1:ADDR_W];
  endfunction

endpackage
