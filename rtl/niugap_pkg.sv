// niugap_pkg: field widths and the packet type shared by the NIUGAP network
// interface. A packet is 88 bits: a 3-bit Gray time tag, a 12-bit Gray
// sequence tag, 3-bit source and destination addresses, 3 control bits and a
// 64-bit payload, in that order from the most significant bit. These widths
// and the field order are those of the NIUGAP packet format; the 16-bit
// processor word (four words per payload) is this design's choice. The tag
// widths here are defaults: the modules that handle tags take TIME_W, SEQ_W
// and the packet type as parameters, so other tag sizes can be built.
package niugap_pkg;

  localparam int DEFAULT_TIME_W = 3;
  localparam int DEFAULT_SEQ_W  = 12;
  localparam int TAG_W     = DEFAULT_TIME_W + DEFAULT_SEQ_W;
  localparam int ADDR_W    = 3;
  localparam int CTRL_W    = 3;
  localparam int PAYLOAD_W = 64;
  localparam int WORD_W    = 16;
  localparam int NWORDS    = PAYLOAD_W / WORD_W;

  typedef logic [DEFAULT_TIME_W-1:0] time_tag_t;
  typedef logic [DEFAULT_SEQ_W-1:0]  seq_tag_t;
  typedef logic [TAG_W-1:0]     tag_t;
  typedef logic [ADDR_W-1:0]    addr_t;
  typedef logic [CTRL_W-1:0]    ctrl_t;
  typedef logic [PAYLOAD_W-1:0] payload_t;
  typedef logic [WORD_W-1:0]    word_t;
  typedef word_t [NWORDS-1:0]   words_t;  // index NWORDS-1 is the first word

  typedef struct packed {
    time_tag_t time_tag;
    seq_tag_t  seq_tag;
    addr_t     src;
    addr_t     dst;
    ctrl_t     ctrl;
    payload_t  payload;
  } packet_t;

  localparam int PKT_W = $bits(packet_t);
  // bits of a packet besides the two tags
  localparam int HDR_PAY_W = 2 * ADDR_W + CTRL_W + PAYLOAD_W;

endpackage
