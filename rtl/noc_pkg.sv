// noc_pkg: types and constants shared by the word-aware network interface,
// the used-word predictor and the mesh routers.
//
// A cache line is 64 bytes, sixteen 32-bit words. A flit is 17 bytes: one
// flow-control byte (flit type, F/T) followed by 16 payload bytes. A body
// or tail flit carries four words of the line; a head or atomic flit carries
// source, destination, event, a 32-bit address and the 16-bit used-vector,
// and seven spare bytes. Byte 0 of the flit (F/T) sits in the most significant
// bits, so the packed structs below list the fields in byte order.
//
// Used-vector bit order follows the worked example of the scheme: word 0 is
// the most significant bit, so 16'hFF00 means "only words 0..7 are used".
// The numeric codes of the flit types and events are this design's choice.
package noc_pkg;

  localparam int unsigned WORD_BITS      = 32;
  localparam int unsigned LINE_WORDS     = 16;
  localparam int unsigned WORDS_PER_FLIT = 4;
  localparam int unsigned BODY_FLITS     = LINE_WORDS / WORDS_PER_FLIT;  // 4
  localparam int unsigned FLIT_BYTES     = 17;
  localparam int unsigned FLIT_BITS      = FLIT_BYTES * 8;               // 136
  localparam int unsigned PAYLOAD_BITS   = WORDS_PER_FLIT * WORD_BITS;   // 128
  localparam int unsigned SPARE_BITS     = 7 * 8;                        // bytes 10..16

  typedef logic [WORD_BITS-1:0]             word_t;
  typedef logic [LINE_WORDS-1:0]            wvec_t;   // used / dirty / valid vectors
  typedef logic [LINE_WORDS*WORD_BITS-1:0]  line_t;   // word i at bits [32*i +: 32]
  typedef logic [7:0]                       node_t;
  typedef logic [31:0]                      addr_t;

  typedef enum logic [7:0] {
    FT_HEAD = 8'h01,
    FT_BODY = 8'h02,
    FT_TAIL = 8'h03,
    FT_ATOM = 8'h04
  } ft_e;

  typedef enum logic [7:0] {
    EV_READ_REQ  = 8'h01,   // L1 fill request (atomic), carries the prediction
    EV_READ_RESP = 8'h02,   // cache line returned by the L2 bank
    EV_WRITE_REQ = 8'h03,   // dirty-line spill towards the L2 bank
    EV_WB_RESP   = 8'h04,   // write-back acknowledgement (atomic)
    EV_INVAL     = 8'h05    // invalidation (atomic)
  } event_e;

  // Flit-encoding scheme applied by a network interface.
  typedef enum logic [1:0] {
    SCHEME_FD   = 2'd1,     // flit-drop
    SCHEME_WR   = 2'd2,     // word-repeat
    SCHEME_FDWR = 2'd3      // both
  } scheme_e;

  typedef struct packed {
    ft_e                   ft;
    node_t                 src;
    node_t                 dst;
    event_e                ev;
    addr_t                 addr;
    wvec_t                 used;
    logic [SPARE_BITS-1:0] spare;
  } head_flit_t;

  typedef struct packed {
    ft_e                                  ft;
    logic [WORDS_PER_FLIT-1:0][WORD_BITS-1:0] w;   // w[3] = first word of the group
  } body_flit_t;

  typedef logic [FLIT_BITS-1:0] flit_t;

  // A packet as the cache side hands it to the network interface.
  typedef struct packed {
    node_t  src;
    node_t  dst;
    event_e ev;
    addr_t  addr;
    wvec_t  used;
    line_t  data;
  } pkt_cmd_t;

  // A packet as the network interface hands it back to the cache side.
  typedef struct packed {
    node_t  src;
    node_t  dst;
    event_e ev;
    addr_t  addr;
    wvec_t  used;
    wvec_t  valid;  // words of data that hold real line contents
    line_t  data;
  } pkt_rx_t;

  // What the L1 asks of its network interface.
  typedef enum logic [1:0] {
    L1_FILL   = 2'd0,   // read miss: request the line with the predicted words
    L1_REFILL = 2'd1,   // false negative: request the words not yet present
    L1_EVICT  = 2'd2    // eviction: train the predictor, spill dirty words
  } l1_kind_e;

  typedef struct packed {
    l1_kind_e    kind;
    logic [15:0] line;   // L1 line (set and way) the request is about
    addr_t       addr;   // byte address of the block
    node_t       home;   // node holding the block's L2 bank
    line_t       data;   // line contents (evictions)
  } l1_req_t;

  // Word i of a line is described by used-vector bit (15 - i).
  function automatic logic word_used(wvec_t v, int unsigned i);
    return v[LINE_WORDS-1-i];
  endfunction

  // Four used bits of body group g (words 4g..4g+3), first word in bit 3.
  function automatic logic [3:0] group_bits(wvec_t v, int unsigned g);
    return v[LINE_WORDS-1-4*g -: 4];
  endfunction

  function automatic logic carries_line(event_e e);
    return (e == EV_READ_RESP) || (e == EV_WRITE_REQ);
  endfunction

endpackage
