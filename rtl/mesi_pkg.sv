// mesi_pkg -- sizes, state encoding and cache-line layouts shared by the
// single write-back cache and by the three-cache MESI system.
//
// Both designs work on a 32-byte main memory addressed by 5 bits. A cache
// holds 8 one-byte lines, direct mapped: address bits [2:0] select the line
// (the index) and bits [4:3] are kept as the tag.
//
// Line layouts (bit 0 is the least significant bit):
//   single cache, 12 bits : [11] dirty, [10] valid, [9:8] tag, [7:0] data
//   MESI cache,   14 bits : [13:12] state, [11] dirty, [10] valid,
//                           [9:8] tag, [7:0] data
// The MESI state encoding is M=00, E=01, S=10, I=11. The layouts and the
// encoding follow the line values worked through in the document's
// simulations (for example an exclusive line 01_0_1_11_00000100 turning
// into the modified line 00_1_1_11_00000001 on a write hit).
package mesi_pkg;

  localparam int ADDR_W    = 5;               // 32-byte main memory
  localparam int DATA_W    = 8;               // one byte per line
  localparam int INDEX_W   = 3;               // 8-line direct-mapped cache
  localparam int TAG_W     = ADDR_W - INDEX_W;
  localparam int NUM_LINES = 1 << INDEX_W;
  localparam int MEM_DEPTH = 1 << ADDR_W;

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [INDEX_W-1:0] index_t;
  typedef logic [TAG_W-1:0]   tag_t;

  typedef enum logic [1:0] {
    MESI_M = 2'b00,   // modified: only copy, differs from memory
    MESI_E = 2'b01,   // exclusive: only cached copy, equals memory
    MESI_S = 2'b10,   // shared: other caches may hold it too
    MESI_I = 2'b11    // invalid
  } mesi_state_e;

  // Line of the single (non-coherent) write-back cache.
  typedef struct packed {
    logic  dirty;
    logic  valid;
    tag_t  tag;
    data_t data;
  } sc_line_t;

  // Line of a MESI cache: the single-cache line with a 2-bit state on top.
  typedef struct packed {
    mesi_state_e state;
    logic        dirty;
    logic        valid;
    tag_t        tag;
    data_t       data;
  } mesi_line_t;

  // Whole-array images, used as reset contents.
  typedef sc_line_t   [NUM_LINES-1:0] sc_image_t;
  typedef mesi_line_t [NUM_LINES-1:0] mesi_image_t;
  typedef data_t      [MEM_DEPTH-1:0] mem_image_t;

  localparam sc_line_t   SC_EMPTY_LINE   = '{dirty: 1'b0, valid: 1'b0, tag: '0, data: '0};
  localparam mesi_line_t MESI_EMPTY_LINE = '{state: MESI_I, dirty: 1'b0, valid: 1'b0,
                                             tag: '0, data: '0};
  localparam sc_image_t   SC_EMPTY_IMAGE   = {NUM_LINES{SC_EMPTY_LINE}};
  localparam mesi_image_t MESI_EMPTY_IMAGE = {NUM_LINES{MESI_EMPTY_LINE}};

  function automatic index_t addr_index(addr_t a);
    return a[INDEX_W-1:0];
  endfunction

  function automatic tag_t addr_tag(addr_t a);
    return a[ADDR_W-1:INDEX_W];
  endfunction

  // A line holds address (tag, index) usably when it is valid, not in the
  // invalid state and its tag matches.
  function automatic logic mesi_holds(mesi_line_t l, tag_t t);
    return l.valid && (l.state != MESI_I) && (l.tag == t);
  endfunction

endpackage
