// mm_pkg: types and constants shared by the shared-memory hardware of a MAP node.
//
// Memory is organised in 8-word blocks, each carrying two block status bits
// (invalid, read-only, read-write, dirty). Pages group 64 such blocks. Event
// records written into the event queue are three 64-bit words long. Widths not
// fixed by the shared-memory mechanisms themselves (address widths, node
// coordinate width, page size, record layout) are this design's own choices
// and are collected here so they can be changed in one place.
package mm_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int WORD_W          = 64;   // machine word
  localparam int VA_W            = 54;   // virtual (global) address, bytes
  localparam int PA_W            = 40;   // physical address, bytes
  localparam int WORDS_PER_BLOCK = 8;    // block status granularity
  localparam int BLOCK_OFF_W     = 6;    // 8 words x 8 bytes = 64 bytes
  localparam int WORD_OFF_W      = 3;    // byte offset within a word
  localparam int PAGE_OFF_W      = 12;   // 4 KB pages = 512 words
  localparam int BLOCKS_PER_PAGE = 1 << (PAGE_OFF_W - BLOCK_OFF_W);  // 64
  localparam int VPN_W           = VA_W - PAGE_OFF_W;
  localparam int PPN_W           = PA_W - PAGE_OFF_W;
  localparam int NCLUST          = 3;    // clusters per MAP chip
  localparam int NSLOTS          = 5;    // thread slots per cluster
  localparam int NBANKS          = 2;    // interleaved cache banks
  localparam int COORD_W         = 5;    // one mesh coordinate (X or Y)
  localparam int REC_WORDS       = 3;    // words per event record

  // ---------------------------------------------------------------- types
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [VA_W-1:0]   vaddr_t;
  typedef logic [PA_W-1:0]   paddr_t;
  typedef logic [VPN_W-1:0]  vpn_t;
  typedef logic [PPN_W-1:0]  ppn_t;
  typedef word_t [WORDS_PER_BLOCK-1:0] line_t;

  typedef enum logic [1:0] {
    BS_INVALID    = 2'd0,
    BS_READ_ONLY  = 2'd1,
    BS_READ_WRITE = 2'd2,
    BS_DIRTY      = 2'd3
  } blk_status_e;

  typedef blk_status_e [BLOCKS_PER_PAGE-1:0] page_status_t;

  typedef enum logic {
    OP_LOAD  = 1'b0,
    OP_STORE = 1'b1
  } mem_op_e;

  typedef enum logic [2:0] {
    EV_NONE            = 3'd0,
    EV_LOAD_INVALID    = 3'd1,  // load from a block not present on this node
    EV_STORE_INVALID   = 3'd2,  // store to a block not present on this node
    EV_STORE_READ_ONLY = 3'd3,  // store to a block held read-only
    EV_GTLB_MISS       = 3'd4   // message to an address the GTLB cannot place
  } ev_type_e;

  // Destination of a load: a register named by its configuration-space
  // coordinates, so that a handler can later complete the load in software.
  typedef struct packed {
    logic [1:0] cluster;
    logic [2:0] slot;
    logic [4:0] regnum;
  } dst_t;

  typedef struct packed {
    mem_op_e op;
    vaddr_t  vaddr;
    word_t   wdata;
    dst_t    dst;
  } mem_req_t;

  // A refused operation offered to the event system.
  typedef struct packed {
    ev_type_e ev;
    mem_op_e  op;
    vaddr_t   vaddr;
    word_t    data;
    dst_t     dst;
  } fault_t;

  // Node address in the 2-D mesh.
  typedef struct packed {
    logic [COORD_W-1:0] y;
    logic [COORD_W-1:0] x;
  } node_t;

  // GTLB entry. Base and start node are plain; the other fields are log2.
  typedef struct packed {
    logic               valid;
    vpn_t               base_vpn;    // first page of the page group
    logic [5:0]         log_pages;   // size: group holds 2**log_pages pages
    node_t              start;       // start node of the region
    logic [2:0]         log_xext;    // region is 2**log_xext nodes wide
    logic [2:0]         log_yext;    // region is 2**log_yext nodes high
    logic [5:0]         log_ppn;     // 2**log_ppn contiguous pages per node
  } gtlb_entry_t;

  // Network flit.
  typedef struct packed {
    logic  head;
    logic  tail;
    logic  prio;     // 0: requests, 1: replies
    node_t dest;
    word_t data;
  } flit_t;

  // First word of an event record.
  function automatic word_t ev_header(fault_t f);
    word_t h;
    h = '0;
    h[2:0]   = f.ev;
    h[3]     = f.op;
    h[13:4]  = f.dst;
    return h;
  endfunction

endpackage
