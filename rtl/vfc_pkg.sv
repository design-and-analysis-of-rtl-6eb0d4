// vfc_pkg: types and constants shared by the accelerator cache, the FIFO
// Interface Module (FIM) and the test accelerator.
//
// The ld/st interface is a simple synchronous word interface. A request is the
// struct ldst_req_t {valid, we, addr, wdata, be}. On a memory port the master
// holds the request until the slave answers with a one-cycle ack in
// mem_rsp_t (with rdata for a load); one request is outstanding per port and
// a port completes its requests in order. The 32-bit word width and the field
// set are this design's choice; the two-bit accelerator-side acknowledge
// (bit 1 = read data valid) follows the cache's published waveform naming.
// The FIM request encoding is the one of the FIM interface table.
package vfc_pkg;

  localparam int unsigned AW = 32;  // address width
  localparam int unsigned DW = 32;  // data word width
  localparam int unsigned BW = DW / 8;

  typedef struct packed {
    logic          valid;
    logic          we;     // 1 = store, 0 = load
    logic [AW-1:0] addr;   // byte address, word aligned
    logic [DW-1:0] wdata;
    logic [BW-1:0] be;     // byte enables of a store
  } ldst_req_t;

  typedef struct packed {
    logic          ack;    // one-cycle completion of the held request
    logic [DW-1:0] rdata;  // load data, valid with ack
  } mem_rsp_t;

  // Cache control interface commands.
  typedef enum logic [1:0] {
    CC_FLUSH      = 2'd1,  // write back dirty data in range, then invalidate
    CC_INVALIDATE = 2'd2   // drop cached copies in range without write back
  } cc_op_e;

  // LRU counter operations of one cache set.
  typedef enum logic [1:0] {
    LRU_NONE  = 2'd0,
    LRU_HIT   = 2'd1,
    LRU_FILL  = 2'd2,
    LRU_INVAL = 2'd3
  } lru_op_e;

  // Write cache commands.
  typedef enum logic [1:0] {
    WC_EVICT_ONE = 2'd0,  // write back and free the oldest entry
    WC_WB_RANGE  = 2'd1,  // write back and free every entry inside [lo, hi]
    WC_DROP      = 2'd2   // free every entry inside [lo, hi] without write back
  } wc_cmd_e;

  // FIM request encoding.
  typedef enum logic [1:0] {
    FIM_NONE    = 2'b00,
    FIM_ACQUIRE = 2'b01,
    FIM_RELEASE = 2'b10,
    FIM_AVAIL   = 2'b11
  } fim_req_e;

  // Word offsets of the WFIFO control structs in shared un-cached memory.
  localparam logic [AW-1:0] CH_BASE  = 32'd0;
  localparam logic [AW-1:0] CH_LIMIT = 32'd4;
  localparam logic [AW-1:0] CH_TSIZE = 32'd8;
  localparam logic [AW-1:0] CH_HEAD  = 32'd12;
  localparam logic [AW-1:0] CH_TAIL  = 32'd16;
  localparam logic [AW-1:0] PT_CHAN  = 32'd0;
  localparam logic [AW-1:0] PT_PTR   = 32'd4;

endpackage
