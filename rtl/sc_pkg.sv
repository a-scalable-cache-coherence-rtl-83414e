// sc_pkg: types and constants shared by the selectively clearable cache.
//
// The cache sits between one processor and a line-wide port into the
// multiprocessor's interconnection network. Addresses are 32-bit byte
// addresses and words are 32 bits wide; a cache line is eight bytes, the line
// size used for the evaluated configurations. Address width and word width
// are this design's choice.
//
// Processor port: the processor holds cpu_req_t.valid, with the other fields
// stable, until it sees cpu_rsp_t.ack for one cycle; it may present a new
// request in the cycle after the acknowledge. Memory port: the cache holds
// mem_req_t.valid, fields stable, until mem_rsp_t.ack, which comes with the
// read data for one cycle.
package sc_pkg;

  localparam int ADDR_W     = 32;
  localparam int WORD_W     = 32;
  localparam int LINE_BYTES = 8;
  localparam int LINE_W     = 8 * LINE_BYTES;
  localparam int OFF_W      = $clog2(LINE_BYTES);
  localparam int WSEL_W     = $clog2(LINE_BYTES / (WORD_W / 8));

  // Operations the processor can ask of its cache.
  //  LOAD, STORE : word access; 'shared' selects the shared-data load/store
  //                (direct-mapped placement, always written through);
  //                'uncached' bypasses the cache (semaphores).
  //  SWAP        : indivisible exchange at memory, never cached (semaphores).
  //  COHERE      : Make_coherent(addr .. addr_end): invalidate the range.
  //  PREFETCH    : start filling addr .. addr_end as shared data; acknowledged
  //                at once, the fills run in the background.
  //  MIGRATE     : process leaves the processor: invalidate every clean line
  //                and start the flush machine on the dirty ones.
  //  RELEASE     : before unlock, write back the dirty lines of the shared
  //                range addr .. addr_end (only needed when shared data is
  //                written back rather than through).
  typedef enum logic [2:0] {
    OP_LOAD     = 3'd0,
    OP_STORE    = 3'd1,
    OP_SWAP     = 3'd2,
    OP_COHERE   = 3'd3,
    OP_PREFETCH = 3'd4,
    OP_MIGRATE  = 3'd5,
    OP_RELEASE  = 3'd6
  } cpu_op_e;

  typedef struct packed {
    logic                valid;
    cpu_op_e             op;
    logic                shared;
    logic                uncached;
    logic [ADDR_W-1:0]   addr;      // byte address (first byte of a range)
    logic [ADDR_W-1:0]   addr_end;  // last byte of a range (COHERE, PREFETCH)
    logic [WORD_W-1:0]   wdata;
    logic [WORD_W/8-1:0] wstrb;
  } cpu_req_t;

  typedef struct packed {
    logic              ack;         // request done (one cycle)
    logic              hit;         // with ack: a cached access that hit
    logic [WORD_W-1:0] rdata;       // with ack: load / swap result
    logic              flush_busy;  // flush machine still writing back
    logic              pf_busy;     // prefetch still running
  } cpu_rsp_t;

  typedef enum logic [1:0] {
    MEM_READ  = 2'd0,   // read the line holding addr
    MEM_WRITE = 2'd1,   // write the strobed bytes of the line holding addr
    MEM_SWAP  = 2'd2    // indivisible: return the line, then write strobed bytes
  } mem_op_e;

  typedef struct packed {
    logic                  valid;
    mem_op_e               op;
    logic [ADDR_W-1:0]     addr;    // line-aligned
    logic [LINE_W-1:0]     wdata;
    logic [LINE_BYTES-1:0] wstrb;
  } mem_req_t;

  typedef struct packed {
    logic              ack;
    logic [LINE_W-1:0] rdata;
  } mem_rsp_t;

endpackage
