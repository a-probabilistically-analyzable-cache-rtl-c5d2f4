// pcache_pkg: types and constants shared by the randomized cache subsystem.
//
// The request/response records follow the signal list of the original cache
// model (ic_in, ic_out, dc_in, dc_out, mem_in, mem_out). Each record is a
// packed struct here. Addresses and data are 32 bits wide, as for a MIPS32
// core. Fields marked "added" are not in that list and are this design's own
// choice (a request strobe and a stall back to the processor are needed for
// a working handshake).
//
// Handshake used everywhere: a requester holds its strobe (rd or wr) and its
// address/data stable while the responder drives stall=1. The transfer
// happens in the first cycle where the strobe is high and stall is low; read
// data is valid in that same cycle.
package pcache_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned MASK_W = DATA_W / 8;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [MASK_W-1:0] mask_t;

  // Replacement policies the cache supports. Random is the one used for
  // probabilistic timing analysis; LRU is the deterministic alternative.
  typedef enum logic {
    REPL_RANDOM = 1'b0,
    REPL_LRU    = 1'b1
  } repl_policy_e;

  // Placement policies: parametric hash (random, per run) or plain modulo.
  typedef enum logic {
    PLACE_HASH   = 1'b0,
    PLACE_MODULO = 1'b1
  } place_policy_e;

  // Data cache write policies: write-back with write-allocate (the data
  // cache's main mode), write-through with write-allocate, and write-through
  // without write-allocate.
  typedef enum logic [1:0] {
    WP_WB_WA  = 2'd0,
    WP_WT_WA  = 2'd1,
    WP_WT_NWA = 2'd2
  } write_policy_e;

  // Instruction cache request from the processor.
  typedef struct packed {
    addr_t addr;   // instruction address
    logic  rd;     // added: fetch request
    logic  stall;  // processor holds the instruction cache (no new fetch)
  } ic_in_t;

  // Instruction cache response to the processor.
  typedef struct packed {
    data_t data;   // instruction word
    logic  stall;  // added: fetch not finished, processor must wait
  } ic_out_t;

  // Data cache request from the processor.
  typedef struct packed {
    addr_t addr;   // data address
    data_t data;   // write data
    mask_t mask;   // byte write enables
    logic  rd;     // read request
    logic  wr;     // write request
  } dc_in_t;

  // Data cache response to the processor.
  typedef struct packed {
    data_t data;   // read data
    logic  stall;  // request not finished, processor must wait
  } dc_out_t;

  // Memory response to a cache.
  typedef struct packed {
    data_t data;   // read data
    logic  stall;  // memory busy, hold the request
  } mem_in_t;

  // Cache request to memory (one 32-bit word per transfer).
  typedef struct packed {
    addr_t addr;
    data_t data;
    mask_t mask;
    logic  rd;
    logic  wr;
  } mem_out_t;

endpackage
