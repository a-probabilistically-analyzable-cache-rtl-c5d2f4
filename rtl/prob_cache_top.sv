// prob_cache_top: probabilistically analysable cache subsystem.
//
// Instruction and data caches for a 32-bit processor whose hit/miss timing
// is random in a controlled way, so that execution times of a program are
// independent and identically distributed across runs and measurement-based
// probabilistic timing analysis can be applied. Two sources of randomness:
//   - placement: each cache's set index comes from a parametric hash of the
//     line address and a placement seed. The seed is drawn from the MT19937
//     generator once after reset and again on every new_run_i pulse, so the
//     mapping is fixed during a run and independent between runs;
//   - replacement: on a miss the victim way is taken from the generator's
//     current output (instruction cache: low bits, data cache: bits 16 and
//     up); the generator advances whenever a cache used its bits.
// new_run_i also flushes both caches, so every run starts from an empty
// cache. The two caches share one memory port through an arbiter.
//
// Interface: processor side ic_in/ic_out and dc_in/dc_out, memory side
// mem_out/mem_in, all with the hold-until-not-stalled handshake described in
// pcache_pkg. ready_o goes high about 630 cycles after reset, once the
// generator is seeded and the first placement seed loaded; requests made
// before that, or while a cache is flushing, are simply stalled. new_run_i
// also resets the arbiter's priority, so a run never depends on the one
// before it except through the random numbers. Event outputs pulse for one cycle per cache hit, miss, dirty
// write-back word and new placement seed, for performance counting.
// Defaults follow the evaluated system: 4 KiB caches with 32-byte lines;
// the associativity (4) is within the 4-to-8 range the design recommends.
module prob_cache_top
  import pcache_pkg::*;
#(
  parameter int unsigned   CACHE_BYTES = 4096,
  parameter int unsigned   LINE_BYTES  = 32,
  parameter int unsigned   WAYS        = 4,
  parameter repl_policy_e  REPL        = REPL_RANDOM,
  parameter place_policy_e PLACE       = PLACE_HASH,
  parameter write_policy_e WRITE       = WP_WB_WA,
  parameter logic [31:0]   SEED        = 32'd5489
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     new_run_i,     // new program run: new placement seed, flush
  output logic     ready_o,
  input  ic_in_t   ic_in,
  output ic_out_t  ic_out,
  input  dc_in_t   dc_in,
  output dc_out_t  dc_out,
  output mem_out_t mem_out,
  input  mem_in_t  mem_in,
  output logic     ic_hit_o,
  output logic     ic_miss_o,
  output logic     dc_hit_o,
  output logic     dc_miss_o,
  output logic     dc_writeback_o,
  output logic     reseed_o,      // a new placement seed was loaded
  output logic [31:0] placement_seed_o
);

  localparam int unsigned SETS        = CACHE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned INDEX_BITS  = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned OFF_BITS    = $clog2(LINE_BYTES);
  localparam int unsigned LINE_ADDR_W = ADDR_W - OFF_BITS;
  localparam int unsigned WAY_B       = (WAYS > 1) ? $clog2(WAYS) : 1;

  // Random number generator and placement seed.
  logic [31:0] rnd;
  logic        rng_ready, seeded, load_seed;
  logic        ic_repl_req, dc_repl_req;
  logic [31:0] seed_q;

  always_comb load_seed = rng_ready && (!seeded || new_run_i);

  mt19937 #(.SEED(SEED)) u_rng (
    .clk    (clk),
    .rst_n  (rst_n),
    .next_i (load_seed || ic_repl_req || dc_repl_req),
    .rnd_o  (rnd),
    .ready_o(rng_ready)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seeded <= 1'b0;
      seed_q <= '0;
    end else if (load_seed) begin
      seeded <= 1'b1;
      seed_q <= rnd;
    end
  end

  logic caches_ready;
  always_comb begin
    caches_ready     = seeded && !load_seed;
    reseed_o         = load_seed;
    placement_seed_o = seed_q;
    ready_o          = caches_ready;
  end

  // Placement hashes, one per cache, sharing the seed.
  logic [LINE_ADDR_W-1:0] ic_place_addr, dc_place_addr;
  logic [INDEX_BITS-1:0]  ic_index, dc_index;

  hash_function #(.LINE_ADDR_W(LINE_ADDR_W), .RND_W(32), .SH_W(10),
                  .INDEX_BITS(INDEX_BITS)) u_ic_hash (
    .addr_bits_i(ic_place_addr),
    .rnd_i      (seed_q),
    .index_o    (ic_index)
  );

  hash_function #(.LINE_ADDR_W(LINE_ADDR_W), .RND_W(32), .SH_W(10),
                  .INDEX_BITS(INDEX_BITS)) u_dc_hash (
    .addr_bits_i(dc_place_addr),
    .rnd_i      (seed_q),
    .index_o    (dc_index)
  );

  // Caches.
  mem_out_t ic_mem_out, dc_mem_out;
  mem_in_t  ic_mem_in,  dc_mem_in;

  icache #(.CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES), .WAYS(WAYS),
           .REPL(REPL), .PLACE(PLACE)) u_icache (
    .clk          (clk),
    .rst_n        (rst_n),
    .flush_i      (new_run_i),
    .ready_i      (caches_ready),
    .ic_in        (ic_in),
    .ic_out       (ic_out),
    .place_addr_o (ic_place_addr),
    .place_index_i(ic_index),
    .repl_rnd_i   (rnd[WAY_B-1:0]),
    .repl_req_o   (ic_repl_req),
    .mem_in       (ic_mem_in),
    .mem_out      (ic_mem_out),
    .hit_o        (ic_hit_o),
    .miss_o       (ic_miss_o)
  );

  dcache #(.CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES), .WAYS(WAYS),
           .REPL(REPL), .PLACE(PLACE), .WRITE(WRITE)) u_dcache (
    .clk          (clk),
    .rst_n        (rst_n),
    .flush_i      (new_run_i),
    .ready_i      (caches_ready),
    .dc_in        (dc_in),
    .dc_out       (dc_out),
    .place_addr_o (dc_place_addr),
    .place_index_i(dc_index),
    .repl_rnd_i   (rnd[16 +: WAY_B]),
    .repl_req_o   (dc_repl_req),
    .mem_in       (dc_mem_in),
    .mem_out      (dc_mem_out),
    .hit_o        (dc_hit_o),
    .miss_o       (dc_miss_o),
    .writeback_o  (dc_writeback_o)
  );

  mem_arbiter u_arb (
    .clk     (clk),
    .rst_n   (rst_n),
    .restart_i(new_run_i),
    .ic_req_i(ic_mem_out),
    .ic_rsp_o(ic_mem_in),
    .dc_req_i(dc_mem_out),
    .dc_rsp_o(dc_mem_in),
    .mem_out (mem_out),
    .mem_in  (mem_in)
  );

endmodule
