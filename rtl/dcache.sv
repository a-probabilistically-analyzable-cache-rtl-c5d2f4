// dcache: randomized, set-associative, write-back data cache.
//
// Same organisation as the instruction cache (external set index from the
// placement hash or modulo placement, random or LRU victim choice, whole
// line address kept as tag), plus a dirty bit per line. By default writes
// use write-back with write-allocate: a write miss first brings the line in,
// then writes into it; a dirty victim is written back before the refill.
// WRITE selects the other two policies of the design instead: write-through
// with write-allocate (every write also goes to memory, lines are never
// dirty) and write-through without write-allocate (a write miss only writes
// memory and leaves the cache unchanged).
//
// Controller (a Mealy machine with the states of the design):
//   FLUSH      clears one set per cycle at reset and on flush_i (a new
//              flush request restarts the sweep); leaves to
//              IDLE when done and ready_i is high. Dirty data is discarded:
//              a flush marks the start of a new, independent run.
//   IDLE       waits for dc_in.rd or dc_in.wr.
//   COMPARE    looks the address up. Read hit: data on dc_out.data and
//              dc_out.stall low in this cycle, back to IDLE. Write hit: to
//              UPDATE (write-back) or WTHRU (write-through). Miss: a victim
//              is chosen (repl_req_o pulses); if it is valid and dirty go to
//              WRITEBACK, otherwise to MEMORY. A write miss without
//              write-allocate goes to WTHRU instead.
//   WRITEBACK  writes the victim line to memory word by word.
//   MEMORY     reads the requested line word by word into the victim way.
//   WTHRU      (write-through only) writes the processor's word to memory;
//              then UPDATE for a write hit, or done (back to IDLE, stall low
//              in the transfer cycle) for a non-allocating write miss.
//   UPDATE     after a refill installs the tag (clean) and returns to COMPARE,
//              where the pending access now hits; after a write hit writes the
//              masked word, sets the dirty bit, drops dc_out.stall and returns
//              to IDLE.
// The processor holds its request until dc_out.stall is low. Read hit: one
// wait cycle; write hit: two; a miss adds LINE_WORDS memory transfers (twice
// that with a dirty victim) and two cycles. Write-through adds one memory
// transfer to every write; a non-allocating write miss waits for that
// transfer only.
// place_addr_o is the request's line address passed straight to the
// external hash, which returns place_index_i in the same cycle.
module dcache
  import pcache_pkg::*;
#(
  parameter int unsigned   CACHE_BYTES = 4096,
  parameter int unsigned   LINE_BYTES  = 32,
  parameter int unsigned   WAYS        = 4,
  parameter repl_policy_e  REPL        = REPL_RANDOM,
  parameter place_policy_e PLACE       = PLACE_HASH,
  parameter write_policy_e WRITE       = WP_WB_WA,
  localparam int unsigned  SETS        = CACHE_BYTES / (LINE_BYTES * WAYS),
  localparam int unsigned  INDEX_BITS  = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned  OFF_BITS    = $clog2(LINE_BYTES),
  localparam int unsigned  LINE_ADDR_W = ADDR_W - OFF_BITS,
  localparam int unsigned  WAY_B       = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   flush_i,
  input  logic                   ready_i,
  input  dc_in_t                 dc_in,
  output dc_out_t                dc_out,
  output logic [LINE_ADDR_W-1:0] place_addr_o,
  input  logic [INDEX_BITS-1:0]  place_index_i,
  input  logic [WAY_B-1:0]       repl_rnd_i,
  output logic                   repl_req_o,
  input  mem_in_t                mem_in,
  output mem_out_t               mem_out,
  output logic                   hit_o,        // an access hit (COMPARE, first look)
  output logic                   miss_o,       // an access missed
  output logic                   writeback_o   // a dirty victim is being written back
);

  localparam int unsigned WORDS  = LINE_BYTES / (DATA_W / 8);
  localparam int unsigned WORD_B = (WORDS > 1) ? $clog2(WORDS) : 1;

  typedef enum logic [2:0] {
    S_FLUSH, S_IDLE, S_COMPARE, S_WRITEBACK, S_MEMORY, S_UPDATE, S_WTHRU
  } state_e;

  localparam bit WT = (WRITE != WP_WB_WA);    // write-through
  localparam bit NA = (WRITE == WP_WT_NWA);   // no write-allocate

  logic [WAYS-1:0]                  valid [SETS];
  logic [WAYS-1:0]                  dirty [SETS];
  logic [WAYS-1:0][LINE_ADDR_W-1:0] tags  [SETS];
  logic [WAYS-1:0][WAY_B-1:0]       ages  [SETS];
  data_t                            data  [SETS * WAYS * WORDS];

  state_e                 state;
  logic [INDEX_BITS-1:0]  flush_set;
  logic                   flush_pend;
  logic                   refilled;     // UPDATE follows a refill, not a write hit
  logic                   retry;        // COMPARE is a second look after a refill
  logic                   wt_hit;       // WTHRU belongs to a write hit (cache updated after)
  logic [INDEX_BITS-1:0]  fill_set;
  logic [WAY_B-1:0]       fill_way;
  logic [LINE_ADDR_W-1:0] fill_line;    // line being fetched
  logic [LINE_ADDR_W-1:0] wb_line;      // line being written back
  logic [WORD_B-1:0]      fill_word;

  logic [LINE_ADDR_W-1:0] line_addr;
  logic [WORD_B-1:0]      word_sel;
  logic [INDEX_BITS-1:0]  set_sel;
  always_comb begin
    line_addr    = dc_in.addr[ADDR_W-1:OFF_BITS];
    word_sel     = WORD_B'(dc_in.addr[OFF_BITS-1:2]);
    place_addr_o = line_addr;
    set_sel      = (PLACE == PLACE_MODULO) ? line_addr[INDEX_BITS-1:0] : place_index_i;
  end

  logic                        hit;
  logic [WAY_B-1:0]            hit_way, victim, access_way;
  logic [WAYS-1:0][WAY_B-1:0]  ages_next;

  set_lookup #(.WAYS(WAYS), .TAG_W(LINE_ADDR_W), .REPL(REPL)) u_lookup (
    .valid_i     (valid[set_sel]),
    .tags_i      (tags[set_sel]),
    .ages_i      (ages[set_sel]),
    .tag_i       (line_addr),
    .rnd_i       (repl_rnd_i),
    .access_way_i(access_way),
    .hit_o       (hit),
    .hit_way_o   (hit_way),
    .victim_o    (victim),
    .ages_o      (ages_next)
  );

  logic req, cmp_hit, cmp_miss, victim_dirty, allocate;
  logic [$clog2(SETS * WAYS * WORDS)-1:0] rd_ptr, wb_ptr, fill_ptr;
  always_comb begin
    req          = dc_in.rd || dc_in.wr;
    access_way   = hit ? hit_way : victim;
    cmp_hit      = (state == S_COMPARE) && req && hit;
    cmp_miss     = (state == S_COMPARE) && req && !hit;
    allocate     = cmp_miss && !(NA && dc_in.wr);
    victim_dirty = valid[set_sel][victim] && dirty[set_sel][victim];
    rd_ptr   = $bits(rd_ptr)'((int'(set_sel) * WAYS + int'(hit_way)) * WORDS + int'(word_sel));
    fill_ptr = $bits(fill_ptr)'((int'(fill_set) * WAYS + int'(fill_way)) * WORDS + int'(fill_word));
    wb_ptr   = fill_ptr;
  end

  always_comb begin
    dc_out.data  = data[rd_ptr];
    dc_out.stall = req && !(cmp_hit && dc_in.rd) && !(state == S_UPDATE && !refilled)
                   && !(state == S_WTHRU && !wt_hit && !mem_in.stall);
    hit_o        = cmp_hit && !retry;
    miss_o       = cmp_miss;
    writeback_o  = (state == S_WRITEBACK);
    repl_req_o   = allocate && (REPL == REPL_RANDOM);
    mem_out      = '0;
    mem_out.mask = '1;
    if (state == S_WRITEBACK) begin
      mem_out.wr   = 1'b1;
      mem_out.addr = {wb_line, fill_word, 2'b00};
      mem_out.data = data[wb_ptr];
    end else if (state == S_WTHRU) begin
      mem_out.wr   = 1'b1;
      mem_out.addr = dc_in.addr;
      mem_out.data = dc_in.data;
      mem_out.mask = dc_in.mask;
    end else begin
      mem_out.rd   = (state == S_MEMORY);
      mem_out.addr = {fill_line, fill_word, 2'b00};
    end
  end

  logic last_word;
  always_comb last_word = (fill_word == WORD_B'(WORDS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_FLUSH;
      flush_set  <= '0;
      flush_pend <= 1'b0;
      refilled   <= 1'b0;
      retry      <= 1'b0;
      fill_set   <= '0;
      fill_way   <= '0;
      fill_line  <= '0;
      wb_line    <= '0;
      fill_word  <= '0;
      wt_hit     <= 1'b0;
    end else begin
      if (flush_i) flush_pend <= 1'b1;
      unique case (state)
        S_FLUSH: begin
          flush_pend <= 1'b0;
          if (flush_i) begin
            flush_set <= '0;   // a new flush request restarts the sweep
          end else if (flush_set == INDEX_BITS'(SETS - 1)) begin
            if (ready_i) state <= S_IDLE;
          end else begin
            flush_set <= flush_set + 1'b1;
          end
        end
        S_IDLE: begin
          retry <= 1'b0;
          if (flush_pend || flush_i) begin
            state     <= S_FLUSH;
            flush_set <= '0;
          end else if (req) begin
            state <= S_COMPARE;
          end
        end
        S_COMPARE: begin
          if (!req) begin
            state <= S_IDLE;
          end else if (hit) begin
            refilled <= 1'b0;
            wt_hit   <= 1'b1;
            state    <= !dc_in.wr ? S_IDLE : (WT ? S_WTHRU : S_UPDATE);
          end else if (!allocate) begin
            wt_hit   <= 1'b0;
            state    <= S_WTHRU;
          end else begin
            fill_set  <= set_sel;
            fill_way  <= victim;
            fill_line <= line_addr;
            wb_line   <= tags[set_sel][victim];
            fill_word <= '0;
            state     <= victim_dirty ? S_WRITEBACK : S_MEMORY;
          end
        end
        S_WRITEBACK: begin
          if (!mem_in.stall) begin
            fill_word <= fill_word + 1'b1;
            if (last_word) state <= S_MEMORY;
          end
        end
        S_MEMORY: begin
          if (!mem_in.stall) begin
            fill_word <= fill_word + 1'b1;
            if (last_word) begin
              state    <= S_UPDATE;
              refilled <= 1'b1;
            end
          end
        end
        S_WTHRU: begin
          if (!mem_in.stall) state <= wt_hit ? S_UPDATE : S_IDLE;
        end
        S_UPDATE: begin
          if (refilled) begin
            state <= S_COMPARE;
            retry <= 1'b1;
          end else begin
            state <= S_IDLE;
          end
        end
        default: state <= S_FLUSH;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_FLUSH) begin
      valid[flush_set] <= '0;
      dirty[flush_set] <= '0;
      for (int unsigned w = 0; w < WAYS; w++) ages[flush_set][w] <= WAY_B'(w);
    end else if (cmp_hit) begin
      ages[set_sel] <= ages_next;
    end else if (allocate) begin
      valid[set_sel][victim] <= 1'b0;
      ages[set_sel]          <= ages_next;
    end else if (state == S_MEMORY && !mem_in.stall) begin
      data[fill_ptr] <= mem_in.data;
    end else if (state == S_UPDATE && refilled) begin
      valid[fill_set][fill_way] <= 1'b1;
      dirty[fill_set][fill_way] <= 1'b0;
      tags[fill_set][fill_way]  <= fill_line;
    end else if (state == S_UPDATE) begin
      for (int unsigned b = 0; b < MASK_W; b++)
        if (dc_in.mask[b]) data[rd_ptr][8*b +: 8] <= dc_in.data[8*b +: 8];
      dirty[set_sel][hit_way] <= !WT;
    end
  end

  a_mem_rd_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_out.rd && mem_in.stall) |=> (mem_out.rd && $stable(mem_out.addr)));
  a_mem_wr_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_out.wr && mem_in.stall) |=> (mem_out.wr && $stable(mem_out.addr)
                                      && $stable(mem_out.data)));
  a_no_rd_wr: assert property (@(posedge clk) disable iff (!rst_n)
    !(dc_in.rd && dc_in.wr));

endmodule
