// icache: randomized, set-associative instruction cache.
//
// A read-only cache between the processor's fetch port and main memory. Its
// placement (which set a line goes to) is supplied from outside as
// place_index_i, normally by the parametric hash seeded once per program
// run; PLACE_MODULO instead uses the low line-address bits. Its replacement
// takes the victim way from random bits (REPL_RANDOM, the default) or from
// per-set LRU ages (REPL_LRU). Because a hashed set does not determine the
// address, every way stores the whole line address as its tag.
//
// Controller (a Mealy machine with the three states of the design):
//   FLUSH    clears one set's valid bits per cycle; entered at reset and on
//            flush_i (start of a new run; a flush request during FLUSH restarts
//            the sweep). Leaves when all sets are clear and
//            ready_i (random source ready) is high.
//   COMPARE  looks the fetch address up. On a hit the instruction is on
//            ic_out.data in the same cycle with ic_out.stall low. On a miss
//            ic_out.stall is high, a victim way is chosen (repl_req_o pulses
//            so the random source advances) and the machine goes to MEMORY.
//   MEMORY   reads the line word by word from memory into the victim way,
//            then installs the tag and returns to COMPARE, where the still
//            pending fetch now hits.
// A fetch is a cycle with ic_in.rd=1 and ic_in.stall=0; the processor holds
// it until ic_out.stall is low. Hit: 0 wait cycles. Miss: LINE_WORDS memory
// transfers plus one cycle.
// place_addr_o is the fetch line address passed straight to the external
// hash. The cache never writes memory, so mem_out.data and mem_out.wr are
// constant zero, mem_out.mask is all ones and the two byte-offset address
// bits are zero.
module icache
  import pcache_pkg::*;
#(
  parameter int unsigned   CACHE_BYTES = 4096,         // capacity
  parameter int unsigned   LINE_BYTES  = 32,           // line size
  parameter int unsigned   WAYS        = 4,            // associativity
  parameter repl_policy_e  REPL        = REPL_RANDOM,
  parameter place_policy_e PLACE       = PLACE_HASH,
  localparam int unsigned  SETS        = CACHE_BYTES / (LINE_BYTES * WAYS),
  localparam int unsigned  INDEX_BITS  = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned  OFF_BITS    = $clog2(LINE_BYTES),
  localparam int unsigned  LINE_ADDR_W = ADDR_W - OFF_BITS,
  localparam int unsigned  WAY_B       = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   flush_i,        // invalidate all lines (new run)
  input  logic                   ready_i,        // random source ready
  input  ic_in_t                 ic_in,
  output ic_out_t                ic_out,
  output logic [LINE_ADDR_W-1:0] place_addr_o,   // line address to place
  input  logic [INDEX_BITS-1:0]  place_index_i,  // its set (hash placement)
  input  logic [WAY_B-1:0]       repl_rnd_i,     // random way
  output logic                   repl_req_o,     // a random way was used
  input  mem_in_t                mem_in,
  output mem_out_t               mem_out,
  output logic                   hit_o,          // a fetch hit this cycle
  output logic                   miss_o          // a fetch missed this cycle
);

  localparam int unsigned WORDS  = LINE_BYTES / (DATA_W / 8);
  localparam int unsigned WORD_B = (WORDS > 1) ? $clog2(WORDS) : 1;

  typedef enum logic [1:0] {S_FLUSH, S_COMPARE, S_MEMORY} state_e;

  // Storage.
  logic [WAYS-1:0]                  valid [SETS];
  logic [WAYS-1:0][LINE_ADDR_W-1:0] tags  [SETS];
  logic [WAYS-1:0][WAY_B-1:0]       ages  [SETS];
  data_t                            data  [SETS * WAYS * WORDS];

  state_e                  state;
  logic [INDEX_BITS-1:0]   flush_set;
  logic                    flush_pend;
  logic [INDEX_BITS-1:0]   fill_set;
  logic [WAY_B-1:0]        fill_way;
  logic [LINE_ADDR_W-1:0]  fill_line;
  logic [WORD_B-1:0]       fill_word;

  // Address split and placement.
  logic [LINE_ADDR_W-1:0] line_addr;
  logic [WORD_B-1:0]      word_sel;
  logic [INDEX_BITS-1:0]  set_sel;
  always_comb begin
    line_addr    = ic_in.addr[ADDR_W-1:OFF_BITS];
    word_sel     = WORD_B'(ic_in.addr[OFF_BITS-1:2]);
    place_addr_o = line_addr;
    set_sel      = (PLACE == PLACE_MODULO) ? line_addr[INDEX_BITS-1:0] : place_index_i;
  end

  // Lookup in the selected set.
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

  logic fetch;
  always_comb begin
    fetch      = ic_in.rd && !ic_in.stall;
    access_way = hit ? hit_way : victim;
  end

  // Outputs (Mealy).
  always_comb begin
    ic_out.data  = data[(int'(set_sel) * WAYS + int'(hit_way)) * WORDS + int'(word_sel)];
    ic_out.stall = fetch && !(state == S_COMPARE && hit);
    hit_o        = (state == S_COMPARE) && fetch && hit;
    miss_o       = (state == S_COMPARE) && fetch && !hit && !flush_pend;
    repl_req_o   = miss_o && (REPL == REPL_RANDOM);
    mem_out      = '0;
    mem_out.mask = '1;
    mem_out.addr = {fill_line, fill_word, 2'b00};
    mem_out.rd   = (state == S_MEMORY);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_FLUSH;
      flush_set  <= '0;
      flush_pend <= 1'b0;
      fill_set   <= '0;
      fill_way   <= '0;
      fill_line  <= '0;
      fill_word  <= '0;
    end else begin
      if (flush_i) flush_pend <= 1'b1;
      unique case (state)
        S_FLUSH: begin
          flush_pend <= 1'b0;
          if (flush_i) begin
            flush_set <= '0;   // a new flush request restarts the sweep
          end else if (flush_set == INDEX_BITS'(SETS - 1)) begin
            if (ready_i) state <= S_COMPARE;
          end else begin
            flush_set <= flush_set + 1'b1;
          end
        end
        S_COMPARE: begin
          if (flush_pend || flush_i) begin
            state     <= S_FLUSH;
            flush_set <= '0;
          end else if (fetch && !hit) begin
            state     <= S_MEMORY;
            fill_set  <= set_sel;
            fill_way  <= victim;
            fill_line <= line_addr;
            fill_word <= '0;
          end
        end
        S_MEMORY: begin
          if (!mem_in.stall) begin
            fill_word <= fill_word + 1'b1;
            if (fill_word == WORD_B'(WORDS - 1)) state <= S_COMPARE;
          end
        end
        default: state <= S_FLUSH;
      endcase
    end
  end

  // Arrays.
  always_ff @(posedge clk) begin
    if (state == S_FLUSH) begin
      valid[flush_set] <= '0;
      for (int unsigned w = 0; w < WAYS; w++) ages[flush_set][w] <= WAY_B'(w);
    end else if (state == S_COMPARE && fetch && hit && !flush_pend) begin
      ages[set_sel] <= ages_next;
    end else if (state == S_COMPARE && miss_o) begin
      // The victim loses its line now; the line is valid again once filled.
      valid[set_sel][victim] <= 1'b0;
      ages[set_sel]          <= ages_next;
    end else if (state == S_MEMORY && !mem_in.stall) begin
      data[(int'(fill_set) * WAYS + int'(fill_way)) * WORDS + int'(fill_word)] <= mem_in.data;
      if (fill_word == WORD_B'(WORDS - 1)) begin
        valid[fill_set][fill_way] <= 1'b1;
        tags[fill_set][fill_way]  <= fill_line;
      end
    end
  end

  // A memory read, once issued, is held with a stable address until taken.
  a_mem_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_out.rd && mem_in.stall) |=> (mem_out.rd && $stable(mem_out.addr)));

endmodule
