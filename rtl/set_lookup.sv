// set_lookup: tag match, victim choice and LRU bookkeeping for one cache set.
//
// Shared by the instruction and data caches. Given the valid bits, stored
// tags and LRU ages of the ways of the selected set, it reports whether the
// requested tag hits and in which way, and which way a miss should evict:
//   - REPL_RANDOM: the way named by the low log2(WAYS) random bits, so each
//     way is evicted with probability 1/WAYS whatever the access history
//     (evict-on-miss random replacement);
//   - REPL_LRU: the first invalid way, otherwise the way whose age is
//     WAYS-1 (the least recently used one).
// It also computes the ages after an access to access_way_i: that way gets
// age 0 and every way that was younger than it ages by one, so the ages stay
// a permutation of 0..WAYS-1. Purely combinational.
module set_lookup
  import pcache_pkg::*;
#(
  parameter int unsigned WAYS     = 4,
  parameter int unsigned TAG_W    = 27,
  parameter repl_policy_e REPL    = REPL_RANDOM,
  localparam int unsigned WAY_B   = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic [WAYS-1:0]             valid_i,
  input  logic [WAYS-1:0][TAG_W-1:0]  tags_i,
  input  logic [WAYS-1:0][WAY_B-1:0]  ages_i,
  input  logic [TAG_W-1:0]            tag_i,
  input  logic [WAY_B-1:0]            rnd_i,         // random way for REPL_RANDOM
  input  logic [WAY_B-1:0]            access_way_i,  // way touched by this access
  output logic                        hit_o,
  output logic [WAY_B-1:0]            hit_way_o,
  output logic [WAY_B-1:0]            victim_o,
  output logic [WAYS-1:0][WAY_B-1:0]  ages_o         // ages after touching access_way_i
);

  always_comb begin
    hit_o     = 1'b0;
    hit_way_o = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (valid_i[w] && tags_i[w] == tag_i) begin
        hit_o     = 1'b1;
        hit_way_o = WAY_B'(w);
      end
    end
  end

  logic [WAY_B-1:0] lru_way;
  always_comb begin
    lru_way       = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (ages_i[w] == WAY_B'(WAYS - 1)) lru_way = WAY_B'(w);
    end
    for (int i = int'(WAYS) - 1; i >= 0; i--) begin
      if (!valid_i[i]) begin
        lru_way       = WAY_B'(i);
      end
    end
    if (WAYS == 1)               victim_o = '0;
    else if (REPL == REPL_LRU)   victim_o = lru_way;
    else                         victim_o = rnd_i;
  end

  always_comb begin
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (WAY_B'(w) == access_way_i)              ages_o[w] = '0;
      else if (ages_i[w] < ages_i[access_way_i])  ages_o[w] = ages_i[w] + WAY_B'(1);
      else                                        ages_o[w] = ages_i[w];
    end
  end

endmodule
