// mt19937: Mersenne Twister (MT19937) pseudo-random number generator.
//
// This is the random source of the cache: its 32-bit words choose the victim
// way on a replacement and, once per program run, the seed of the placement
// hash. The algorithm is the standard 32-bit MT19937 (624-word state,
// period 2^19937-1); the hardware organisation below is this design's own.
//
// How it works: after reset the state array is filled one word per cycle by
// the standard seeding recurrence
//   mt[i] = 1812433253 * (mt[i-1] ^ (mt[i-1] >> 30)) + i,
// with mt[0] = SEED, which takes N = 624 cycles. The twist is then done one word at a time in
// place (word i is replaced using words i+1 and i+397, modulo 624), which
// gives exactly the sequence of the block-wise software algorithm. Each new
// word is tempered and held on rnd_o.
//
// Interface and timing: ready_o rises once the first output is on rnd_o
// (625 clock edges after reset is released). While ready_o is high, a cycle with next_i=1
// replaces rnd_o by the next output at the following clock edge, so the
// generator delivers one number per cycle. next_i is ignored before ready_o.
module mt19937 #(
  parameter logic [31:0] SEED = 32'd5489  // standard MT19937 default seed
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        next_i,   // consume rnd_o, advance to the next number
  output logic [31:0] rnd_o,    // current tempered output
  output logic        ready_o   // rnd_o is valid
);

  localparam int unsigned N = 624;
  localparam int unsigned M = 397;
  localparam logic [31:0] MATRIX_A   = 32'h9908_b0df;
  localparam logic [31:0] UPPER_MASK = 32'h8000_0000;
  localparam logic [31:0] LOWER_MASK = 32'h7fff_ffff;
  localparam logic [31:0] INIT_MULT  = 32'd1812433253;

  typedef enum logic [1:0] {S_SEED, S_FIRST, S_RUN} state_e;

  logic [31:0] mt [N];
  state_e      state;
  logic [9:0]  idx;        // seeding: word being written; running: word to twist next
  logic [31:0] prev;       // last word written while seeding

  // Index arithmetic modulo N.
  logic [9:0] idx_p1, idx_pm;
  always_comb begin
    idx_p1 = (idx == 10'(N - 1)) ? 10'd0 : idx + 10'd1;
    idx_pm = (idx >= 10'(N - M)) ? idx - 10'(N - M) : idx + 10'(M);
  end

  // One step of the twist for word idx.
  logic [31:0] y, twisted, tempered;
  always_comb begin
    y       = (mt[idx] & UPPER_MASK) | (mt[idx_p1] & LOWER_MASK);
    twisted = mt[idx_pm] ^ (y >> 1) ^ (y[0] ? MATRIX_A : 32'h0);
    tempered = twisted;
    tempered = tempered ^ (tempered >> 11);
    tempered = tempered ^ ((tempered << 7)  & 32'h9d2c_5680);
    tempered = tempered ^ ((tempered << 15) & 32'hefc6_0000);
    tempered = tempered ^ (tempered >> 18);
  end

  // Seeding recurrence for word idx.
  logic [31:0] seed_word;
  always_comb seed_word = (idx == 10'd0) ? SEED : INIT_MULT * (prev ^ (prev >> 30)) + 32'(idx);

  logic do_twist;
  always_comb do_twist = (state == S_FIRST) || (state == S_RUN && next_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_SEED;
      idx     <= 10'd0;
      prev    <= '0;
      rnd_o   <= '0;
      ready_o <= 1'b0;
    end else begin
      unique case (state)
        S_SEED: begin
          prev <= seed_word;
          if (idx == 10'(N - 1)) begin
            state <= S_FIRST;
            idx   <= 10'd0;
          end else begin
            idx <= idx + 10'd1;
          end
        end
        S_FIRST: begin
          state   <= S_RUN;
          ready_o <= 1'b1;
        end
        S_RUN: ;
        default: state <= S_SEED;
      endcase
      if (do_twist) begin
        rnd_o <= tempered;
        idx   <= idx_p1;
      end
    end
  end

  // State array: written once while seeding, then rewritten word by word by
  // the twist. It has no reset; seeding overwrites every word.
  always_ff @(posedge clk) begin
    if (state == S_SEED) begin
      mt[idx] <= seed_word;
    end else if (do_twist) begin
      mt[idx] <= twisted;
    end
  end

endmodule
