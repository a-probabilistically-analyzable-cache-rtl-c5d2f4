// hash_function: parametric hash that gives the cache set of a line address.
//
// Random placement is made by hashing the line address (the address without
// its byte-offset bits) together with a random seed. For a fixed seed the
// mapping is fixed, so a program sees a constant placement during one run;
// a new seed at the start of the next run gives an independent placement.
//
// Structure (following the hash figure of the design): one barrel shifter
// rotates the address bits by the low random bits (rnd[9:0]), a second one
// rotates the address bits by the address's own low bits (addr[9:0]). The
// original address bits, the random word and both rotated copies are
// concatenated, and the concatenation is XOR-folded in successive stages,
// each XORing the upper half into the lower half, until INDEX_BITS remain.
// The concatenation is zero-extended to INDEX_BITS * 2^k bits first; the
// number of stages k therefore depends on INDEX_BITS (5 stages for 5 index
// bits, 4 stages for 8 to 14 index bits). Purely combinational.
module hash_function #(
  parameter int unsigned LINE_ADDR_W = 27,  // 32-bit address minus 5 offset bits
  parameter int unsigned RND_W       = 32,  // width of the random seed
  parameter int unsigned SH_W        = 10,  // bits used as rotate amounts
  parameter int unsigned INDEX_BITS  = 5    // set index width
) (
  input  logic [LINE_ADDR_W-1:0] addr_bits_i,  // line address
  input  logic [RND_W-1:0]       rnd_i,        // placement seed
  output logic [INDEX_BITS-1:0]  index_o       // set index
);

  localparam int unsigned CAT_W   = 3 * LINE_ADDR_W + RND_W;
  localparam int unsigned CHUNKS  = (CAT_W + INDEX_BITS - 1) / INDEX_BITS;
  localparam int unsigned NSTAGES = (CHUNKS > 1) ? $clog2(CHUNKS) : 0;
  localparam int unsigned PAD_W   = INDEX_BITS << NSTAGES;

  logic [LINE_ADDR_W-1:0] rot_rnd, rot_self;

  barrel_shifter #(.W(LINE_ADDR_W), .SH_W(SH_W)) u_rot_rnd (
    .data_i  (addr_bits_i),
    .amount_i(rnd_i[SH_W-1:0]),
    .data_o  (rot_rnd)
  );

  barrel_shifter #(.W(LINE_ADDR_W), .SH_W(SH_W)) u_rot_self (
    .data_i  (addr_bits_i),
    .amount_i(addr_bits_i[SH_W-1:0]),
    .data_o  (rot_self)
  );

  logic [PAD_W-1:0] fold;

  always_comb begin
    fold = PAD_W'({rot_rnd, addr_bits_i, rnd_i, rot_self});
    for (int unsigned s = 0; s < NSTAGES; s++) begin
      // Stage s: width goes from PAD_W >> s to PAD_W >> (s+1).
      for (int unsigned i = 0; i < (PAD_W >> (s + 1)); i++)
        fold[i] = fold[i] ^ fold[i + (PAD_W >> (s + 1))];
    end
    index_o = fold[INDEX_BITS-1:0];
  end

endmodule
