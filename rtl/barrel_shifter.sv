// barrel_shifter: rotates a W-bit vector left by a run-time amount.
//
// Used twice inside the placement hash: once with random bits as the amount
// and once with bits of the address itself. The amount is reduced modulo W
// first, then applied by log2(W) stages, stage k rotating by 2^k positions
// when bit k of the reduced amount is set. Purely combinational.
module barrel_shifter #(
  parameter int unsigned W    = 27,  // width of the rotated vector
  parameter int unsigned SH_W = 10   // width of the rotate amount
) (
  input  logic [W-1:0]    data_i,
  input  logic [SH_W-1:0] amount_i,
  output logic [W-1:0]    data_o
);

  localparam int unsigned STAGES = (W > 1) ? $clog2(W) : 1;

  logic [SH_W-1:0]   amt_mod;
  logic [W-1:0]      stage [STAGES+1];

  always_comb begin
    amt_mod  = SH_W'(amount_i % SH_W'(W));
    stage[0] = data_i;
    for (int unsigned k = 0; k < STAGES; k++) begin
      if (k < SH_W && amt_mod[k]) begin
        for (int unsigned b = 0; b < W; b++)
          stage[k+1][(b + ((1 << k) % W)) % W] = stage[k][b];
      end else begin
        stage[k+1] = stage[k];
      end
    end
    data_o = stage[STAGES];
  end

endmodule
