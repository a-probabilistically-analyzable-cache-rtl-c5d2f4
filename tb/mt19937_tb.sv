// mt19937_tb: self-checking testbench for the MT19937 generator.
//
// Compares the hardware sequence with a software model of MT19937 written
// the usual block-wise way (seed the 624-word state, regenerate all words
// every 624 outputs, temper each). Checks the first three outputs for the
// standard seed 5489 against the published values 3499211612, 581869302 and
// 3890346734, 2000 consecutive outputs (crossing three state regenerations),
// that ready_o rises 625 cycles after reset, that one number is produced per
// cycle with next_i held high, and that rnd_o holds while next_i is low.
// A second instance with seed 1 checks the SEED parameter.
`timescale 1ns/1ps
module mt19937_tb;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        next_a, next_b;
  logic [31:0] rnd_a, rnd_b;
  logic        ready_a, ready_b;

  mt19937 dut_a (.clk(clk), .rst_n(rst_n), .next_i(next_a), .rnd_o(rnd_a), .ready_o(ready_a));
  mt19937 #(.SEED(32'd1)) dut_b (.clk(clk), .rst_n(rst_n), .next_i(next_b), .rnd_o(rnd_b),
                                 .ready_o(ready_b));

  // Software reference.
  class mt_ref;
    bit [31:0] mt[624];
    int        mti;
    function new(bit [31:0] s);
      mt[0] = s;
      for (int i = 1; i < 624; i++) mt[i] = 32'd1812433253 * (mt[i-1] ^ (mt[i-1] >> 30)) + i;
      mti = 624;
    endfunction
    function bit [31:0] next();
      bit [31:0] y;
      if (mti >= 624) begin
        for (int k = 0; k < 624; k++) begin
          y = (mt[k] & 32'h8000_0000) | (mt[(k + 1) % 624] & 32'h7fff_ffff);
          mt[k] = mt[(k + 397) % 624] ^ (y >> 1) ^ ((y & 1) ? 32'h9908_b0df : 32'h0);
        end
        mti = 0;
      end
      y = mt[mti++];
      y ^= (y >> 11);
      y ^= (y << 7) & 32'h9d2c_5680;
      y ^= (y << 15) & 32'hefc6_0000;
      y ^= (y >> 18);
      return y;
    endfunction
  endclass

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    mt_ref ra, rb;
    int cyc;
    logic [31:0] held;
    ra = new(32'd5489);
    rb = new(32'd1);
    next_a = 1'b0; next_b = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;
    while (!ready_a) begin
      @(negedge clk);
      cyc++;
      if (cyc > 2000) break;
    end
    check(cyc == 625, $sformatf("ready after %0d cycles", cyc));
    check(ready_b, "second instance ready");
    // Published first outputs for seed 5489.
    check(rnd_a == 32'd3499211612, "first output");
    void'(ra.next());
    next_a = 1'b1;
    @(negedge clk);
    check(rnd_a == 32'd581869302, "second output");
    void'(ra.next());
    @(negedge clk);
    check(rnd_a == 32'd3890346734, "third output");
    void'(ra.next());
    // 2000 outputs, one per cycle.
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(rnd_a == ra.next(), $sformatf("output %0d", i + 3));
    end
    // Hold.
    next_a = 1'b0;
    @(negedge clk);
    held = rnd_a;
    void'(ra.next());
    repeat (5) @(negedge clk);
    check(rnd_a == held, "output held while next_i is low");
    // Seed 1, with gaps between requests.
    check(rnd_b == rb.next(), "seed 1 output 0");
    for (int i = 1; i < 700; i++) begin
      next_b = 1'b1;
      @(negedge clk);
      next_b = 1'b0;
      check(rnd_b == rb.next(), $sformatf("seed 1 output %0d", i));
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
