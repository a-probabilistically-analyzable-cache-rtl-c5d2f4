// hash_function_tb: self-checking testbench for the placement hash.
//
// Checks the default hash (27-bit line address, 32-bit seed, 5 index bits)
// against a reference computed differently: rotations via a doubled
// vector and a shift, and the folding as the XOR of all 5-bit chunks of the
// concatenation {addr rotated by seed[9:0], addr, seed, addr rotated by
// addr[9:0]} (what successive halving XOR stages amount to). Then checks
// the properties placement needs: the same address and seed always give the
// same set; for a fixed seed, 32 consecutive-ish lines spread over sets
// (no set takes more than a quarter of 4096 lines); and for a fixed
// address, varying the seed reaches every one of the 32 sets.
`timescale 1ns/1ps
module hash_function_tb;

  localparam int unsigned AW = 27, RW = 32, IB = 5;

  logic [AW-1:0] addr;
  logic [RW-1:0] seed;
  logic [IB-1:0] index;
  logic [IB-1:0] index2;
  logic [AW-1:0] addr2;

  hash_function dut  (.addr_bits_i(addr),  .rnd_i(seed), .index_o(index));
  hash_function dut2 (.addr_bits_i(addr2), .rnd_i(seed), .index_o(index2));

  function automatic logic [AW-1:0] rot_ref(input logic [AW-1:0] v, input int unsigned amt);
    logic [2*AW-1:0] d;
    int unsigned a;
    a = amt % AW;
    d = {v, v} << a;
    return d[2*AW-1 -: AW];
  endfunction

  function automatic logic [IB-1:0] hash_ref(input logic [AW-1:0] a, input logic [RW-1:0] s);
    logic [3*AW+RW-1:0] cat;
    logic [IB-1:0] r;
    cat = {rot_ref(a, s[9:0]), a, s, rot_ref(a, a[9:0])};
    r = '0;
    for (int i = 0; i < 3 * AW + RW; i += IB)
      for (int b = 0; b < IB; b++)
        if (i + b < 3 * AW + RW) r[b] ^= cat[i + b];
    return r;
  endfunction

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int hist [32];
    bit seen [32];
    int maxc, nseen;
    logic [IB-1:0] first;
    for (int n = 0; n < 3000; n++) begin
      addr = AW'({$urandom, $urandom});
      seed = $urandom;
      #1;
      check(index == hash_ref(addr, seed), $sformatf("index for %h/%h", addr, seed));
      first = index;
      #1;
      check(index == first, "stable for a fixed address and seed");
    end
    // Spread over sets for a fixed seed.
    seed = 32'h0bad_cafe;
    foreach (hist[i]) hist[i] = 0;
    for (int n = 0; n < 4096; n++) begin
      addr = AW'(n);
      #1 hist[index]++;
    end
    maxc = 0;
    foreach (hist[i]) if (hist[i] > maxc) maxc = hist[i];
    check(maxc < 1024, $sformatf("fixed seed spreads lines (max %0d per set)", maxc));
    // Two addresses colliding under one seed are split by some other seed.
    addr = 27'h0000100; addr2 = 27'h0000120;
    begin
      int differ = 0;
      for (int n = 0; n < 64; n++) begin
        seed = $urandom;
        #1 if (index != index2) differ++;
      end
      check(differ > 0, "a pair of lines is not always in the same set");
    end
    // A fixed address reaches every set as the seed varies.
    foreach (seen[i]) seen[i] = 0;
    addr = 27'h12_3456;
    for (int n = 0; n < 2000; n++) begin
      seed = $urandom;
      #1 seen[index] = 1;
    end
    nseen = 0;
    foreach (seen[i]) nseen += seen[i];
    check(nseen == 32, $sformatf("seeds reach %0d of 32 sets", nseen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
