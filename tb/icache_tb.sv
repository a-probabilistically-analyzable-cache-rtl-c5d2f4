// icache_tb: self-checking testbench for the instruction cache.
//
// Runs the cache at its default size (4 KiB, 32-byte lines, 4 ways, random
// replacement) against the behavioural memory. The testbench plays the role
// of the placement hash (its own set mapping, changed at every flush) and
// of the random source (a fresh $urandom way each cycle), and keeps its own
// model of which lines each set holds. For every fetch it checks:
//   - the instruction word against the memory formula;
//   - hit or miss against the model (the victim being the random way the
//     testbench drove in the miss cycle);
//   - the wait cycles: 0 on a hit, 1 + 8*(LATENCY+1) on a miss.
// It also checks that a flush empties the cache, that a fetch held with
// ic_in.stall does nothing, and that the memory sees one line read per miss.
`timescale 1ns/1ps
module icache_tb;
  import pcache_pkg::*;

  localparam int unsigned CACHE_BYTES = 4096;
  localparam int unsigned LINE_BYTES  = 32;
  localparam int unsigned WAYS        = 4;
  localparam int unsigned SETS        = CACHE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned INDEX_BITS  = $clog2(SETS);
  localparam int unsigned WORDS       = LINE_BYTES / 4;
  localparam int unsigned LATENCY     = 2;
  localparam int unsigned LINE_ADDR_W = 27;

  logic clk = 1'b0, rst_n = 1'b0, flush = 1'b0;
  always #5 clk = ~clk;

  ic_in_t   ic_in;
  ic_out_t  ic_out;
  mem_in_t  mem_in;
  mem_out_t mem_out;
  logic [LINE_ADDR_W-1:0] place_addr;
  logic [INDEX_BITS-1:0]  place_index;
  logic [1:0]             rnd_way;
  logic                   repl_req, hit, miss;
  int                     mem_reads, mem_writes;
  logic [31:0]            map_key;

  icache dut (
    .clk(clk), .rst_n(rst_n), .flush_i(flush), .ready_i(1'b1),
    .ic_in(ic_in), .ic_out(ic_out),
    .place_addr_o(place_addr), .place_index_i(place_index),
    .repl_rnd_i(rnd_way), .repl_req_o(repl_req),
    .mem_in(mem_in), .mem_out(mem_out), .hit_o(hit), .miss_o(miss)
  );

  mem_model #(.LATENCY(LATENCY)) u_mem (
    .clk(clk), .req_i(mem_out), .rsp_o(mem_in), .reads_o(mem_reads), .writes_o(mem_writes)
  );

  // Testbench placement: a keyed mapping, changed at every flush.
  function automatic logic [INDEX_BITS-1:0] tb_set(input logic [LINE_ADDR_W-1:0] line);
    logic [31:0] h;
    h = (32'(line) * 32'h9e37_79b1) ^ map_key;
    return h[31 -: INDEX_BITS];
  endfunction
  always_comb place_index = tb_set(place_addr);

  // Model of the cache contents.
  logic                   m_valid [SETS][WAYS];
  logic [LINE_ADDR_W-1:0] m_tag   [SETS][WAYS];

  int checks = 0, failures = 0;
  int n_hits = 0, n_misses = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic model_clear();
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) m_valid[s][w] = 1'b0;
  endtask

  function automatic data_t init_word(input addr_t a);
    return {a[17:2] ^ 16'h5a3c, ~a[17:2]};
  endfunction

  // One fetch; returns after the cycle in which it completed.
  task automatic fetch(input addr_t a);
    logic [LINE_ADDR_W-1:0] line;
    logic [INDEX_BITS-1:0]  s;
    bit   exp_hit;
    int   waits;
    logic [1:0] victim;
    line = a[31:5];
    s    = tb_set(line);
    exp_hit = 0;
    for (int w = 0; w < WAYS; w++) if (m_valid[s][w] && m_tag[s][w] == line) exp_hit = 1;
    @(negedge clk);
    ic_in.addr = a; ic_in.rd = 1'b1; ic_in.stall = 1'b0;
    rnd_way = 2'($urandom);
    #1;
    check(hit == exp_hit && miss == !exp_hit, $sformatf("hit/miss for %h", a));
    victim = rnd_way;
    waits = 0;
    while (ic_out.stall) begin
      @(negedge clk);
      rnd_way = 2'($urandom);
      #1;
      waits++;
      if (waits > 1000) break;
    end
    check(ic_out.data == init_word(a), $sformatf("data for %h", a));
    if (exp_hit) begin
      n_hits++;
      check(waits == 0, "hit wait cycles");
    end else begin
      n_misses++;
      check(waits == 1 + WORDS * (LATENCY + 1), $sformatf("miss wait cycles %0d", waits));
      m_valid[s][victim] = 1'b1;
      m_tag[s][victim]   = line;
    end
  endtask

  initial begin
    int reads0;
    addr_t pool [64];
    ic_in = '0; rnd_way = '0; map_key = 32'h1234_5678;
    model_clear();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Flush takes SETS cycles.
    repeat (SETS + 2) @(negedge clk);

    // Pool of lines spread over 16 KiB, more than the cache holds.
    for (int i = 0; i < 64; i++) pool[i] = addr_t'($urandom_range(0, 511)) << 5;

    reads0 = mem_reads;
    for (int n = 0; n < 3000; n++) begin
      fetch(pool[$urandom_range(0, 63)] | addr_t'($urandom_range(0, WORDS - 1) << 2));
      if (n == 1500) begin
        // Held fetch: ic_in.stall keeps the cache idle.
        @(negedge clk);
        ic_in.rd = 1'b1; ic_in.stall = 1'b1; ic_in.addr = 32'h0003_0000;
        #1 check(!hit && !miss && !ic_out.stall, "stalled fetch ignored");
        // New run: flush with a new placement.
        @(negedge clk);
        ic_in.rd = 1'b0; ic_in.stall = 1'b0;
        flush = 1'b1;
        @(negedge clk);
        flush = 1'b0;
        map_key = $urandom;
        model_clear();
        repeat (SETS + 2) @(negedge clk);
      end
    end
    @(negedge clk);
    ic_in.rd = 1'b0;
    check(mem_reads - reads0 == n_misses * WORDS, "memory reads per miss");
    check(mem_writes == 0, "no memory writes");
    check(n_hits > 100 && n_misses > 100, "both hits and misses exercised");
    $display("icache_tb: %0d hits, %0d misses", n_hits, n_misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
