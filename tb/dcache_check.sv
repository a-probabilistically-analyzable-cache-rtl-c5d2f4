// dcache_check: one checked data cache instance for dcache_tb.
//
// Default size (4 KiB, 32-byte lines, 4 ways, random replacement) with the
// write policy WRITE, against the behavioural memory. The testbench supplies the set mapping and the
// random victim way itself and keeps a model of the cache (valid, tag and
// dirty per way) and a shadow copy of the whole memory image. Random reads
// and byte-masked writes over 16 KiB check:
//   - read data against the shadow image (so written-back data is right);
//   - hit/miss against the model, and write-back of dirty victims only;
//   - wait cycles: read hit 1, write hit 2, clean read miss
//     3 + 8*(LATENCY+1), one more for a write miss, and 8*(LATENCY+1) more
//     when the victim is dirty; write-through adds LATENCY+1 per write, and
//     a non-allocating write miss waits 2 + LATENCY;
//   - memory traffic: 8 reads per allocating miss, 8 writes per dirty
//     victim (write-back) or one write per store (write-through).
// Reports its check and failure counts and raises done at the end.
`timescale 1ns/1ps
module dcache_check
  import pcache_pkg::*;
#(
  parameter write_policy_e WRITE = WP_WB_WA
) (
  output int   checks,
  output int   failures,
  output logic done
);

  localparam bit WT = (WRITE != WP_WB_WA);
  localparam bit NA = (WRITE == WP_WT_NWA);

  localparam int unsigned CACHE_BYTES = 4096;
  localparam int unsigned LINE_BYTES  = 32;
  localparam int unsigned WAYS        = 4;
  localparam int unsigned SETS        = CACHE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned INDEX_BITS  = $clog2(SETS);
  localparam int unsigned WORDS       = LINE_BYTES / 4;
  localparam int unsigned LATENCY     = 1;
  localparam int unsigned LINE_ADDR_W = 27;
  localparam int unsigned SPAN_WORDS  = 4096;   // 16 KiB exercised

  logic clk = 1'b0, rst_n = 1'b0, flush = 1'b0;
  always #5 clk = ~clk;

  dc_in_t   dc_in;
  dc_out_t  dc_out;
  mem_in_t  mem_in;
  mem_out_t mem_out;
  logic [LINE_ADDR_W-1:0] place_addr;
  logic [INDEX_BITS-1:0]  place_index;
  logic [1:0]             rnd_way;
  logic                   repl_req, hit, miss, wb;
  int                     mem_reads, mem_writes;
  logic [31:0]            map_key;

  dcache #(.WRITE(WRITE)) dut (
    .clk(clk), .rst_n(rst_n), .flush_i(flush), .ready_i(1'b1),
    .dc_in(dc_in), .dc_out(dc_out),
    .place_addr_o(place_addr), .place_index_i(place_index),
    .repl_rnd_i(rnd_way), .repl_req_o(repl_req),
    .mem_in(mem_in), .mem_out(mem_out), .hit_o(hit), .miss_o(miss), .writeback_o(wb)
  );

  mem_model #(.LATENCY(LATENCY)) u_mem (
    .clk(clk), .req_i(mem_out), .rsp_o(mem_in), .reads_o(mem_reads), .writes_o(mem_writes)
  );

  function automatic logic [INDEX_BITS-1:0] tb_set(input logic [LINE_ADDR_W-1:0] line);
    logic [31:0] h;
    h = (32'(line) * 32'h9e37_79b1) ^ map_key;
    return h[31 -: INDEX_BITS];
  endfunction
  always_comb place_index = tb_set(place_addr);

  function automatic data_t init_word(input addr_t a);
    return {a[17:2] ^ 16'h5a3c, ~a[17:2]};
  endfunction

  logic                   m_valid [SETS][WAYS];
  logic                   m_dirty [SETS][WAYS];
  logic [LINE_ADDR_W-1:0] m_tag   [SETS][WAYS];
  data_t                  shadow  [SPAN_WORDS];

  int n_hits = 0, n_misses = 0, n_wbacks = 0, n_rd = 0, n_wr = 0, n_nalloc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic access(input addr_t a, input bit is_wr, input data_t wdata, input mask_t mask);
    logic [LINE_ADDR_W-1:0] line;
    logic [INDEX_BITS-1:0]  s;
    bit   exp_hit, exp_wb, saw_miss, alloc;
    int   waits, exp_waits, hw;
    logic [1:0] victim;
    line = a[31:5];
    s    = tb_set(line);
    exp_hit = 0; hw = 0;
    for (int w = 0; w < WAYS; w++)
      if (m_valid[s][w] && m_tag[s][w] == line) begin exp_hit = 1; hw = w; end
    @(negedge clk);
    dc_in.addr = a; dc_in.rd = !is_wr; dc_in.wr = is_wr; dc_in.data = wdata; dc_in.mask = mask;
    rnd_way = 2'($urandom);
    #1;
    waits = 0; saw_miss = 0; victim = 0;
    while (dc_out.stall) begin
      if (miss && !saw_miss) begin saw_miss = 1; victim = rnd_way; end
      @(negedge clk);
      rnd_way = 2'($urandom);
      #1;
      waits++;
      if (waits > 1000) break;
    end
    check(saw_miss == !exp_hit, $sformatf("hit/miss for %h", a));
    exp_wb = 0;
    alloc  = !exp_hit && !(NA && is_wr);
    if (!exp_hit && !alloc) begin
      n_misses++;
      n_nalloc++;
    end else if (!exp_hit) begin
      exp_wb = m_valid[s][victim] && m_dirty[s][victim];
      m_valid[s][victim] = 1'b1;
      m_dirty[s][victim] = 1'b0;
      m_tag[s][victim]   = line;
      hw = victim;
      n_misses++;
      if (exp_wb) n_wbacks++;
    end else begin
      n_hits++;
    end
    exp_waits = (exp_hit ? 1 : 3 + WORDS * (LATENCY + 1)) + (is_wr ? 1 : 0)
                + (exp_wb ? WORDS * (LATENCY + 1) : 0) + ((WT && is_wr) ? LATENCY + 1 : 0);
    if (!exp_hit && !alloc) exp_waits = 2 + LATENCY;
    check(waits == exp_waits, $sformatf("wait cycles %0d, expected %0d", waits, exp_waits));
    if (is_wr) begin
      n_wr++;
      if (exp_hit || alloc) m_dirty[s][hw] = !WT;
      for (int b = 0; b < 4; b++)
        if (mask[b]) shadow[a[13:2]][8*b +: 8] = wdata[8*b +: 8];
    end else begin
      n_rd++;
      check(dc_out.data == shadow[a[13:2]], $sformatf("read data for %h", a));
    end
    @(negedge clk);
    dc_in.rd = 1'b0; dc_in.wr = 1'b0;
  endtask

  initial begin
    int reads0, writes0;
    checks = 0; failures = 0; done = 1'b0;
    dc_in = '0; rnd_way = '0; map_key = 32'hcafe_f00d ^ 32'(WRITE);
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin
      m_valid[s][w] = 0; m_dirty[s][w] = 0;
    end
    for (int i = 0; i < SPAN_WORDS; i++) shadow[i] = init_word(addr_t'(i << 2));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (SETS + 2) @(negedge clk);
    reads0 = mem_reads; writes0 = mem_writes;

    for (int n = 0; n < 4000; n++) begin
      addr_t a;
      // Mostly a hot 2 KiB region, sometimes anywhere in 16 KiB.
      if ($urandom_range(0, 3) != 0) a = addr_t'($urandom_range(0, 511)) << 2;
      else                           a = addr_t'($urandom_range(0, SPAN_WORDS - 1)) << 2;
      if ($urandom_range(0, 2) == 0) access(a, 1'b1, $urandom, mask_t'($urandom_range(1, 15)));
      else                           access(a, 1'b0, '0, '0);
    end
    check(mem_reads - reads0 == (n_misses - n_nalloc) * WORDS, "memory reads per allocating miss");
    if (WT) check(mem_writes - writes0 == n_wr, "one memory write per store");
    else    check(mem_writes - writes0 == n_wbacks * WORDS, "memory writes per dirty victim");
    check(n_hits > 100 && n_misses > 100, "hits and misses exercised");
    check(WT ? n_wbacks == 0 : n_wbacks > 20, "write-backs only in write-back mode");
    check(NA ? n_nalloc > 20 : n_nalloc == 0, "non-allocating write misses only without write-allocate");
    // Every word of the span reads back the shadow image.
    for (int i = 0; i < SPAN_WORDS; i += 3) access(addr_t'(i << 2), 1'b0, '0, '0);
    $display("dcache policy %s: %0d hits, %0d misses, %0d write-backs, %0d reads, %0d writes",
             WRITE.name(), n_hits, n_misses, n_wbacks, n_rd, n_wr);
    done = 1'b1;
  end

endmodule
