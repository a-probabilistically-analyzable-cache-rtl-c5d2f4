// prob_cache_top_tb: end-to-end testbench of the randomized cache subsystem.
//
// The top runs with all parameters at their defaults (4 KiB instruction and
// data caches, 32-byte lines, 4 ways, random replacement, hash placement,
// MT19937 seed 5489). The testbench acts as the processor and runs the same
// synthetic program RUNS times, pulsing new_run_i between runs as a timing
// measurement campaign does. Each run has an instruction stream (a 6 KiB
// loop body with a branch, larger than the instruction cache) and, in
// parallel, a data stream (reads and byte-masked writes over 8 KiB). The
// behavioural memory stands for main memory.
// Checks: every instruction word and every data read that has a known
// value; instruction hits complete with no wait cycle and data read hits
// with one; memory traffic matches the miss/write-back counts; each run
// gets a new placement seed. Mechanisms counted (each must occur): I-cache
// hits and misses, D-cache hits, misses and dirty write-backs, new runs
// with reseeding, both caches contending for memory, and at least two
// different run lengths (the point of the design: execution time varies
// from run to run with the random placement and replacement).
`timescale 1ns/1ps
module prob_cache_top_tb;
  import pcache_pkg::*;

  localparam int unsigned RUNS       = 6;
  localparam int unsigned FETCHES    = 4000;
  localparam int unsigned DACCESSES  = 1200;
  localparam int unsigned LATENCY    = 2;

  logic clk = 1'b0, rst_n = 1'b0, new_run = 1'b0;
  always #5 clk = ~clk;

  ic_in_t   ic_in;
  ic_out_t  ic_out;
  dc_in_t   dc_in;
  dc_out_t  dc_out;
  mem_in_t  mem_in;
  mem_out_t mem_out;
  logic     ready, ic_hit, ic_miss, dc_hit, dc_miss, dc_wb, reseed;
  logic [31:0] seed;
  int       mem_reads, mem_writes;

  prob_cache_top dut (
    .clk(clk), .rst_n(rst_n), .new_run_i(new_run), .ready_o(ready),
    .ic_in(ic_in), .ic_out(ic_out), .dc_in(dc_in), .dc_out(dc_out),
    .mem_out(mem_out), .mem_in(mem_in),
    .ic_hit_o(ic_hit), .ic_miss_o(ic_miss), .dc_hit_o(dc_hit), .dc_miss_o(dc_miss),
    .dc_writeback_o(dc_wb), .reseed_o(reseed), .placement_seed_o(seed)
  );

  mem_model #(.LATENCY(LATENCY)) u_mem (
    .clk(clk), .req_i(mem_out), .rsp_o(mem_in), .reads_o(mem_reads), .writes_o(mem_writes)
  );

  function automatic data_t init_word(input addr_t a);
    return {a[17:2] ^ 16'h5a3c, ~a[17:2]};
  endfunction

  // Data image: 8 KiB at 0x0001_0000. known[] is cleared for written words
  // at a new run, because a flush discards dirty lines.
  localparam addr_t DBASE = 32'h0001_0000;
  localparam int unsigned DWORDS = 2048;
  data_t shadow [DWORDS];
  bit    known  [DWORDS];
  bit    written[DWORDS];

  int checks = 0, failures = 0;
  int c_ic_hit = 0, c_ic_miss = 0, c_dc_hit = 0, c_dc_miss = 0, c_dc_wb_words = 0;
  int c_reseed = 0, c_contend = 0, c_runs = 0, c_unknown_reads = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (ic_hit)  c_ic_hit++;
    if (ic_miss) c_ic_miss++;
    if (dc_hit)  c_dc_hit++;
    if (dc_miss) c_dc_miss++;
    if (dc_wb && !dut.dc_mem_in.stall) c_dc_wb_words++;
    if (reseed)  c_reseed++;
    if (dut.ic_mem_out.rd && (dut.dc_mem_out.rd || dut.dc_mem_out.wr)) c_contend++;
  end

  task automatic fetch(input addr_t a);
    int waits;
    bit first_hit;
    @(negedge clk);
    ic_in.addr = a; ic_in.rd = 1'b1; ic_in.stall = 1'b0;
    #1;
    first_hit = ic_hit;
    waits = 0;
    while (ic_out.stall) begin
      @(negedge clk);
      #1;
      waits++;
      if (waits > 5000) break;
    end
    check(ic_out.data == init_word(a), $sformatf("instruction at %h", a));
    if (first_hit) check(waits == 0, "instruction hit without wait");
    else           check(waits >= 1 + 8 * (LATENCY + 1), "instruction miss waits for a line");
  endtask

  task automatic daccess(input int unsigned w, input bit is_wr, input data_t wd, input mask_t m);
    int waits;
    bit hit_seen, miss_seen;
    @(negedge clk);
    dc_in.addr = DBASE + addr_t'(w << 2); dc_in.rd = !is_wr; dc_in.wr = is_wr;
    dc_in.data = wd; dc_in.mask = m;
    #1;
    waits = 0; hit_seen = 0; miss_seen = 0;
    while (dc_out.stall) begin
      @(negedge clk);
      #1;
      if (dc_hit) hit_seen = 1;
      if (dc_miss) miss_seen = 1;
      waits++;
      if (waits > 5000) break;
    end
    if (!is_wr) begin
      if (known[w]) check(dc_out.data == shadow[w], $sformatf("data word %0d", w));
      else c_unknown_reads++;
      if (hit_seen && !miss_seen) check(waits == 1, "data read hit after one wait");
    end else begin
      for (int b = 0; b < 4; b++) if (m[b]) shadow[w][8*b +: 8] = wd[8*b +: 8];
      written[w] = 1;
      known[w] = (m == 4'hf) ? 1'b1 : known[w];
    end
    @(negedge clk);
    dc_in.rd = 1'b0; dc_in.wr = 1'b0;
  endtask

  int run_len [RUNS];

  initial begin
    int t0, distinct, r0, w0;
    logic [31:0] seeds [RUNS];
    ic_in = '0; dc_in = '0;
    for (int i = 0; i < DWORDS; i++) begin
      shadow[i] = init_word(DBASE + addr_t'(i << 2)); known[i] = 1; written[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (ready);
    r0 = mem_reads; w0 = mem_writes;
    for (int r = 0; r < RUNS; r++) begin
      if (r > 0) begin
        @(negedge clk);
        new_run = 1'b1;
        @(negedge clk);
        new_run = 1'b0;
        // A flush loses dirty lines: words whose last write was partial or
        // may not have reached memory are no longer known.
        for (int i = 0; i < DWORDS; i++) if (written[i]) known[i] = 0;
      end
      #1 seeds[r] = seed;
      t0 = int'($time / 10);
      fork
        begin : istream
          addr_t pc;
          pc = 32'h0000_0000;
          for (int n = 0; n < FETCHES; n++) begin
            fetch(pc);
            // Loop body of 6 KiB with a branch every 64 instructions.
            if (n % 64 == 63) pc = (pc + 32'h0000_0400) % 32'h0000_1800;
            else              pc = (pc + 4) % 32'h0000_1800;
          end
          @(negedge clk);
          ic_in.rd = 1'b0;
        end
        begin : dstream
          // Same data program every run (fixed pseudo-random sequence).
          int unsigned x;
          x = 32'd12345;
          for (int n = 0; n < DACCESSES; n++) begin
            int unsigned w;
            x = x * 32'd1103515245 + 32'd12345;
            w = (x >> 8) % DWORDS;
            if (n % 4 == 3) daccess(w, 1'b1, x ^ 32'h5555_aaaa, 4'hf);
            else if (n % 16 == 5) daccess(w, 1'b1, x, 4'b0110);
            else daccess(w, 1'b0, '0, '0);
          end
        end
      join
      run_len[r] = int'($time / 10) - t0;
      c_runs++;
      $display("run %0d: seed %h, %0d cycles", r, seeds[r], run_len[r]);
    end
    // Memory traffic: 8 words read per miss, 8 written per dirty victim.
    check(mem_reads - r0 == 8 * (c_ic_miss + c_dc_miss), "memory reads match misses");
    check(mem_writes - w0 == c_dc_wb_words, "memory writes match write-backs");
    for (int r = 1; r < RUNS; r++) check(seeds[r] != seeds[r-1], "new seed per run");
    distinct = 0;
    for (int r = 1; r < RUNS; r++) if (run_len[r] != run_len[0]) distinct++;
    check(distinct > 0, "run length varies between runs");
    check(c_ic_hit > 0,  "I-cache hits happened");
    check(c_ic_miss > 0, "I-cache misses happened");
    check(c_dc_hit > 0,  "D-cache hits happened");
    check(c_dc_miss > 0, "D-cache misses happened");
    check(c_dc_wb_words > 0, "dirty write-backs happened");
    check(c_reseed >= RUNS, "placement reseeded for every run");
    check(c_contend > 0, "both caches contended for memory");
    $display("mechanisms: ic_hit=%0d ic_miss=%0d dc_hit=%0d dc_miss=%0d wb_words=%0d reseed=%0d contend=%0d runs=%0d",
             c_ic_hit, c_ic_miss, c_dc_hit, c_dc_miss, c_dc_wb_words, c_reseed, c_contend, c_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
