// config_sweep_tb: the cache configurations of the evaluation, end to end.
//
// Instantiates the cache subsystem in the configurations the design is
// evaluated in, each with its own memory and a cache_driver running the same
// synthetic program RUNS (20) times:
//   4 KiB, 32-byte lines: direct-mapped, 2-way, 8-way (4-way is the default
//   and is covered by the top-level testbench);
//   2 KiB, 32-byte lines: 2-, 4- and 8-way;  8 KiB 2-way;  4 KiB 4-way with
//   16-byte lines;
//   4 KiB 4-way with modulo placement and LRU replacement (the deterministic
//   reference cache).
// Checks all instruction and data values in every configuration, that the
// randomized configurations give run lengths that vary from run to run, and
// that the deterministic one gives the same run length every time. Prints
// the smallest, mean and largest run length of each configuration, and
// checks that at 2 ways the mean falls from 2 KiB to 4 KiB to 8 KiB.
`timescale 1ns/1ps
module config_sweep_tb;
  import pcache_pkg::*;

  localparam int NCFG = 9;
  localparam int RUNS = 20;
  // Configuration table: capacity, line size, ways, deterministic?
  localparam int CFG_BYTES [NCFG] = '{4096, 4096, 4096, 2048, 2048, 2048, 8192, 4096, 4096};
  localparam int CFG_LINE  [NCFG] = '{32,   32,   32,   32,   32,   32,   32,   16,   32};
  localparam int CFG_WAYS  [NCFG] = '{1,    2,    8,    2,    4,    8,    2,    4,    4};
  localparam bit CFG_DET   [NCFG] = '{0,    0,    0,    0,    0,    0,    0,    0,    1};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int   checks [NCFG];
  int   failures [NCFG];
  int   run_len [NCFG][RUNS];
  logic done [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    ic_in_t ic_in; ic_out_t ic_out; dc_in_t dc_in; dc_out_t dc_out;
    mem_in_t mem_in; mem_out_t mem_out;
    logic ready, new_run;
    int   mr, mw;
    int   rl [RUNS];

    prob_cache_top #(
      .CACHE_BYTES(CFG_BYTES[c]), .LINE_BYTES(CFG_LINE[c]), .WAYS(CFG_WAYS[c]),
      .REPL (CFG_DET[c] ? REPL_LRU : REPL_RANDOM),
      .PLACE(CFG_DET[c] ? PLACE_MODULO : PLACE_HASH)
    ) dut (
      .clk(clk), .rst_n(rst_n), .new_run_i(new_run), .ready_o(ready),
      .ic_in(ic_in), .ic_out(ic_out), .dc_in(dc_in), .dc_out(dc_out),
      .mem_out(mem_out), .mem_in(mem_in),
      .ic_hit_o(), .ic_miss_o(), .dc_hit_o(), .dc_miss_o(), .dc_writeback_o(),
      .reseed_o(), .placement_seed_o()
    );

    mem_model #(.LATENCY(2)) u_mem (
      .clk(clk), .req_i(mem_out), .rsp_o(mem_in), .reads_o(mr), .writes_o(mw)
    );

    cache_driver #(.RUNS(RUNS)) u_drv (
      .clk(clk), .rst_n(rst_n), .ready(ready), .new_run(new_run),
      .ic_in(ic_in), .ic_out(ic_out), .dc_in(dc_in), .dc_out(dc_out),
      .checks(checks[c]), .failures(failures[c]), .run_len(rl), .done(done[c])
    );

    always_comb for (int r = 0; r < RUNS; r++) run_len[c][r] = rl[r];
  end

  initial begin
    int  tc, tf;
    bit  all_done;
    int  mn [NCFG];
    int  mx [NCFG];
    real mean [NCFG];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all_done = 1;
      for (int c = 0; c < NCFG; c++) if (!done[c]) all_done = 0;
    end while (!all_done);
    tc = 0; tf = 0;
    for (int c = 0; c < NCFG; c++) begin
      int varies;
      varies = 0;
      tc += checks[c]; tf += failures[c];
      for (int r = 1; r < RUNS; r++) if (run_len[c][r] != run_len[c][0]) varies++;
      tc++;
      if (CFG_DET[c] ? (varies != 0) : (varies == 0)) begin
        tf++;
        $display("FAIL config %0d: run-length variation %0d", c, varies);
      end
      mn[c] = run_len[c][0]; mx[c] = run_len[c][0]; mean[c] = 0.0;
      for (int r = 0; r < RUNS; r++) begin
        if (run_len[c][r] < mn[c]) mn[c] = run_len[c][r];
        if (run_len[c][r] > mx[c]) mx[c] = run_len[c][r];
        mean[c] += real'(run_len[c][r]) / real'(RUNS);
      end
      $display("config %0d (%0d B, %0d B lines, %0d ways, %s): %0d runs, min %0d mean %.1f max %0d cycles",
               c, CFG_BYTES[c], CFG_LINE[c], CFG_WAYS[c], CFG_DET[c] ? "modulo/LRU" : "hash/random",
               RUNS, mn[c], mean[c], mx[c]);
    end
    // Size sweep at 2 ways (configs 3, 1, 6: 2, 4, 8 KiB): the program's
    // 14 KiB footprint fits better in a larger cache, so the mean run time
    // must fall as the capacity grows.
    tc++;
    if (!(mean[3] > mean[1] && mean[1] > mean[6])) begin
      tf++;
      $display("FAIL mean run time does not fall from 2 to 4 to 8 KiB");
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

endmodule
