// iid_runs_tb: repeated end-to-end runs of one program, and the two
// statistical tests that decide whether measured run times can be used for
// measurement-based probabilistic timing analysis.
//
// The cache subsystem at its default parameters (4 KiB instruction and data
// caches, 32-byte lines, 4 ways, hashed placement, random replacement) runs
// the same synthetic program RUNS times through cache_driver, each run
// started with a new_run pulse (new placement seed, flushed caches). The
// run lengths in cycles are the execution times. Two tests at the 5% level
// are applied to them, as in the evaluation of the design:
//   independence: Wald-Wolfowitz runs test about the median. Values equal
//     to the median are dropped; the statistic
//     z = (R - mu) / sigma, mu = 2*n1*n2/n + 1,
//     sigma^2 = 2*n1*n2*(2*n1*n2 - n) / (n^2 * (n - 1)),
//     must satisfy |z| < 1.96.
//   identical distribution: two-sample Kolmogorov-Smirnov test between the
//     first and the second half of the runs. With D the largest distance of
//     the two empirical distribution functions and ne = n1*n2/(n1+n2), the
//     p-value is Q(lambda), lambda = (sqrt(ne) + 0.12 + 0.11/sqrt(ne)) * D,
//     Q(l) = 2 * sum_k (-1)^(k-1) exp(-2 k^2 l^2); it must exceed 0.05.
// From the same run times a Gumbel distribution is fitted by the method
// of moments to the maxima of blocks of 20 runs, and the run time exceeded
// with probability 10^-3 per run (the pWCET estimate) is computed. With 1000
// runs the largest observed time lies near that quantile, so the estimate
// must be above the mean and within 5% of the largest observation.
// A second subsystem with modulo placement and LRU replacement (the
// conventional, deterministic cache) runs the same program twice; its run
// time must be the same both times, and is printed next to the randomized
// cache's largest observed run time. The drivers check every instruction
// and data value. The program is fixed; only the cache randomization
// differs between runs, so the spread of the run times comes from the cache.
`timescale 1ns/1ps
module iid_runs_tb;
  import pcache_pkg::*;

  localparam int RUNS = 1000;
  localparam int HALF = RUNS / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // Randomized cache at the default parameters.
  ic_in_t ic_in; ic_out_t ic_out; dc_in_t dc_in; dc_out_t dc_out;
  mem_in_t mem_in; mem_out_t mem_out;
  logic ready, new_run, done;
  int   checks, failures, mr, mw;
  int   run_len [RUNS];

  prob_cache_top dut (
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
    .checks(checks), .failures(failures), .run_len(run_len), .done(done)
  );

  // Deterministic reference cache.
  ic_in_t ic_in_d; ic_out_t ic_out_d; dc_in_t dc_in_d; dc_out_t dc_out_d;
  mem_in_t mem_in_d; mem_out_t mem_out_d;
  logic ready_d, new_run_d, done_d;
  int   checks_d, failures_d, mr_d, mw_d;
  int   run_len_d [2];

  prob_cache_top #(.REPL(REPL_LRU), .PLACE(PLACE_MODULO)) ref_cache (
    .clk(clk), .rst_n(rst_n), .new_run_i(new_run_d), .ready_o(ready_d),
    .ic_in(ic_in_d), .ic_out(ic_out_d), .dc_in(dc_in_d), .dc_out(dc_out_d),
    .mem_out(mem_out_d), .mem_in(mem_in_d),
    .ic_hit_o(), .ic_miss_o(), .dc_hit_o(), .dc_miss_o(), .dc_writeback_o(),
    .reseed_o(), .placement_seed_o()
  );

  mem_model #(.LATENCY(2)) u_mem_d (
    .clk(clk), .req_i(mem_out_d), .rsp_o(mem_in_d), .reads_o(mr_d), .writes_o(mw_d)
  );

  cache_driver #(.RUNS(2)) u_drv_d (
    .clk(clk), .rst_n(rst_n), .ready(ready_d), .new_run(new_run_d),
    .ic_in(ic_in_d), .ic_out(ic_out_d), .dc_in(dc_in_d), .dc_out(dc_out_d),
    .checks(checks_d), .failures(failures_d), .run_len(run_len_d), .done(done_d)
  );

  int tc, tf;

  task automatic check(input bit ok, input string what);
    tc++;
    if (!ok) begin
      tf++;
      $display("FAIL %s", what);
    end
  endtask

  // Wald-Wolfowitz runs test statistic about the median.
  function automatic real runs_z(input int x [RUNS]);
    int   s [RUNS];
    int   med2, n1, n2, nruns, prev;
    real  n, mu, var_r;
    s = x;
    s.sort();
    med2 = s[HALF - 1] + s[HALF];          // twice the median
    n1 = 0; n2 = 0; nruns = 0; prev = 0;
    for (int i = 0; i < RUNS; i++) begin
      int side;
      if (2 * x[i] > med2)      side = 1;
      else if (2 * x[i] < med2) side = -1;
      else                      side = 0;
      if (side != 0) begin
        if (side > 0) n1++; else n2++;
        if (side != prev) nruns++;
        prev = side;
      end
    end
    n     = real'(n1 + n2);
    mu    = 2.0 * n1 * n2 / n + 1.0;
    var_r = 2.0 * n1 * n2 * (2.0 * n1 * n2 - n) / (n * n * (n - 1.0));
    $display("runs test: n1=%0d n2=%0d runs=%0d expected=%.1f", n1, n2, nruns, mu);
    return (real'(nruns) - mu) / $sqrt(var_r);
  endfunction

  // Two-sample Kolmogorov-Smirnov test, first half against second half;
  // returns the asymptotic p-value.
  function automatic real ks_p(input int x [RUNS]);
    int  a [HALF];
    int  b [HALF];
    int  i, j;
    real d, ne, lam, q, term;
    for (int k = 0; k < HALF; k++) begin
      a[k] = x[k];
      b[k] = x[HALF + k];
    end
    a.sort();
    b.sort();
    i = 0; j = 0; d = 0.0;
    while (i < HALF && j < HALF) begin
      int v;
      real diff;
      v = (a[i] <= b[j]) ? a[i] : b[j];
      while (i < HALF && a[i] == v) i++;
      while (j < HALF && b[j] == v) j++;
      diff = real'(i - j) / real'(HALF);
      if (diff < 0.0) diff = -diff;
      if (diff > d) d = diff;
    end
    ne  = real'(HALF) * real'(HALF) / real'(2 * HALF);
    lam = ($sqrt(ne) + 0.12 + 0.11 / $sqrt(ne)) * d;
    q   = 0.0;
    for (int k = 1; k <= 100; k++) begin
      term = 2.0 * $exp(-2.0 * k * k * lam * lam);
      q    = (k % 2 == 1) ? q + term : q - term;
    end
    if (q > 1.0) q = 1.0;
    if (q < 0.0) q = 0.0;
    $display("KS test: D=%.4f lambda=%.3f", d, lam);
    return q;
  endfunction

  // Gumbel fit by the method of moments to the maxima of blocks of BLOCK
  // runs, and the run time exceeded with probability PEXC per run:
  //   beta = sd * sqrt(6) / pi,  mu = mean - 0.5772 * beta,
  //   pb = 1 - (1 - PEXC)^BLOCK,  pWCET = mu - beta * ln(-ln(1 - pb)).
  localparam int  BLOCK = 20;
  localparam int  NBLK  = RUNS / BLOCK;
  localparam real PEXC  = 1.0e-3;

  function automatic real pwcet(input int x [RUNS]);
    real mx [NBLK];
    real m, v, beta, mu, pb;
    m = 0.0;
    for (int b = 0; b < NBLK; b++) begin
      mx[b] = 0.0;
      for (int k = 0; k < BLOCK; k++)
        if (real'(x[b * BLOCK + k]) > mx[b]) mx[b] = real'(x[b * BLOCK + k]);
      m += mx[b] / real'(NBLK);
    end
    v = 0.0;
    for (int b = 0; b < NBLK; b++) v += (mx[b] - m) * (mx[b] - m) / real'(NBLK - 1);
    beta = $sqrt(v) * $sqrt(6.0) / 3.14159265358979;
    mu   = m - 0.5772156649 * beta;
    pb   = 1.0 - $pow(1.0 - PEXC, real'(BLOCK));
    $display("Gumbel fit to %0d block maxima: mu=%.1f beta=%.1f", NBLK, mu, beta);
    return mu - beta * $ln(-$ln(1.0 - pb));
  endfunction

  initial begin
    real z, p, mean, tp;
    int  mn, mx, distinct;
    int  s [RUNS];
    tc = 0; tf = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done && done_d);
    @(negedge clk);
    tc += checks + checks_d;
    tf += failures + failures_d;

    s = run_len;
    s.sort();
    mn = s[0]; mx = s[RUNS - 1];
    distinct = 1;
    mean = 0.0;
    for (int i = 0; i < RUNS; i++) begin
      mean += real'(run_len[i]) / real'(RUNS);
      if (i > 0 && s[i] != s[i - 1]) distinct++;
    end
    $display("randomized cache: %0d runs, min %0d, mean %.1f, max %0d cycles, %0d distinct values",
             RUNS, mn, mean, mx, distinct);
    $display("deterministic cache: %0d and %0d cycles; largest randomized / deterministic = %.3f",
             run_len_d[0], run_len_d[1], real'(mx) / real'(run_len_d[0]));

    check(distinct > 10, "run times show too little variation");
    check(run_len_d[0] == run_len_d[1], "deterministic cache run times differ");
    z = runs_z(run_len);
    $display("runs test |z| = %.3f (pass below 1.96)", (z < 0.0) ? -z : z);
    check(z < 1.96 && z > -1.96, "Wald-Wolfowitz independence test");
    p = ks_p(run_len);
    $display("KS test p = %.3f (pass above 0.05)", p);
    check(p > 0.05, "Kolmogorov-Smirnov identical-distribution test");
    tp = pwcet(run_len);
    $display("pWCET at %.0e per run: %.1f cycles; largest observed %0d (ratio %.3f)",
             PEXC, tp, mx, tp / real'(mx));
    check(tp > mean && tp > 0.95 * real'(mx) && tp < 1.05 * real'(mx),
          "pWCET estimate inconsistent with the observed run times");

    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf + 1);
    $finish;
  end

endmodule
