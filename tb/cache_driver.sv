// cache_driver: processor stand-in that runs a synthetic program through a
// prob_cache_top instance, for the configuration-sweep and i.i.d. testbenches.
//
// It runs the same program RUNS times, each run starting with a new_run pulse. Each
// run fetches FETCHES instructions from a loop of CODE_BYTES with a branch
// every 64 instructions, and in parallel makes DACCESSES data accesses
// (3/4 reads, 1/4 full-word writes) over DATA_WORDS words at 0x10000.
// It checks every instruction word against the memory formula and every
// data read of a known word against its own shadow image, and reports the
// length of each run in cycles. It starts after rst_n has risen and the
// subsystem reports ready. Behavioural: testbench only.
module cache_driver
  import pcache_pkg::*;
#(
  parameter int unsigned RUNS       = 4,
  parameter int unsigned FETCHES    = 1500,
  parameter int unsigned DACCESSES  = 500,
  parameter int unsigned CODE_BYTES = 6144,
  parameter int unsigned DATA_WORDS = 2048
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ready,
  output logic    new_run,
  output ic_in_t  ic_in,
  input  ic_out_t ic_out,
  output dc_in_t  dc_in,
  input  dc_out_t dc_out,
  output int      checks,
  output int      failures,
  output int      run_len [RUNS],
  output logic    done
);

  localparam addr_t DBASE = 32'h0001_0000;

  function automatic data_t init_word(input addr_t a);
    return {a[17:2] ^ 16'h5a3c, ~a[17:2]};
  endfunction

  data_t shadow [DATA_WORDS];
  bit    known  [DATA_WORDS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %m %s at %0t", what, $time);
    end
  endtask

  task automatic fetch(input addr_t a);
    int waits = 0;
    @(negedge clk);
    ic_in.addr = a; ic_in.rd = 1'b1; ic_in.stall = 1'b0;
    #1;
    while (ic_out.stall && waits < 5000) begin
      @(negedge clk);
      #1 waits++;
    end
    check(ic_out.data == init_word(a), "instruction word");
  endtask

  task automatic daccess(input int unsigned w, input bit is_wr, input data_t wd);
    int waits = 0;
    @(negedge clk);
    dc_in.addr = DBASE + addr_t'(w << 2); dc_in.rd = !is_wr; dc_in.wr = is_wr;
    dc_in.data = wd; dc_in.mask = '1;
    #1;
    while (dc_out.stall && waits < 5000) begin
      @(negedge clk);
      #1 waits++;
    end
    if (is_wr) begin
      shadow[w] = wd;
      known[w]  = 1'b1;
    end else if (known[w]) begin
      check(dc_out.data == shadow[w], "data word");
    end
    @(negedge clk);
    dc_in.rd = 1'b0; dc_in.wr = 1'b0;
  endtask

  initial begin
    int t0;
    checks = 0; failures = 0; done = 1'b0; new_run = 1'b0;
    ic_in = '0; dc_in = '0;
    foreach (run_len[r]) run_len[r] = 0;
    for (int i = 0; i < DATA_WORDS; i++) begin
      shadow[i] = init_word(DBASE + addr_t'(i << 2));
      known[i]  = 1'b1;
    end
    // ready is only meaningful once the reset has been applied and released.
    wait (rst_n);
    wait (ready);
    for (int r = 0; r < RUNS; r++) begin
      begin
        // Every run, the first included, starts with a new_run pulse.
        @(negedge clk) new_run = 1'b1;
        @(negedge clk) new_run = 1'b0;
        // Writes of the previous run may have been dropped by the flush.
        for (int i = 0; i < DATA_WORDS; i++) if (shadow[i] != init_word(DBASE + addr_t'(i << 2))) known[i] = 1'b0;
      end
      t0 = int'($time / 10);
      fork
        begin
          addr_t pc;
          pc = '0;
          for (int n = 0; n < FETCHES; n++) begin
            fetch(pc);
            if (n % 64 == 63) pc = (pc + 32'h400) % addr_t'(CODE_BYTES);
            else              pc = (pc + 4) % addr_t'(CODE_BYTES);
          end
          @(negedge clk) ic_in.rd = 1'b0;
        end
        begin
          int unsigned x;
          x = 32'd777;
          for (int n = 0; n < DACCESSES; n++) begin
            x = x * 32'd1103515245 + 32'd12345;
            daccess((x >> 8) % DATA_WORDS, n % 4 == 3, x);
          end
        end
      join
      run_len[r] = int'($time / 10) - t0;
    end
    done = 1'b1;
  end

endmodule
