// dcache_tb: self-checking testbench for the data cache.
//
// Runs three checked instances side by side (see dcache_check): the
// default write-back/write-allocate cache and the two write-through
// variants. Each has its own memory, reference model and shadow image.
// Ends when all three are done, or when the watchdog expires.
`timescale 1ns/1ps
module dcache_tb;
  import pcache_pkg::*;

  int   checks [3], failures [3];
  logic done [3];

  dcache_check #(.WRITE(WP_WB_WA))  u_wb    (.checks(checks[0]), .failures(failures[0]), .done(done[0]));
  dcache_check #(.WRITE(WP_WT_WA))  u_wt    (.checks(checks[1]), .failures(failures[1]), .done(done[1]));
  dcache_check #(.WRITE(WP_WT_NWA)) u_wtnwa (.checks(checks[2]), .failures(failures[2]), .done(done[2]));

  initial begin
    #10;
    wait (done[0] && done[1] && done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2]);
    $finish;
  end

  initial begin
    #5ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end

endmodule
