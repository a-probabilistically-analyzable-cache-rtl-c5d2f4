// mem_model: behavioural main memory for the cache testbenches.
//
// Word-wide memory with the rd/wr + stall handshake of the cache memory
// port. A request is held stalled for LATENCY cycles and completes in the
// next cycle (stall low, read data valid, write taken at the clock edge), so
// each word transfer takes LATENCY+1 cycles. Contents start as
// init_word(address), a fixed formula testbenches can recompute. Counts the
// completed reads and writes. Behavioural model: not for synthesis.
module mem_model
  import pcache_pkg::*;
#(
  parameter int unsigned LATENCY = 2,
  parameter int unsigned AW      = 16   // word address bits kept (64K words)
) (
  input  logic     clk,
  input  mem_out_t req_i,
  output mem_in_t  rsp_o,
  output int       reads_o,
  output int       writes_o
);

  function automatic data_t init_word(input addr_t a);
    return {a[17:2] ^ 16'h5a3c, ~a[17:2]};
  endfunction

  data_t mem [1 << AW];
  int    cnt;

  initial begin
    for (int i = 0; i < (1 << AW); i++) mem[i] = init_word(addr_t'(i << 2));
    cnt = 0;
    reads_o = 0;
    writes_o = 0;
  end

  logic req;
  always_comb begin
    req         = req_i.rd || req_i.wr;
    rsp_o.stall = req && (cnt != int'(LATENCY));
    rsp_o.data  = mem[req_i.addr[AW+1:2]];
  end

  always @(posedge clk) begin
    if (req && cnt == int'(LATENCY)) begin
      cnt <= 0;
      if (req_i.wr) begin
        for (int b = 0; b < MASK_W; b++)
          if (req_i.mask[b]) mem[req_i.addr[AW+1:2]][8*b +: 8] <= req_i.data[8*b +: 8];
        writes_o <= writes_o + 1;
      end else begin
        reads_o <= reads_o + 1;
      end
    end else if (req) begin
      cnt <= cnt + 1;
    end else begin
      cnt <= 0;
    end
  end

endmodule
