// mem_arbiter: shares one memory port between the instruction and data caches.
//
// The two caches each issue word transfers to memory with the rd/wr + stall
// handshake. A cache that is granted keeps the port for as long as its
// strobe stays high, which covers a whole line write-back and refill, so
// bursts are never interleaved. When both ask while the port is free, the
// one that was not served last wins (alternating priority). The requester
// that is not granted sees stall=1. This sharing scheme is this design's
// own; the original system only shows a single memory port on the cache.
// Grant is combinational (no added latency); lock state is registered.
// restart_i returns the alternating priority to its reset state, so that a
// new run starts from the same arbiter state as the first one.
// The multiplexed request and response fields are mostly wired straight
// from one input or the other; only the grant logic is stateful.
module mem_arbiter
  import pcache_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     restart_i,  // new run: priority back to its reset state
  input  mem_out_t ic_req_i,   // from the instruction cache
  output mem_in_t  ic_rsp_o,
  input  mem_out_t dc_req_i,   // from the data cache
  output mem_in_t  dc_rsp_o,
  output mem_out_t mem_out,    // to memory
  input  mem_in_t  mem_in
);

  logic ic_req, dc_req;
  logic locked, owner_dc, last_dc;
  logic grant_dc, grant_any;

  always_comb begin
    ic_req = ic_req_i.rd || ic_req_i.wr;
    dc_req = dc_req_i.rd || dc_req_i.wr;
    if (locked)                          grant_dc = owner_dc;
    else if (ic_req && dc_req)           grant_dc = !last_dc;
    else                                 grant_dc = dc_req;
    grant_any = grant_dc ? dc_req : ic_req;

    mem_out        = grant_dc ? dc_req_i : ic_req_i;
    ic_rsp_o.data  = mem_in.data;
    dc_rsp_o.data  = mem_in.data;
    ic_rsp_o.stall = grant_dc  ? 1'b1 : mem_in.stall;
    dc_rsp_o.stall = !grant_dc ? 1'b1 : mem_in.stall;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked   <= 1'b0;
      owner_dc <= 1'b0;
      last_dc  <= 1'b0;
    end else begin
      locked   <= grant_any;
      owner_dc <= grant_dc;
      if (restart_i)      last_dc <= 1'b0;
      else if (grant_any) last_dc <= grant_dc;
    end
  end

endmodule
