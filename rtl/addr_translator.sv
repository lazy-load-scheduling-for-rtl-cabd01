// Colour-bit dropping address translator between a core-side bus and its SPM.
//
// Page colouring partitions the shared last-level cache by giving each core only
// the pages whose colour bits (bits 14 and 15 here) hold its colour. Seen through
// the cache, a core's scratchpad would then be only one quarter usable. This
// block lets the core address a coloured window IN_ADDR_W bits wide (8 MB for
// the 2 MB SPM) and removes the COLOR_BITS colour bits from the offset, so the
// SPM receives a dense OUT_ADDR_W-bit address:
//
//   out = { in[IN_ADDR_W-1 : COLOR_LSB+COLOR_BITS], in[COLOR_LSB-1 : 0] }
//
// Example from the reference setup: offset 0x023456 becomes 0x0B456.
//
// Only the AW and AR addresses are rewritten; every other channel passes through
// unchanged, so bursts keep their full bandwidth and the block adds no latency
// (purely combinational). AXI bursts never cross a 4 KB page, so a burst never
// spans two colours and translating the start address is enough; an assertion
// checks this. Which colour a core owns is not checked: the colour bits are
// simply discarded, as in the reference design. Address bits above the window
// are cleared (the interconnect in front has already decoded them).
module addr_translator
  import axi_pkg::*;
#(
  parameter int unsigned IN_ADDR_W  = 23,
  parameter int unsigned COLOR_LSB  = 14,
  parameter int unsigned COLOR_BITS = 2
) (
  input  req_t  s_req,   // from the interconnect (core side)
  output resp_t s_resp,
  output req_t  m_req,   // to the SPM controller
  input  resp_t m_resp
);

  localparam int unsigned OUT_ADDR_W = IN_ADDR_W - COLOR_BITS;

  function automatic addr_t drop_color(addr_t a);
    logic [IN_ADDR_W-1:0]  off;
    logic [OUT_ADDR_W-1:0] o;
    off = a[IN_ADDR_W-1:0];
    o   = {off[IN_ADDR_W-1:COLOR_LSB+COLOR_BITS], off[COLOR_LSB-1:0]};
    return addr_t'(o);
  endfunction

  always_comb begin
    m_req         = s_req;
    m_req.aw.addr = drop_color(s_req.aw.addr);
    m_req.ar.addr = drop_color(s_req.ar.addr);
    s_resp        = m_resp;
  end

  // A burst must stay inside one 4 KB page (AXI rule), hence inside one colour.
  always_comb begin
    if (s_req.aw_valid)
      assert ({1'b0, s_req.aw.addr[11:0]} + ({5'b0, s_req.aw.len} << $clog2(BEAT_BYTES)) < 13'h1000)
        else $error("write burst crosses a 4 KB page");
    if (s_req.ar_valid)
      assert ({1'b0, s_req.ar.addr[11:0]} + ({5'b0, s_req.ar.len} << $clog2(BEAT_BYTES)) < 13'h1000)
        else $error("read burst crosses a 4 KB page");
  end

endmodule
