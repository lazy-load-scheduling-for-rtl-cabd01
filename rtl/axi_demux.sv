// Address-decoding 1-to-N bus switch (the interconnect role of the SmartConnect
// blocks in the reference design).
//
// Routes one master to N_SLV slaves by address: slave k is chosen when
// (addr & MASK[k]) == BASE[k]; the lowest such k wins and an address that
// matches none goes to the last slave, which thus acts as the default route.
// The reference design uses one switch to share the HPM1 port between the two
// mid-criticality cores' SPM windows, and one to let the single DMA engine
// reach the three SPMs and DRAM. The inside is this design's own, simplest
// choice: one write and one read transaction in flight, each tracked
// separately. A write is steered by its AW address; W beats are only accepted
// after AW (which AXI permits), and the route is released with the B beat. A
// read is steered by its AR address and released with the last R beat.
// No latency is added: all paths are combinational, so the payload fields of
// every output (addresses, data, strobes, responses) are the input's own bits;
// only the valid/ready handshakes are steered.
module axi_demux
  import axi_pkg::*;
#(
  parameter int unsigned N_SLV = 2,
  parameter logic [N_SLV-1:0][ADDR_W-1:0] BASE = '0,   // BASE[k]: slave k
  parameter logic [N_SLV-1:0][ADDR_W-1:0] MASK = '0,
  localparam int unsigned SW = (N_SLV > 1) ? $clog2(N_SLV) : 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  req_t  s_req,
  output resp_t s_resp,
  output req_t  m_req  [N_SLV],
  input  resp_t m_resp [N_SLV]
);

  function automatic logic [SW-1:0] decode(addr_t a);
    logic [SW-1:0] sel;
    sel = SW'(N_SLV - 1);
    for (int k = N_SLV - 1; k >= 0; k--)
      if ((a & MASK[k]) == BASE[k]) sel = SW'(k);
    return sel;
  endfunction

  logic          wr_busy_q, rd_busy_q;
  logic [SW-1:0] wr_sel_q, rd_sel_q;
  logic [SW-1:0] aw_dec, ar_dec;

  assign aw_dec = decode(s_req.aw.addr);
  assign ar_dec = decode(s_req.ar.addr);

  always_comb begin
    s_resp = '0;
    for (int k = 0; k < N_SLV; k++) begin
      m_req[k]          = s_req;
      m_req[k].aw_valid = 1'b0;
      m_req[k].w_valid  = 1'b0;
      m_req[k].b_ready  = 1'b0;
      m_req[k].ar_valid = 1'b0;
      m_req[k].r_ready  = 1'b0;
    end
    // write path
    if (!wr_busy_q) begin
      m_req[aw_dec].aw_valid = s_req.aw_valid;
      s_resp.aw_ready        = m_resp[aw_dec].aw_ready;
    end else begin
      m_req[wr_sel_q].w_valid = s_req.w_valid;
      m_req[wr_sel_q].b_ready = s_req.b_ready;
      s_resp.w_ready          = m_resp[wr_sel_q].w_ready;
      s_resp.b_valid          = m_resp[wr_sel_q].b_valid;
      s_resp.b_resp           = m_resp[wr_sel_q].b_resp;
    end
    // read path
    if (!rd_busy_q) begin
      m_req[ar_dec].ar_valid = s_req.ar_valid;
      s_resp.ar_ready        = m_resp[ar_dec].ar_ready;
    end else begin
      m_req[rd_sel_q].r_ready = s_req.r_ready;
      s_resp.r_valid          = m_resp[rd_sel_q].r_valid;
      s_resp.r                = m_resp[rd_sel_q].r;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_busy_q <= 1'b0;
      rd_busy_q <= 1'b0;
      wr_sel_q  <= '0;
      rd_sel_q  <= '0;
    end else begin
      if (!wr_busy_q && s_req.aw_valid && s_resp.aw_ready) begin
        wr_busy_q <= 1'b1;
        wr_sel_q  <= aw_dec;
      end else if (wr_busy_q && s_resp.b_valid && s_req.b_ready) begin
        wr_busy_q <= 1'b0;
      end
      if (!rd_busy_q && s_req.ar_valid && s_resp.ar_ready) begin
        rd_busy_q <= 1'b1;
        rd_sel_q  <= ar_dec;
      end else if (rd_busy_q && s_resp.r_valid && s_req.r_ready && s_resp.r.last) begin
        rd_busy_q <= 1'b0;
      end
    end
  end

endmodule
