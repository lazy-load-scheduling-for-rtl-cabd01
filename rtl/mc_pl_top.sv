// Programmable-logic side of a mixed-criticality MPSoC with private,
// DMA-reloaded scratchpads and Lazy Load scheduling.
//
// Three real-time cores (one high-criticality, two mid-criticality) each own a
// private dual-ported SPM in the PL, so their memory traffic never meets in a
// shared DRAM or in each other's memory. Core side: the high-criticality core
// has the HPM0 port to itself and reaches its 2 MB SPM through an address
// translator; the two mid-criticality cores share HPM1, where an address switch
// sends each 2 MB window through its own translator to a 512 KB SPM. The
// translators remove the cache-colour bits, so colouring the last-level cache
// does not waste SPM space. DMA side: one TDMA DMA engine moves task images
// between DRAM and the SPMs' second ports, giving each core its own time slot,
// and one Lazy Load scheduler per core decides which task to load into which
// SPM half, starts the computations and the unloads.
//
// External ports: the two core-side bus slaves (HPM0, HPM1), the DMA's bus
// master towards DRAM (every DMA address outside the SPMs), and per core the
// scheduler's job releases, task table, analysis bounds and the
// dispatch/completion handshake with the processor. Addresses and sizes are
// those of mc_pkg. The structure follows the reference system; widths, the
// bus subset and the address map are this design's choices.
module mc_pl_top
  import axi_pkg::*;
  import mc_pkg::*;
#(
  parameter int unsigned N_TASKS     = 8,
  parameter int unsigned TW          = 32,
  parameter int unsigned SLOT_CYCLES [N_RT_CORES] = '{default: 12810},
  parameter int unsigned CHUNK_BYTES [N_RT_CORES] = '{default: 32768},
  parameter int unsigned OVH_CYCLES  = 1167,
  localparam int unsigned IW = (N_TASKS > 1) ? $clog2(N_TASKS) : 1
) (
  input  logic  clk,
  input  logic  rst_n,
  // core-side ports (PS masters)
  input  req_t  hpm0_req,          // high-criticality core
  output resp_t hpm0_resp,
  input  req_t  hpm1_req,          // both mid-criticality cores
  output resp_t hpm1_resp,
  // DMA towards DRAM
  output req_t  dram_req,
  input  resp_t dram_resp,
  // per real-time core: 0 = high, 1 = mid 0, 2 = mid 1
  input  logic [N_TASKS-1:0] release_i [N_RT_CORES],
  input  logic [TW-1:0]  wcet_i      [N_RT_CORES][N_TASKS],
  input  addr_t          in_addr_i   [N_RT_CORES][N_TASKS],
  input  logic [23:0]    in_bytes_i  [N_RT_CORES][N_TASKS],
  input  addr_t          out_addr_i  [N_RT_CORES][N_TASKS],
  input  logic [23:0]    out_bytes_i [N_RT_CORES][N_TASKS],
  input  logic [TW-1:0]  l_bound_i   [N_RT_CORES],
  input  logic [TW-1:0]  u_bound_i   [N_RT_CORES],
  output logic           run_valid   [N_RT_CORES],
  output logic [IW-1:0]  run_task    [N_RT_CORES],
  output logic           run_part    [N_RT_CORES],
  input  logic           cpu_done    [N_RT_CORES],
  output logic           cpu_busy    [N_RT_CORES],
  // events
  output logic [5:0]     sched_ev    [N_RT_CORES],  // {overflow, idle_load, early, alarm, unload, load}
  output logic           dma_overrun,
  output logic [1:0]     dma_slot_owner,
  output logic           dma_xfer_active
);

  localparam int unsigned SPM_BYTES [N_RT_CORES] = '{SPM_HI_BYTES, SPM_MID_BYTES, SPM_MID_BYTES};
  localparam addr_t       SPM_BASES [N_RT_CORES] = '{SPM_HI_BASE, SPM_MID0_BASE, SPM_MID1_BASE};

  // ------------------------------------------------------------ core side
  req_t  spm_core_req  [N_RT_CORES];
  resp_t spm_core_resp [N_RT_CORES];
  req_t  hpm1_sw_req   [2];
  resp_t hpm1_sw_resp  [2];

  addr_translator #(.IN_ADDR_W(23), .COLOR_LSB(COLOR_LSB), .COLOR_BITS(COLOR_BITS)) u_xlat_hi (
    .s_req(hpm0_req), .s_resp(hpm0_resp), .m_req(spm_core_req[0]), .m_resp(spm_core_resp[0])
  );

  axi_demux #(
    .N_SLV(2),
    .BASE({HPM1_MID1_BASE, HPM1_MID0_BASE}),
    .MASK({32'hFFE0_0000, 32'hFFE0_0000})
  ) u_hpm1_switch (
    .clk, .rst_n, .s_req(hpm1_req), .s_resp(hpm1_resp), .m_req(hpm1_sw_req), .m_resp(hpm1_sw_resp)
  );

  for (genvar m = 0; m < 2; m++) begin : g_xlat_mid
    addr_translator #(.IN_ADDR_W(21), .COLOR_LSB(COLOR_LSB), .COLOR_BITS(COLOR_BITS)) u_xlat (
      .s_req(hpm1_sw_req[m]), .s_resp(hpm1_sw_resp[m]),
      .m_req(spm_core_req[m+1]), .m_resp(spm_core_resp[m+1])
    );
  end

  // ------------------------------------------------------------ SPMs
  req_t  spm_dma_req  [N_RT_CORES];
  resp_t spm_dma_resp [N_RT_CORES];

  for (genvar c = 0; c < N_RT_CORES; c++) begin : g_spm
    spm #(.BYTES(SPM_BYTES[c])) u_spm (
      .clk, .rst_n,
      .core_req(spm_core_req[c]), .core_resp(spm_core_resp[c]),
      .dma_req(spm_dma_req[c]),   .dma_resp(spm_dma_resp[c])
    );
  end

  // ------------------------------------------------------------ DMA side
  logic     cmd_valid [N_RT_CORES];
  logic     cmd_ready [N_RT_CORES];
  dma_cmd_t cmd       [N_RT_CORES];
  logic     dma_done  [N_RT_CORES];
  req_t     dma_req;
  resp_t    dma_resp;
  req_t     dsw_req   [N_RT_CORES+1];
  resp_t    dsw_resp  [N_RT_CORES+1];

  tdma_dma #(
    .N_CORES(N_RT_CORES), .SLOT_CYCLES(SLOT_CYCLES), .CHUNK_BYTES(CHUNK_BYTES),
    .OVH_CYCLES(OVH_CYCLES)
  ) u_dma (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd, .done(dma_done),
    .m_req(dma_req), .m_resp(dma_resp),
    .slot_owner(dma_slot_owner), .xfer_active(dma_xfer_active), .overrun(dma_overrun)
  );

  axi_demux #(
    .N_SLV(N_RT_CORES + 1),
    .BASE({32'h0, SPM_MID1_BASE, SPM_MID0_BASE, SPM_HI_BASE}),
    .MASK({32'h0, 32'hFFF8_0000, 32'hFFF8_0000, 32'hFFE0_0000})
  ) u_dma_switch (
    .clk, .rst_n, .s_req(dma_req), .s_resp(dma_resp), .m_req(dsw_req), .m_resp(dsw_resp)
  );

  for (genvar c = 0; c < N_RT_CORES; c++) begin : g_dsw
    assign spm_dma_req[c] = dsw_req[c];
    assign dsw_resp[c]    = spm_dma_resp[c];
  end
  assign dram_req                 = dsw_req[N_RT_CORES];
  assign dsw_resp[N_RT_CORES]     = dram_resp;

  // ------------------------------------------------------------ schedulers
  for (genvar c = 0; c < N_RT_CORES; c++) begin : g_sched
    lazy_load_sched #(
      .N_TASKS(N_TASKS), .TW(TW), .SPM_BASE(SPM_BASES[c]), .PART_BYTES(SPM_BYTES[c] / 2)
    ) u_sched (
      .clk, .rst_n,
      .release_i(release_i[c]), .wcet_i(wcet_i[c]),
      .in_addr_i(in_addr_i[c]), .in_bytes_i(in_bytes_i[c]),
      .out_addr_i(out_addr_i[c]), .out_bytes_i(out_bytes_i[c]),
      .l_bound_i(l_bound_i[c]), .u_bound_i(u_bound_i[c]),
      .run_valid(run_valid[c]), .run_task(run_task[c]), .run_part(run_part[c]),
      .cpu_done(cpu_done[c]), .cpu_busy(cpu_busy[c]),
      .dma_cmd_valid(cmd_valid[c]), .dma_cmd_ready(cmd_ready[c]), .dma_cmd(cmd[c]),
      .dma_done(dma_done[c]),
      .ev_load(sched_ev[c][0]), .ev_unload(sched_ev[c][1]), .ev_alarm(sched_ev[c][2]),
      .ev_early(sched_ev[c][3]), .ev_idle_load(sched_ev[c][4]), .ev_overflow(sched_ev[c][5])
    );
  end

endmodule
