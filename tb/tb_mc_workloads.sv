// Workload testbench of mc_pl_top at its default parameters: the published
// case study and the partition-reload example, run through the whole design.
//
// Core 0 (high criticality, 2 MB SPM) runs the stereo-disparity benchmark as
// a periodic task whose per-job input image is moved in by the DMA:
//   - 64x48 images (9.1 KB, rounded up to 9320 bytes), WCET 16.73 ms, released
//     at 59 Hz (16.95 ms), three jobs; then
//   - 128x96 images (22 KB = 22528 bytes), WCET 70.59 ms, released at 14 Hz
//     (71.43 ms), two jobs.
// WCETs and rates are the worst case measured under interference and the
// highest rates reported as sustainable for that setup; they are converted to
// cycles at the 300 MHz clock the design assumes. The disparity result size
// is not given; one byte per pixel (3072 and 12288 bytes) is used.
//
// Cores 1 and 2 (mid criticality, 512 KB SPMs, 256 KB partitions) each run two
// tasks whose image and results fill a whole partition (256 KB each way), with
// a 2.1 ms WCET and a 6.67 ms period (the period is this testbench's choice,
// long enough for two such tasks). This is the reload example of the design: 32 KB per TDMA slot,
// so a load or unload takes k = 8 slots and a full reload 16 slots,
// Delta = 16 * 128.1 us + 42.7 us = 2092.3 us, and a task computing at least
// that long hides the whole reload.
//
// Checks:
//   - every load and unload phase finishes within k * round + slot cycles;
//   - each 256 KB phase uses exactly 8 slots of its core;
//   - on cores 1 and 2, when the next job was already waiting at a
//     computation start, the core is idle at most one slot between the two
//     computations (the reload is hidden);
//   - every disparity job finishes computing before the next release (the
//     rate is sustained) and completes within the single-task Lazy Load
//     response-time bound;
//   - the results, and for the partition-sized tasks the whole 256 KB round
//     trip, read back correctly from DRAM;
//   - no slot is stretched.
module tb_mc_workloads;
  import axi_pkg::*;
  import mc_pkg::*;

  localparam int NC = N_RT_CORES;
  localparam int NT = 8;
  localparam int SLOT = 12810, TR = 3 * SLOT;
  localparam int CHUNK = 32768;
  localparam int PART [NC] = '{SPM_HI_BYTES / 2, SPM_MID_BYTES / 2, SPM_MID_BYTES / 2};
  localparam int COLOR [NC] = '{0, 2, 3};

  // per core, tasks 0 and 1
  localparam int C  [NC][2] = '{'{5019000, 21177000}, '{630000, 630000}, '{630000, 630000}};
  localparam int T  [NC][2] = '{'{5085000, 21429000}, '{2000000, 2000000}, '{2000000, 2000000}};
  localparam int SZ [NC][2] = '{'{9320, 22528}, '{262144, 262144}, '{262144, 262144}};
  localparam int OB [NC][2] = '{'{3072, 12288}, '{262144, 262144}, '{262144, 262144}};
  localparam int JOBS [NC][2] = '{'{3, 2}, '{3, 3}, '{3, 3}};

  logic clk = 0, rst_n = 0;
  req_t  hreq [2];
  resp_t hresp [2];
  req_t  dram_req;
  resp_t dram_resp;
  logic [NT-1:0] release_i [NC];
  logic [31:0] wcet [NC][NT];
  addr_t in_addr [NC][NT], out_addr [NC][NT];
  logic [23:0] in_bytes [NC][NT], out_bytes [NC][NT];
  logic [31:0] l_bound [NC], u_bound [NC];
  logic run_valid [NC], run_part [NC], cpu_done [NC], cpu_busy [NC];
  logic [2:0] run_task [NC];
  logic [5:0] sched_ev [NC];
  logic dma_overrun, dma_xfer_active;
  logic [1:0] dma_slot_owner;

  mc_pl_top dut (
    .clk, .rst_n,
    .hpm0_req(hreq[0]), .hpm0_resp(hresp[0]), .hpm1_req(hreq[1]), .hpm1_resp(hresp[1]),
    .dram_req, .dram_resp,
    .release_i, .wcet_i(wcet), .in_addr_i(in_addr), .in_bytes_i(in_bytes),
    .out_addr_i(out_addr), .out_bytes_i(out_bytes), .l_bound_i(l_bound), .u_bound_i(u_bound),
    .run_valid, .run_task, .run_part, .cpu_done, .cpu_busy,
    .sched_ev, .dma_overrun, .dma_slot_owner, .dma_xfer_active
  );

  axi_mem_model #(.LATENCY(4), .STALL(1'b0)) dram (.clk, .rst_n, .s_req(dram_req), .s_resp(dram_resp));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic check_le(string what, longint got, longint lim);
    checks++;
    if (got > lim) begin
      failures++;
      $display("FAIL %s: %0d above %0d", what, got, lim);
    end
  endtask

  initial begin
    repeat (64_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slots needed for a phase of b bytes, and the TDMA completion bound
  function automatic longint slots_for(longint b);
    return (b + CHUNK - 1) / CHUNK;
  endfunction
  function automatic longint tdma_bound(longint b);
    return slots_for(b) * TR + SLOT;
  endfunction

  // Lazy Load response-time bound of a task that is alone on its core
  function automatic longint rt_single(longint c, longint t, longint L, longint U);
    longint ch = (c > L + U) ? c : L + U;
    longint B = L + U, W = ch, Wn, R = 0;
    forever begin
      Wn = L + B + ((W - L + t - 1) / t) * ch;
      if (Wn == W) break;
      W = Wn;
    end
    for (longint k = 1; k <= (W + t - 1) / t; k++) begin
      longint f = L + B + (k - 1) * ch + ch + U - (k - 1) * t;
      if (f > R) R = f;
    end
    return R;
  endfunction

  // ------------------------------------------------------------ core-side bus
  int hpm_owner = -1;
  data_t rbuf [NC][17];

  function automatic addr_t core_addr(int c, int phys);
    addr_t base = (c == 2) ? 32'hA020_0000 : 32'hA000_0000;
    return base + addr_t'(((phys >> 14) << 16) | (COLOR[c] << 14) | (phys & 32'h3FFF));
  endfunction

  task automatic grab(int c);
    if (c != 0) begin
      while (hpm_owner != -1) @(posedge clk);
      hpm_owner = c;
    end
  endtask

  task automatic drop(int c);
    if (c != 0) hpm_owner = -1;
  endtask

  task automatic bus_rd(int c, int phys, int beats, int idx);
    int p = (c == 0) ? 0 : 1;
    int got = 0;
    grab(c);
    hreq[p].ar.addr <= core_addr(c, phys); hreq[p].ar.len <= len_t'(beats - 1); hreq[p].ar_valid <= 1'b1;
    do @(posedge clk); while (!hresp[p].ar_ready);
    hreq[p].ar_valid <= 1'b0;
    hreq[p].r_ready <= 1'b1;
    while (got < beats) begin
      @(posedge clk);
      if (hresp[p].r_valid) begin
        rbuf[c][idx + got] = hresp[p].r.data;
        got++;
      end
    end
    hreq[p].r_ready <= 1'b0;
    drop(c);
  endtask

  task automatic bus_wr(int c, int phys, int beats);
    int p = (c == 0) ? 0 : 1;
    grab(c);
    hreq[p].aw.addr <= core_addr(c, phys); hreq[p].aw.len <= len_t'(beats - 1); hreq[p].aw_valid <= 1'b1;
    do @(posedge clk); while (!hresp[p].aw_ready);
    hreq[p].aw_valid <= 1'b0;
    for (int b = 0; b < beats; b++) begin
      hreq[p].w.data <= rbuf[c][b]; hreq[p].w.strb <= '1; hreq[p].w.last <= (b == beats - 1);
      hreq[p].w_valid <= 1'b1;
      do @(posedge clk); while (!hresp[p].w_ready);
    end
    hreq[p].w_valid <= 1'b0;
    hreq[p].b_ready <= 1'b1;
    do @(posedge clk); while (!hresp[p].b_valid);
    hreq[p].b_ready <= 1'b0;
    drop(c);
  endtask

  // ------------------------------------------------------------ core models
  int     cyc = 0;
  int     jobno [NC][2];
  longint rel_cyc [NC][2], start_cyc [NC], end_cyc [NC], next_rel [NC][2];
  bit     active [NC][2], waiting [NC][2];
  bit     piped [NC];
  int     n_gap = 0, n_sustain = 0;

  // The core computes for exactly its WCET: reads the first 16 beats and the
  // last beat of its image, writes 16 result beats to the partition start.
  task automatic core_model(int c);
    forever begin
      int t, pbase;
      longint s;
      @(posedge clk);
      if (!run_valid[c]) continue;
      t = int'(run_task[c]);
      pbase = int'(run_part[c]) * PART[c];
      s = cyc;
      // reload hidden: the core waited at most one slot for this computation
      if (piped[c]) begin
        n_gap++;
        check_le($sformatf("core %0d idle gap between computations", c), s - end_cyc[c], SLOT + 32);
      end
      piped[c] = 0;
      for (int u = 0; u < 2; u++) if (waiting[c][u] && u != t) piped[c] = (c != 0);
      start_cyc[c] = s;
      bus_rd(c, pbase, 16, 0);
      bus_rd(c, pbase + SZ[c][t] - 8, 1, 16);
      for (int k = 0; k < 16; k++) rbuf[c][k] = rbuf[c][k] + rbuf[c][16] + data_t'(jobno[c][t]);
      bus_wr(c, pbase, 16);
      while (cyc - s < C[c][t] - 1) @(posedge clk);
      cpu_done[c] <= 1'b1;
      @(posedge clk);
      cpu_done[c] <= 1'b0;
      end_cyc[c] = cyc;
      if (c == 0) begin
        n_sustain++;
        check_le("disparity computation ends before the next release", end_cyc[c], next_rel[c][t]);
      end
    end
  endtask

  // ------------------------------------------------------------ DMA phase monitor
  longint ph_issue [NC];
  longint ph_bytes [NC];
  bit     ph_load [NC];
  int     ph_task [NC], ph_slots [NC];
  int     n_phase = 0, n_full = 0;
  logic   xfer_q = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dma_overrun) begin failures++; $display("FAIL: TDMA slot overrun"); end
    if (dma_xfer_active && !xfer_q) ph_slots[dma_slot_owner]++;
    xfer_q <= dma_xfer_active;
    for (int c = 0; c < NC; c++) begin
      if (dut.cmd_valid[c] && dut.cmd_ready[c]) begin
        ph_issue[c] = cyc;
        ph_bytes[c] = dut.cmd[c].len_bytes;
        ph_load[c]  = (dut.cmd[c].op == DMA_LOAD);
        ph_slots[c] = 0;
        ph_task[c]  = -1;
        for (int t = 0; t < 2; t++) begin
          if (ph_load[c] && in_addr[c][t] == dut.cmd[c].src) ph_task[c] = t;
          if (!ph_load[c] && out_addr[c][t] == dut.cmd[c].dst) ph_task[c] = t;
        end
        if (ph_load[c] && ph_task[c] >= 0) waiting[c][ph_task[c]] = 0;
      end
      if (dut.dma_done[c]) begin
        int t;
        longint r;
        t = ph_task[c];
        n_phase++;
        check_le($sformatf("core %0d %s phase time", c, ph_load[c] ? "load" : "unload"),
                 cyc - ph_issue[c], tdma_bound(ph_bytes[c]));
        check($sformatf("core %0d slots used by one phase", c), ph_slots[c], slots_for(ph_bytes[c]));
        if (ph_bytes[c] == PART[c]) n_full++;
        if (!ph_load[c] && t >= 0) begin
          r = longint'(cyc) - rel_cyc[c][t];
          active[c][t] = 0;
          if (c == 0)
            check_le("disparity response time within the Lazy Load bound", r,
                     rt_single(C[c][t], T[c][t], l_bound[c], u_bound[c]) + 2000);
        end
      end
    end
  end

  task automatic releaser(int c, int t, int first);
    repeat (first) @(posedge clk);
    for (int j = 0; j < JOBS[c][t]; j++) begin
      checks++;
      if (active[c][t]) begin
        failures++;
        $display("FAIL core %0d task %0d: previous job not finished at next release", c, t);
        wait (!active[c][t]);
      end
      jobno[c][t] = j;
      rel_cyc[c][t] = cyc + 1;
      next_rel[c][t] = cyc + 1 + T[c][t];
      active[c][t] = 1;
      waiting[c][t] = 1;
      release_i[c][t] <= 1'b1;
      @(posedge clk);
      release_i[c][t] <= 1'b0;
      repeat (T[c][t] - 1) @(posedge clk);
    end
  endtask

  initial begin
    hreq[0] = '0; hreq[1] = '0;
    for (int c = 0; c < NC; c++) begin
      release_i[c] = '0; cpu_done[c] = 0; piped[c] = 0; ph_slots[c] = 0; ph_task[c] = -1;
      for (int t = 0; t < NT; t++) begin
        wcet[c][t] = 0; in_addr[c][t] = 0; out_addr[c][t] = 0; in_bytes[c][t] = 0; out_bytes[c][t] = 0;
      end
      for (int t = 0; t < 2; t++) begin
        wcet[c][t]      = 32'(C[c][t]);
        in_addr[c][t]   = addr_t'(32'h1000_0000 + 32'h0100_0000 * c + 32'h0040_0000 * t);
        out_addr[c][t]  = addr_t'(32'h2000_0000 + 32'h0100_0000 * c + 32'h0040_0000 * t);
        in_bytes[c][t]  = 24'(SZ[c][t]);
        out_bytes[c][t] = 24'(OB[c][t]);
        active[c][t] = 0; waiting[c][t] = 0; jobno[c][t] = 0; next_rel[c][t] = 0;
      end
      // L and U from the TDMA bound of the largest phase of the core
      l_bound[c] = 32'(tdma_bound((c == 0) ? SZ[0][1] : SZ[c][0]));
      u_bound[c] = 32'(tdma_bound((c == 0) ? OB[0][1] : OB[c][0]));
    end
    $display("reload of a 256 KB partition: %0d slots, Delta = %0d cycles",
             2 * slots_for(PART[1]), 2 * slots_for(PART[1]) * TR + SLOT);
    check("Delta of the reload example in cycles (2092.3 us)", 2 * slots_for(PART[1]) * TR + SLOT, 627690);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    fork
      core_model(0);
      core_model(1);
      core_model(2);
    join_none
    fork
      begin
        releaser(0, 0, 0);
        releaser(0, 1, 0);
      end
      releaser(1, 0, 0);     releaser(1, 1, 0);
      releaser(2, 0, 100);   releaser(2, 1, 100);
    join
    for (int c = 0; c < NC; c++) for (int t = 0; t < 2; t++) wait (!active[c][t]);
    repeat (10) @(posedge clk);

    // results of the last job of every task: 16 computed beats, then the rest
    // of the partition as loaded (sampled, plus the last beat)
    for (int c = 0; c < NC; c++) for (int t = 0; t < 2; t++) begin
      data_t last, img, got;
      for (int k = 0; k < 8; k++) last[8*k +: 8] = dram.rd_byte(longint'(in_addr[c][t]) + SZ[c][t] - 8 + k);
      for (int n = 0; n < 16 + 200; n++) begin
        int b;
        b = (n < 16) ? n : (n == 16 + 199) ? OB[c][t] / 8 - 1 : $urandom_range(16, OB[c][t] / 8 - 1);
        for (int k = 0; k < 8; k++) begin
          img[8*k +: 8] = dram.rd_byte(longint'(in_addr[c][t]) + 8*b + k);
          got[8*k +: 8] = dram.rd_byte(longint'(out_addr[c][t]) + 8*b + k);
        end
        if (n < 16) img = img + last + data_t'(JOBS[c][t] - 1);
        check($sformatf("core %0d task %0d result beat %0d", c, t, b), longint'(got), longint'(img));
      end
    end

    $display("phases %0d (full 256 KB partitions %0d), hidden reloads %0d, disparity jobs %0d",
             n_phase, n_full, n_gap, n_sustain);
    checks++;
    if (n_full < 8 || n_gap < 4 || n_sustain != 5) begin
      failures++;
      $display("FAIL: workload did not run as planned");
    end
    $display("cycles %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
