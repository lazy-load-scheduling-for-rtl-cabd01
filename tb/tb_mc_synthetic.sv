// Synthetic task-set testbench of mc_pl_top at its default parameters.
//
// Follows the synthetic evaluation setup of the design's schedulability study,
// but runs the task sets on the hardware instead of only analysing them. For
// each of the three real-time cores, eight tasks (the default cardinality)
// are generated:
//   - utilisations with UUniFast for a total per-core utilisation U;
//   - periods log-uniform in [10, 100] ms (the r = 2 period range of the
//     study), 3 M to 30 M cycles at the design's assumed 300 MHz;
//   - C_i = U_i * T_i;
//   - load and unload sizes equal, uniform in 32 KB to 160 KB (the sizes the
//     study gives for its 40 to 200 us transfer times);
//   - rate-monotonic priorities, implicit deadlines.
// L and U of a core are the TDMA completion bound (k slots: k * round + slot)
// of its largest phase. A set is kept only if the Lazy Load response-time
// analysis finds every task schedulable, with a margin of 2000 cycles for the
// decision latency of the hardware; otherwise it is redrawn, lowering U after
// repeated misses. U starts at 0.3, a choice of this testbench.
//
// All tasks are released together (the critical instant) and then strictly
// periodically for 32 M cycles. A quarter of the computations end early.
//
// Checks:
//   - every job's response time (release to end of unload) is within its
//     analytical bound and its deadline;
//   - no release finds its previous job unfinished;
//   - the results of the last job of every task, and a sample of its unloaded
//     partition, read back correctly from DRAM;
//   - no slot is stretched and no release is lost.
module tb_mc_synthetic;
  import axi_pkg::*;
  import mc_pkg::*;

  localparam int NC = N_RT_CORES;
  localparam int NT = 8;
  localparam int NU = 8;
  localparam int SLOT = 12810, TR = 3 * SLOT, CHUNK = 32768;
  localparam int PART [NC] = '{SPM_HI_BYTES / 2, SPM_MID_BYTES / 2, SPM_MID_BYTES / 2};
  localparam int COLOR [NC] = '{1, 2, 3};
  localparam longint RUN = 32_000_000;

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

  initial begin
    repeat (48_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ task set
  longint C [NC][NU], T [NC][NU];
  int     SZ [NC][NU];
  longint bound [NC][NU];

  function automatic real urand();
    return real'($urandom) / 4294967296.0;
  endfunction

  function automatic longint tdma_bound(longint b);
    return ((b + CHUNK - 1) / CHUNK) * TR + SLOT;
  endfunction

  // one task set for core c at total utilisation u, rate-monotonic order
  task automatic draw_set(int c, real u);
    real ui [NU];
    real sum, nxt;
    longint tt [NU];
    sum = u;
    for (int i = 0; i < NU - 1; i++) begin
      nxt = sum * $pow(urand(), 1.0 / real'(NU - 1 - i));
      ui[i] = sum - nxt;
      sum = nxt;
    end
    ui[NU - 1] = sum;
    for (int i = 0; i < NU; i++)
      tt[i] = longint'($exp($ln(3.0e6) + urand() * ($ln(3.0e7) - $ln(3.0e6))));
    // rate monotonic: sort periods ascending, utilisations follow their task
    for (int i = 0; i < NU; i++) for (int j = 0; j < NU - 1 - i; j++)
      if (tt[j] > tt[j + 1]) begin
        longint x; real y;
        x = tt[j]; tt[j] = tt[j + 1]; tt[j + 1] = x;
        y = ui[j]; ui[j] = ui[j + 1]; ui[j + 1] = y;
      end
    for (int i = 0; i < NU; i++) begin
      T[c][i] = tt[i];
      C[c][i] = longint'(ui[i] * real'(tt[i]));
      if (C[c][i] < 5000) C[c][i] = 5000;
      SZ[c][i] = 32768 + 8 * $urandom_range(0, 131072 / 8);
    end
  endtask

  function automatic longint ceil_div(longint a, longint b);
    return (a <= 0) ? 0 : (a + b - 1) / b;
  endfunction

  function automatic longint rt_bound(int c, int i);
    longint L = l_bound[c], U = u_bound[c];
    longint ch [NU];
    longint B, W, Wn, R = 0;
    for (int j = 0; j < NU; j++) ch[j] = (C[c][j] > L + U) ? C[c][j] : L + U;
    B = L + U;
    for (int j = i + 1; j < NU; j++) if (ch[j] > B) B = ch[j];
    W = ch[i];
    forever begin
      Wn = L + B;
      for (int j = 0; j <= i; j++) Wn += ceil_div(W - L, T[c][j]) * ch[j];
      if (Wn == W) break;
      W = Wn;
    end
    for (int k = 1; k <= ceil_div(W, T[c][i]); k++) begin
      longint s = L + B + (k - 1) * ch[i], sn, f;
      forever begin
        sn = L + B + (k - 1) * ch[i];
        for (int j = 0; j < i; j++) sn += ceil_div(s - L, T[c][j]) * ch[j];
        if (sn == s) break;
        s = sn;
      end
      f = s + ch[i] + U - (k - 1) * T[c][i];
      if (f > R) R = f;
    end
    return R;
  endfunction

  // ------------------------------------------------------------ core-side bus
  int hpm_owner = -1;
  int n_color = 0, n_hpm1 [NC];
  data_t rbuf [NC][65];

  function automatic addr_t core_addr(int c, int phys);
    addr_t base = (c == 2) ? 32'hA020_0000 : 32'hA000_0000;
    return base + addr_t'(((phys >> 14) << 16) | (COLOR[c] << 14) | (phys & 32'h3FFF));
  endfunction

  task automatic grab(int c);
    int p = (c == 0) ? 0 : 1;
    while (hpm_owner != -1 && p == 1) @(posedge clk);
    if (p == 1) hpm_owner = c;
    if (p == 1) n_hpm1[c]++;
  endtask

  task automatic drop(int c);
    if (c != 0) hpm_owner = -1;
  endtask

  task automatic bus_rd(int c, int phys, int beats, int idx);
    int p = (c == 0) ? 0 : 1;
    int got = 0;
    grab(c);
    n_color++;
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

  task automatic bus_wr(int c, int phys, int beats, int idx);
    int p = (c == 0) ? 0 : 1;
    grab(c);
    n_color++;
    hreq[p].aw.addr <= core_addr(c, phys); hreq[p].aw.len <= len_t'(beats - 1); hreq[p].aw_valid <= 1'b1;
    do @(posedge clk); while (!hresp[p].aw_ready);
    hreq[p].aw_valid <= 1'b0;
    for (int b = 0; b < beats; b++) begin
      hreq[p].w.data <= rbuf[c][idx + b]; hreq[p].w.strb <= '1; hreq[p].w.last <= (b == beats - 1);
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

  task automatic core_model(int c);
    forever begin
      int t, pbase, cyc0, ex;
      @(posedge clk);
      if (!run_valid[c]) continue;
      t = int'(run_task[c]);
      pbase = int'(run_part[c]) * PART[c];
      cyc0 = cyc;
      for (int b = 0; b < 4; b++) bus_rd(c, pbase + 128 * b, 16, 16 * b);
      bus_rd(c, pbase + SZ[c][t] - 8, 1, 64);
      for (int k = 0; k < 31; k++) rbuf[c][k] = rbuf[c][k] + rbuf[c][k + 32] + data_t'(jobno[c][t]);
      rbuf[c][31] = rbuf[c][64] + data_t'(jobno[c][t]);
      bus_wr(c, pbase, 16, 0);
      bus_wr(c, pbase + 128, 16, 16);
      ex = C[c][t];
      if ($urandom % 100 < 25) begin
        ex = $urandom_range(C[c][t] / 4, C[c][t] - 1);
        n_early_run++;
      end
      while (cyc - cyc0 < ex - 1) @(posedge clk);
      cpu_done[c] <= 1'b1;
      @(posedge clk);
      cpu_done[c] <= 1'b0;
    end
  endtask


  // ------------------------------------------------------------ monitors
  int cyc = 0;
  longint rel_cyc [NC][NU];
  bit     active [NC][NU];
  int     unl_task [NC];
  int     n_ev [6];
  int     n_resp = 0, n_early_run = 0;
  int     jobno [NC][NU], njobs [NC][NU];

  // Releases: one process drives every release pulse, so that simultaneous
  // releases of several tasks do not race on the shared vector.
  longint next_rel [NC][NU];
  bit     started = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int c = 0; c < NC; c++) for (int t = 0; t < NU; t++) begin
      if (started && next_rel[c][t] < RUN && cyc >= next_rel[c][t]) begin
        checks++;
        if (active[c][t]) begin
          failures++;
          $display("FAIL core %0d task %0d: previous job not finished at next release", c, t);
        end
        jobno[c][t] = njobs[c][t];
        njobs[c][t]++;
        rel_cyc[c][t] = cyc + 1;
        active[c][t] = 1;
        next_rel[c][t] += T[c][t];
        release_i[c][t] <= 1'b1;
      end else begin
        release_i[c][t] <= 1'b0;
      end
    end
    for (int e = 0; e < 6; e++) for (int c = 0; c < NC; c++) if (sched_ev[c][e]) n_ev[e]++;
    if (dma_overrun) begin failures++; $display("FAIL: TDMA slot overrun"); end
    for (int c = 0; c < NC; c++) begin
      if (dut.cmd_valid[c] && dut.cmd_ready[c] && dut.cmd[c].op == DMA_UNLOAD) begin
        unl_task[c] = -1;
        for (int t = 0; t < NU; t++) if (out_addr[c][t] == dut.cmd[c].dst) unl_task[c] = t;
      end
      if (dut.dma_done[c] && unl_task[c] >= 0) begin
        int t;
        longint r;
        t = unl_task[c];
        r = longint'(cyc) - rel_cyc[c][t];
        unl_task[c] = -1;
        active[c][t] = 0;
        n_resp++;
        checks++;
        if (r > bound[c][t] + 2000) begin
          failures++;
          $display("FAIL core %0d task %0d response %0d above bound %0d", c, t, r, bound[c][t]);
        end
        checks++;
        if (r > T[c][t]) begin
          failures++;
          $display("FAIL core %0d task %0d missed its deadline: %0d > %0d", c, t, r, T[c][t]);
        end
      end
    end
  end

  initial begin
    hreq[0] = '0; hreq[1] = '0;
    for (int c = 0; c < NC; c++) begin
      real u;
      int tries;
      bit ok;
      u = 0.3;
      tries = 0;
      do begin
        longint lb;
        draw_set(c, u);
        lb = 0;
        for (int t = 0; t < NU; t++) if (tdma_bound(SZ[c][t]) > lb) lb = tdma_bound(SZ[c][t]);
        l_bound[c] = 32'(lb);
        u_bound[c] = 32'(lb);
        ok = 1;
        for (int t = 0; t < NU; t++) begin
          bound[c][t] = rt_bound(c, t);
          if (bound[c][t] + 2000 > T[c][t]) ok = 0;
        end
        tries++;
        if (!ok && tries % 20 == 0) u = u * 0.8;
      end while (!ok);
      $display("core %0d: U = %0.3f after %0d draws, L = U = %0d cycles", c, u, tries, l_bound[c]);
      for (int t = 0; t < NU; t++)
        $display("  task %0d: T %0d C %0d size %0d bound %0d", t, T[c][t], C[c][t], SZ[c][t], bound[c][t]);
    end
    for (int c = 0; c < NC; c++) begin
      release_i[c] = '0; cpu_done[c] = 0; unl_task[c] = -1;
      for (int t = 0; t < NU; t++) begin
        wcet[c][t]      = 32'(C[c][t]);
        in_addr[c][t]   = addr_t'(32'h1000_0000 + 32'h0100_0000 * c + 32'h0004_0000 * t);
        out_addr[c][t]  = addr_t'(32'h2000_0000 + 32'h0100_0000 * c + 32'h0004_0000 * t);
        in_bytes[c][t]  = 24'(SZ[c][t]);
        out_bytes[c][t] = 24'(SZ[c][t]);
        active[c][t] = 0; jobno[c][t] = 0; njobs[c][t] = 0;
      end
    end
    for (int e = 0; e < 6; e++) n_ev[e] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    fork
      core_model(0);
      core_model(1);
      core_model(2);
    join_none
    for (int c = 0; c < NC; c++) for (int t = 0; t < NU; t++) next_rel[c][t] = cyc;
    started = 1;
    wait (cyc >= RUN);
    for (int c = 0; c < NC; c++) for (int t = 0; t < NU; t++) wait (!active[c][t]);
    repeat (10) @(posedge clk);

    // results of the last job of every task, and a sample of the unloaded image
    for (int c = 0; c < NC; c++) for (int t = 0; t < NU; t++) begin
      data_t in_b [65];
      for (int b = 0; b < 64; b++)
        for (int k = 0; k < 8; k++) in_b[b][8*k +: 8] = dram.rd_byte(longint'(in_addr[c][t]) + 8*b + k);
      for (int k = 0; k < 8; k++) in_b[64][8*k +: 8] = dram.rd_byte(longint'(in_addr[c][t]) + SZ[c][t] - 8 + k);
      for (int b = 0; b < 32; b++) begin
        data_t exp, got;
        exp = (b < 31) ? in_b[b] + in_b[b + 32] + data_t'(njobs[c][t] - 1) : in_b[64] + data_t'(njobs[c][t] - 1);
        for (int k = 0; k < 8; k++) got[8*k +: 8] = dram.rd_byte(longint'(out_addr[c][t]) + 8*b + k);
        check("result beat in DRAM", longint'(got), longint'(exp));
      end
      for (int n = 0; n < 20; n++) begin
        int b;
        data_t exp, got;
        b = $urandom_range(32, SZ[c][t] / 8 - 1);
        for (int k = 0; k < 8; k++) begin
          exp[8*k +: 8] = dram.rd_byte(longint'(in_addr[c][t]) + 8*b + k);
          got[8*k +: 8] = dram.rd_byte(longint'(out_addr[c][t]) + 8*b + k);
        end
        check("unloaded image beat", longint'(got), longint'(exp));
      end
    end
    check("lost releases", n_ev[5], 0);
    begin
      int total;
      total = 0;
      for (int c = 0; c < NC; c++) for (int t = 0; t < NU; t++) total += njobs[c][t];
      check("jobs completed", n_resp, total);
    end
    $display("jobs %0d; alarm loads %0d, early-completion loads %0d, idle loads %0d, early computations %0d",
             n_resp, n_ev[2], n_ev[3], n_ev[4], n_early_run);
    $display("cycles %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
