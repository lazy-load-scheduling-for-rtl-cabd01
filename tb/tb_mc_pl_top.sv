// End-to-end testbench of mc_pl_top at its default parameters.
//
// Three core models (high: HPM0; mid 0 and mid 1: sharing HPM1) and a DRAM
// model surround the design. Each core owns three periodic tasks whose images
// sit in DRAM (sizes 2 KB to 40 KB, the 40 KB one needing two DMA slots).
// Jobs are released with jitter; the design loads each image into an SPM half
// over TDMA, the core model is dispatched and computes from its SPM through
// the colour-dropping translator (reading the first 64 beats and the last beat
// of the image, writing 32 result beats), and the design unloads the results
// to DRAM. Some computations end before their WCET.
//
// Checks: results in DRAM equal the function of the DRAM image for the last
// job of every task (so every load, translation and unload moved the right
// bytes); every job finishes within its period; every response time is within
// the Lazy Load response-time bound computed here from the task set (with a
// small allowance for the clock cycles the decisions take); no TDMA slot is
// stretched and no release is lost. It also counts, and requires at least
// once: an alarm-timed lazy load, a load after an early completion, a load on
// an idle core, a load choosing among several waiting jobs, an unload, a phase
// split over two slots, coloured core accesses, both mid cores sharing HPM1,
// and data moving in every core's TDMA slot.
module tb_mc_pl_top;
  import axi_pkg::*;
  import mc_pkg::*;

  localparam int NC = N_RT_CORES;
  localparam int NT = 8;          // default task table size of the design
  localparam int NU = 3;          // tasks used per core
  localparam int SLOT = 12810, TR = 3 * SLOT;
  localparam int PART [NC] = '{SPM_HI_BYTES / 2, SPM_MID_BYTES / 2, SPM_MID_BYTES / 2};
  localparam int COLOR [NC] = '{3, 1, 2};
  localparam int JOBS = 3;        // jobs per task

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
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ task set
  int C [NC][NU], T [NC][NU], SZ [NC][NU];
  initial begin
    C  = '{'{150000, 180000, 220000}, '{110000, 130000, 160000}, '{110000, 130000, 160000}};
    T  = '{'{1000000, 1300000, 1600000}, '{900000, 1100000, 1400000}, '{900000, 1100000, 1400000}};
    // image sizes: 9.1 KB and 22 KB are the two image resolutions of the case study
    SZ = '{'{2048, 4096, 40960}, '{2048, 8192, 16384}, '{4096, 9320, 22528}};
  end

  // ------------------------------------------------------------ response-time bound
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
  int jobno [NC][NU];
  int n_early_run = 0;

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
  bit     waiting [NC][NU];
  int     unl_task [NC];
  int     n_ev [6];
  int     n_split = 0, n_prio = 0, n_slot [NC], n_resp = 0;
  logic   xfer_q = 0;
  longint worst_slack = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int e = 0; e < 6; e++) for (int c = 0; c < NC; c++) if (sched_ev[c][e]) n_ev[e]++;
    if (dma_overrun) begin failures++; $display("FAIL: TDMA slot overrun"); end
    if (dma_xfer_active && !xfer_q) n_slot[dma_slot_owner]++;
    xfer_q <= dma_xfer_active;
    for (int c = 0; c < NC; c++) begin
      // DMA phases of this core (internal command port of the engine)
      if (dut.cmd_valid[c] && dut.cmd_ready[c]) begin
        if (dut.cmd[c].op == DMA_LOAD) begin
          int nw;
          nw = 0;
          for (int t = 0; t < NU; t++) if (waiting[c][t]) nw++;
          if (nw > 1) n_prio++;
          for (int t = 0; t < NU; t++) if (in_addr[c][t] == dut.cmd[c].src) waiting[c][t] = 0;
          if (dut.cmd[c].len_bytes > 24'd32768) n_split++;
        end else begin
          unl_task[c] = -1;
          for (int t = 0; t < NU; t++) if (out_addr[c][t] == dut.cmd[c].dst) unl_task[c] = t;
        end
      end
      if (dut.dma_done[c] && unl_task[c] >= 0) begin
        int t;
        longint r, bnd;
        t = unl_task[c];
        r = longint'(cyc) - rel_cyc[c][t];
        bnd = rt_bound(c, t) + 2000;
        unl_task[c] = -1;
        active[c][t] = 0;
        n_resp++;
        checks++;
        if (r > bnd) begin
          failures++;
          $display("FAIL core %0d task %0d response %0d above bound %0d", c, t, r, bnd);
        end
        checks++;
        if (r > T[c][t]) begin
          failures++;
          $display("FAIL core %0d task %0d missed its deadline: %0d > %0d", c, t, r, T[c][t]);
        end
        if (bnd - r > worst_slack) worst_slack = bnd - r;
      end
    end
  end

  task automatic releaser(int c, int t, int first);
    repeat (first) @(posedge clk);
    for (int j = 0; j < JOBS; j++) begin
      checks++;
      if (active[c][t]) begin
        failures++;
        $display("FAIL core %0d task %0d: previous job not finished at next release", c, t);
        wait (!active[c][t]);
      end
      jobno[c][t] = j;
      rel_cyc[c][t] = cyc + 1;
      active[c][t] = 1;
      waiting[c][t] = 1;
      release_i[c][t] <= 1'b1;
      @(posedge clk);
      release_i[c][t] <= 1'b0;
      repeat (T[c][t] + $urandom_range(0, T[c][t] / 4)) @(posedge clk);
    end
  endtask

  initial begin
    hreq[0] = '0; hreq[1] = '0;
    for (int c = 0; c < NC; c++) begin
      release_i[c] = '0; cpu_done[c] = 0; unl_task[c] = -1; n_hpm1[c] = 0; n_slot[c] = 0;
      for (int t = 0; t < NT; t++) begin
        wcet[c][t] = 0; in_addr[c][t] = 0; out_addr[c][t] = 0; in_bytes[c][t] = 0; out_bytes[c][t] = 0;
      end
      for (int t = 0; t < NU; t++) begin
        wcet[c][t]      = 32'(C[c][t]);
        in_addr[c][t]   = addr_t'(32'h1000_0000 + 32'h0100_0000 * c + 32'h0010_0000 * t);
        out_addr[c][t]  = addr_t'(32'h2000_0000 + 32'h0100_0000 * c + 32'h0010_0000 * t);
        in_bytes[c][t]  = 24'(SZ[c][t]);
        out_bytes[c][t] = 24'd256;
        active[c][t] = 0; waiting[c][t] = 0; jobno[c][t] = 0;
      end
      // L: longest load, k slots of the largest image: k * round + slot (TDMA bound)
      l_bound[c] = 32'(((c == 0) ? 2 : 1) * TR + SLOT);
      u_bound[c] = 32'(TR + SLOT);
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
    // low-priority job first, the others shortly after, then periodic with jitter
    fork
      releaser(0, 2, 0);     releaser(0, 1, 20000); releaser(0, 0, 60000);
      releaser(1, 2, 0);     releaser(1, 1, 5000);  releaser(1, 0, 90000);
      releaser(2, 1, 0);     releaser(2, 2, 100);   releaser(2, 0, 300000);
    join
    // let the last jobs drain
    for (int c = 0; c < NC; c++) for (int t = 0; t < NU; t++) wait (!active[c][t]);
    repeat (10) @(posedge clk);

    // results of the last job of every task, read from DRAM
    for (int c = 0; c < NC; c++) for (int t = 0; t < NU; t++) begin
      data_t in_b [65];
      for (int b = 0; b < 64; b++)
        for (int k = 0; k < 8; k++) in_b[b][8*k +: 8] = dram.rd_byte(longint'(in_addr[c][t]) + 8*b + k);
      for (int k = 0; k < 8; k++) in_b[64][8*k +: 8] = dram.rd_byte(longint'(in_addr[c][t]) + SZ[c][t] - 8 + k);
      for (int b = 0; b < 32; b++) begin
        data_t exp, got;
        exp = (b < 31) ? in_b[b] + in_b[b + 32] + data_t'(JOBS - 1) : in_b[64] + data_t'(JOBS - 1);
        for (int k = 0; k < 8; k++) got[8*k +: 8] = dram.rd_byte(longint'(out_addr[c][t]) + 8*b + k);
        check("result beat in DRAM", longint'(got), longint'(exp));
      end
    end

    // every mechanism must have happened
    begin
      string names [10] = '{"lazy alarm load", "early-completion load", "idle load", "unload",
                            "priority choice", "split phase", "coloured access", "HPM1 mid0",
                            "HPM1 mid1", "all TDMA slots used"};
      int cnt [10];
      cnt = '{n_ev[2], n_ev[3], n_ev[4], n_ev[1], n_prio, n_split, n_color, n_hpm1[1], n_hpm1[2],
              (n_slot[0] > 0 && n_slot[1] > 0 && n_slot[2] > 0) ? n_slot[0] + n_slot[1] + n_slot[2] : 0};
      for (int m = 0; m < 10; m++) begin
        $display("%-22s %0d", names[m], cnt[m]);
        checks++;
        if (cnt[m] == 0) begin failures++; $display("FAIL: %s never happened", names[m]); end
      end
    end
    check("lost releases", n_ev[5], 0);
    check("jobs completed", n_resp, NC * NU * JOBS);
    $display("cycles %0d, early computations %0d", cyc, n_early_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
