// Self-checking testbench of lazy_load_sched.
//
// Surrounds one scheduler with a DMA model (a load takes LOAD_T cycles, an
// unload UNLOAD_T, both a little below the bounds L and U given to the
// scheduler) and a core model (a computation runs for its WCET or, at random,
// less). Part 1 replays the three-task example of the policy: the low task is
// released first on an idle system, then the mid and the high task while the
// low one computes; Lazy Load must run low, high, mid (an eager policy would
// run low, mid, high). Part 2 releases jobs of 4 tasks at random and checks,
// from the testbench's own bookkeeping:
//  - each load picks the highest-priority job waiting for a load;
//  - a load triggered by the alarm starts exactly max(C-L, U) cycles after the
//    computation started when the other half held a finished task, else
//    max(C-L, 0) (never earlier: the decision is lazy);
//  - a computation ending before the alarm starts the load at once;
//  - a loaded task is dispatched as soon as the core is free;
//  - every computed job is unloaded once, from its partition to its result
//    address, and the load goes to the free partition;
//  - on an idle system a released job is loaded at once.
module tb_lazy_load_sched;
  import axi_pkg::*;
  import mc_pkg::*;

  localparam int NT = 4;
  localparam int L = 100, U = 80;
  localparam int LOAD_T = 95, UNLOAD_T = 75;
  localparam addr_t BASE = 32'h8000_0000;
  localparam int PART = 32'h1000;

  logic clk = 0, rst_n = 0;
  logic [NT-1:0] release_i = '0;
  logic [31:0] wcet [NT];
  addr_t in_addr [NT], out_addr [NT];
  logic [23:0] in_bytes [NT], out_bytes [NT];
  logic run_valid, run_part, cpu_done = 0, cpu_busy;
  logic [1:0] run_task;
  logic dma_cmd_valid, dma_cmd_ready, dma_done = 0;
  dma_cmd_t dma_cmd;
  logic ev_load, ev_unload, ev_alarm, ev_early, ev_idle_load, ev_overflow;
  int checks = 0, failures = 0;

  lazy_load_sched #(.N_TASKS(NT), .TW(32), .SPM_BASE(BASE), .PART_BYTES(PART)) dut (
    .clk, .rst_n, .release_i, .wcet_i(wcet), .in_addr_i(in_addr), .in_bytes_i(in_bytes),
    .out_addr_i(out_addr), .out_bytes_i(out_bytes), .l_bound_i(32'(L)), .u_bound_i(32'(U)),
    .run_valid, .run_task, .run_part, .cpu_done, .cpu_busy,
    .dma_cmd_valid, .dma_cmd_ready, .dma_cmd, .dma_done,
    .ev_load, .ev_unload, .ev_alarm, .ev_early, .ev_idle_load, .ev_overflow
  );

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at cycle %0d", what, got, exp, cyc);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ models
  typedef enum {EMPTY, LOADING, READY, RUNNING, DONE, UNLOADING} ps_e;

  int cyc = 0;
  bit dma_busy = 0;
  int dma_left = 0;
  int dma_part = 0;
  bit cpu_run = 0;
  int cpu_left = 0;
  int shorten = 0;             // percent chance of an early finish

  assign dma_cmd_ready = !dma_busy;

  // testbench bookkeeping, from the events seen on the interfaces
  bit   pend [NT];             // released, load not yet started
  ps_e  pst [2];
  int   ptask [2];
  int   disp_cyc = -1, disp_delay = 0;
  bit   disp_watch = 0;        // next load may be alarm-driven
  bit   early_seen = 0;
  bit   early_ok = 0;            // a load could start right at the early end
  int   early_cyc = 0;
  int   ready_cyc = -1;
  int   free_cyc = -1;
  int   order [$];
  int   n_alarm_exact = 0, n_early = 0, n_idle = 0, n_unload = 0, n_load = 0;

  function automatic int hp_pending();
    for (int i = 0; i < NT; i++) if (pend[i]) return i;
    return -1;
  endfunction

  function automatic bit task_active(int i);
    if (pend[i]) return 1;
    for (int p = 0; p < 2; p++) if (pst[p] != EMPTY && ptask[p] == i) return 1;
    return 0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // ---- events seen at this edge
    if (dma_done) begin
      if (pst[dma_part] == LOADING) begin
        pst[dma_part] = READY;
        ready_cyc = cyc;
      end else if (pst[dma_part] == UNLOADING) begin
        pst[dma_part] = EMPTY;
      end
    end
    if (cpu_done) begin
      for (int p = 0; p < 2; p++) if (pst[p] == RUNNING) pst[p] = DONE;
      free_cyc = cyc;
      if (disp_watch && cyc - disp_cyc < disp_delay) begin
        early_seen = 1;
        early_cyc  = cyc;
        early_ok   = (hp_pending() >= 0) && !dma_busy && (pst[0] == EMPTY || pst[1] == EMPTY);
      end
      disp_watch = 0;
    end
    if (run_valid) begin
      order.push_back(int'(run_task));
      check("dispatched partition was ready", pst[run_part] == READY, 1);
      check("dispatched task is the loaded one", int'(run_task), ptask[run_part]);
      check("dispatch as soon as loaded and the core free", cyc - ((ready_cyc > free_cyc) ? ready_cyc : free_cyc) <= 2, 1);
      pst[run_part] = RUNNING;
      begin
        int c_l;
        c_l = (int'(wcet[run_task]) > L) ? int'(wcet[run_task]) - L : 0;
        disp_delay = (pst[!run_part] != EMPTY) ? ((c_l > U) ? c_l : U) : c_l;
      end
      disp_cyc   = cyc;
      disp_watch = 1;
      early_seen = 0;
      cpu_run  <= 1'b1;
      cpu_left = (($urandom % 100) < shorten) ? $urandom_range(1, int'(wcet[run_task])) : int'(wcet[run_task]);
    end
    if (dma_cmd_valid && dma_cmd_ready) begin
      int p;
      if (dma_cmd.op == DMA_LOAD) begin
        int t;
        t = -1;
        n_load++;
        for (int i = 0; i < NT; i++) if (in_addr[i] == dma_cmd.src) t = i;
        p = (dma_cmd.dst == BASE + PART) ? 1 : 0;
        check("load picks highest-priority pending", t, hp_pending());
        check("load destination is a partition base", dma_cmd.dst == BASE || dma_cmd.dst == BASE + PART, 1);
        check("load goes to a free partition", pst[p] == EMPTY, 1);
        if (t >= 0) begin
          check("load length", dma_cmd.len_bytes, in_bytes[t]);
          pend[t] = 0;
        end
        pst[p] = LOADING; ptask[p] = t;
        dma_left = LOAD_T;
        if (early_seen) begin
          if (early_ok) begin
            check("early completion starts the load at once", (cyc - early_cyc) <= 1, 1);
            n_early++;
          end
          early_seen = 0;
        end else if (disp_watch) begin
          checks++;
          if (cyc - disp_cyc < disp_delay) begin
            failures++;
            $display("FAIL load %0d cycles after dispatch, before t_load (%0d)", cyc - disp_cyc, disp_delay);
          end
          if (cyc - disp_cyc == disp_delay) n_alarm_exact++;
          else $display("load at %0d after dispatch, t_load %0d", cyc - disp_cyc, disp_delay);
          disp_watch = 0;
        end else if (pst[!p] inside {EMPTY, DONE, UNLOADING}) begin
          n_idle++;
        end
      end else begin
        p = (dma_cmd.src == BASE + PART) ? 1 : 0;
        n_unload++;
        check("unload source is a computed partition", pst[p] == DONE, 1);
        check("unload destination", dma_cmd.dst, out_addr[ptask[p]]);
        check("unload length", dma_cmd.len_bytes, out_bytes[ptask[p]]);
        pst[p] = UNLOADING;
        dma_left = UNLOAD_T;
      end
      dma_part = p;
      dma_busy <= 1'b1;
    end
    for (int i = 0; i < NT; i++) if (release_i[i]) pend[i] = 1;

    // ---- models advance
    dma_done <= 1'b0;
    if (dma_busy) begin
      dma_left--;
      if (dma_left == 0) begin
        dma_busy <= 1'b0;
        dma_done <= 1'b1;
      end
    end
    cpu_done <= 1'b0;
    if (cpu_run) begin
      cpu_left--;
      if (cpu_left == 0) begin
        cpu_run  <= 1'b0;
        cpu_done <= 1'b1;
      end
    end
  end

  task automatic rel(int i);
    release_i[i] <= 1'b1;
    @(posedge clk);
    release_i[i] <= 1'b0;
  endtask

  initial begin
    for (int i = 0; i < NT; i++) begin
      wcet[i]      = 32'(400 + 150 * i);
      in_addr[i]   = addr_t'(32'h0010_0000 * (i + 1));
      out_addr[i]  = addr_t'(32'h0010_0000 * (i + 1) + 32'h8000);
      in_bytes[i]  = 24'(256 * (i + 1));
      out_bytes[i] = 24'(64 * (i + 1));
      pend[i] = 0;
    end
    pst = '{EMPTY, EMPTY}; ptask = '{-1, -1};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // ---- part 1: the example schedule (tasks 0 high, 1 mid, 2 low)
    rel(2);                        // t0: low on an idle system
    repeat (30) @(posedge clk);
    rel(1);                        // t1: mid
    repeat (300) @(posedge clk);
    rel(0);                        // t3: high, before the low task's t_load
    repeat (3000) @(posedge clk);
    check("example: jobs run", order.size(), 3);
    if (order.size() == 3) begin
      check("example: first the low task", order[0], 2);
      check("example: then the high task", order[1], 0);
      check("example: mid task last", order[2], 1);
    end

    // ---- part 2: random sporadic releases, some computations end early
    shorten = 30;
    for (int n = 0; n < 1500; n++) begin
      logic [NT-1:0] r;
      r = '0;
      for (int i = 0; i < NT; i++) if (!task_active(i) && ($urandom % 3 == 0)) r[i] = 1'b1;
      release_i <= r;
      @(posedge clk);
      release_i <= '0;
      repeat ($urandom_range(0, 150)) @(posedge clk);
    end
    repeat (5000) @(posedge clk);
    check("all jobs drained", (pend[0] | pend[1] | pend[2] | pend[3] | (pst[0] != EMPTY) | (pst[1] != EMPTY)), 0);
    checks++;
    if (n_alarm_exact == 0 || n_early == 0 || n_idle == 0 || n_unload == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened: alarm %0d early %0d idle %0d unload %0d",
               n_alarm_exact, n_early, n_idle, n_unload);
    end
    $display("loads %0d, alarm-timed %0d, early %0d, idle %0d, unloads %0d",
             n_load, n_alarm_exact, n_early, n_idle, n_unload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
