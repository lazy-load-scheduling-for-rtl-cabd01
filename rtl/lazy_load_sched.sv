// Lazy Load CPU-DMA co-scheduler for three-phase tasks on one real-time core.
//
// Every task runs as load (DMA copies code and input data from DRAM into the
// SPM), compute (the core runs from the SPM) and unload (DMA copies results
// back). The SPM of the core is split into two partitions so that the DMA can
// reload one while the core computes from the other. Tasks have fixed,
// unique priorities (index 0 highest) and are scheduled non-preemptively.
//
// The Lazy Load rule: the choice of which task to load next is made as late
// as possible, L cycles before the worst-case end of the running computation,
// so that a high-priority job released in the meantime is not blocked behind a
// lower-priority one already loaded. Concretely, when a computation starts at
// time s the alarm timer is set to
//     t_load = max(s + C_run - L, s + U)   if the other partition still holds a
//                                          finished task that must be unloaded,
//     t_load = max(s + C_run - L, s)       otherwise.
// When the alarm expires the highest-priority task of the load queue is loaded
// into the free partition. If the computation finishes before t_load the alarm
// is disarmed and the load is started at once. The unload of a finished task
// is started when the next computation starts, or as soon as the DMA is free;
// a pending load goes first when both wait. With the core idle and nothing
// loaded or loading, a released task is loaded immediately.
//
// Queues: the load queue is a bitmask of released jobs (capacity: every task);
// the ready and unload queues hold at most one task each and are represented by
// the partition states READY and DONE. Each partition moves through
// EMPTY -> LOADING -> READY -> RUNNING -> DONE -> UNLOADING -> EMPTY.
//
// Interfaces: `release_i` pulses release jobs; the task table (WCET in cycles,
// DRAM image and result addresses and sizes) and the analysis bounds L and U
// are static inputs. Towards the core, `run_valid` pulses when a computation is
// dispatched and the core reports its end with a `cpu_done` pulse. Towards the
// DMA, one dma_cmd_t is issued at a time and `dma_done` reports its end. All
// decisions take effect one clock after the event that causes them.
//
// The reference implements this policy in RTOS software with a hardware timer;
// here it is a hardware state machine. Timer units (clock cycles), the load
// versus unload tie-break and the priority encoding are this design's choices.
module lazy_load_sched
  import axi_pkg::*;
  import mc_pkg::*;
#(
  parameter int unsigned N_TASKS    = 8,
  parameter int unsigned TW         = 32,             // timer width in cycles
  parameter addr_t       SPM_BASE   = 32'h8000_0000,  // SPM as seen by the DMA
  parameter int unsigned PART_BYTES = 1024 * 1024,    // half the SPM
  localparam int unsigned IW = (N_TASKS > 1) ? $clog2(N_TASKS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // job releases and task table
  input  logic [N_TASKS-1:0] release_i,
  input  logic [TW-1:0]  wcet_i     [N_TASKS],   // C_i
  input  addr_t          in_addr_i  [N_TASKS],   // DRAM image loaded into the SPM
  input  logic [23:0]    in_bytes_i [N_TASKS],
  input  addr_t          out_addr_i [N_TASKS],   // DRAM destination of the results
  input  logic [23:0]    out_bytes_i[N_TASKS],   // results: first bytes of the partition
  input  logic [TW-1:0]  l_bound_i,              // L: longest load time
  input  logic [TW-1:0]  u_bound_i,              // U: longest unload time
  // core
  output logic           run_valid,              // pulse: start computation
  output logic [IW-1:0]  run_task,
  output logic           run_part,               // SPM partition of the task
  input  logic           cpu_done,               // pulse: computation finished
  output logic           cpu_busy,
  // DMA
  output logic           dma_cmd_valid,
  input  logic           dma_cmd_ready,
  output dma_cmd_t       dma_cmd,
  input  logic           dma_done,
  // events, one-cycle pulses
  output logic           ev_load,                // a load phase was started
  output logic           ev_unload,              // an unload phase was started
  output logic           ev_alarm,               // alarm expired while computing
  output logic           ev_early,               // computation ended before t_load
  output logic           ev_idle_load,           // load started with the core idle
  output logic           ev_overflow             // release of a job already queued
);

  typedef enum logic [2:0] {P_EMPTY, P_LOADING, P_READY, P_RUNNING, P_DONE, P_UNLOADING} pstate_e;

  pstate_e            pst_q  [2];
  logic [IW-1:0]      ptask_q[2];
  logic [N_TASKS-1:0] pending_q;
  logic               dma_busy_q;
  logic               dma_part_q;
  logic               alarm_armed_q;
  logic [TW-1:0]      alarm_cnt_q;
  logic               load_go_q;

  // ---------------------------------------------------------------- decisions
  logic          running, has_ready, has_loading, has_empty, has_done;
  logic          ready_p, empty_p, done_p;
  logic [IW-1:0] best;
  logic          best_v;

  always_comb begin
    running = 1'b0; has_ready = 1'b0; has_loading = 1'b0; has_empty = 1'b0; has_done = 1'b0;
    ready_p = 1'b0; empty_p = 1'b0; done_p = 1'b0;
    for (int p = 1; p >= 0; p--) begin
      if (pst_q[p] == P_RUNNING) running = 1'b1;
      if (pst_q[p] == P_LOADING) has_loading = 1'b1;
      if (pst_q[p] == P_READY) begin has_ready = 1'b1; ready_p = p[0]; end
      if (pst_q[p] == P_EMPTY) begin has_empty = 1'b1; empty_p = p[0]; end
      if (pst_q[p] == P_DONE)  begin has_done  = 1'b1; done_p  = p[0]; end
    end
    // highest priority pending job
    best = '0; best_v = 1'b0;
    for (int i = N_TASKS - 1; i >= 0; i--)
      if (pending_q[i]) begin best = IW'(i); best_v = 1'b1; end
  end

  logic idle_sys, want_load, want_unload, dispatch;
  assign idle_sys    = !running && !has_ready && !has_loading;
  assign want_load   = !dma_busy_q && best_v && has_empty && (load_go_q || idle_sys);
  assign want_unload = !dma_busy_q && has_done && !want_load;
  assign dispatch    = !running && has_ready;

  addr_t part_base [2];
  assign part_base[0] = SPM_BASE;
  assign part_base[1] = SPM_BASE + addr_t'(PART_BYTES);

  always_comb begin
    dma_cmd_valid = want_load || want_unload;
    dma_cmd       = '0;
    if (want_load) begin
      dma_cmd.op        = DMA_LOAD;
      dma_cmd.src       = in_addr_i[best];
      dma_cmd.dst       = part_base[empty_p];
      dma_cmd.len_bytes = in_bytes_i[best];
    end else begin
      dma_cmd.op        = DMA_UNLOAD;
      dma_cmd.src       = part_base[done_p];
      dma_cmd.dst       = out_addr_i[ptask_q[done_p]];
      dma_cmd.len_bytes = out_bytes_i[ptask_q[done_p]];
    end
  end

  // alarm delay for a computation dispatched now
  logic [TW-1:0] c_minus_l, alarm_delay;
  logic          other_full;
  always_comb begin
    c_minus_l   = (wcet_i[ptask_q[ready_p]] > l_bound_i) ? wcet_i[ptask_q[ready_p]] - l_bound_i : '0;
    other_full  = (pst_q[!ready_p] != P_EMPTY);
    alarm_delay = (other_full && u_bound_i > c_minus_l) ? u_bound_i : c_minus_l;
  end

  assign cpu_busy = running;

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 2; p++) begin
        pst_q[p]   <= P_EMPTY;
        ptask_q[p] <= '0;
      end
      pending_q     <= '0;
      dma_busy_q    <= 1'b0;
      dma_part_q    <= 1'b0;
      alarm_armed_q <= 1'b0;
      alarm_cnt_q   <= '0;
      load_go_q     <= 1'b0;
      run_valid     <= 1'b0;
      run_task      <= '0;
      run_part      <= 1'b0;
      ev_load       <= 1'b0;
      ev_unload     <= 1'b0;
      ev_alarm      <= 1'b0;
      ev_early      <= 1'b0;
      ev_idle_load  <= 1'b0;
      ev_overflow   <= 1'b0;
    end else begin
      run_valid    <= 1'b0;
      ev_load      <= 1'b0;
      ev_unload    <= 1'b0;
      ev_alarm     <= 1'b0;
      ev_early     <= 1'b0;
      ev_idle_load <= 1'b0;
      ev_overflow  <= |(release_i & pending_q);

      // DMA phase finished
      if (dma_done && dma_busy_q) begin
        dma_busy_q <= 1'b0;
        pst_q[dma_part_q] <= (pst_q[dma_part_q] == P_LOADING) ? P_READY : P_EMPTY;
      end

      // alarm timer
      if (alarm_armed_q) begin
        if (alarm_cnt_q <= 1) begin
          alarm_armed_q <= 1'b0;
          load_go_q     <= 1'b1;
          ev_alarm      <= 1'b1;
        end
        alarm_cnt_q <= alarm_cnt_q - 1'b1;
      end

      // computation finished: the task joins the unload queue
      if (cpu_done && running) begin
        for (int p = 0; p < 2; p++)
          if (pst_q[p] == P_RUNNING) pst_q[p] <= P_DONE;
        if (alarm_armed_q && alarm_cnt_q > 1) begin
          alarm_armed_q <= 1'b0;
          load_go_q     <= 1'b1;
          ev_early      <= 1'b1;
        end
      end

      // dispatch the ready task and program the alarm
      if (dispatch) begin
        pst_q[ready_p] <= P_RUNNING;
        run_valid      <= 1'b1;
        run_task       <= ptask_q[ready_p];
        run_part       <= ready_p;
        if (alarm_delay == '0) begin
          alarm_armed_q <= 1'b0;
          load_go_q     <= 1'b1;
          ev_alarm      <= 1'b1;
        end else begin
          alarm_armed_q <= 1'b1;
          alarm_cnt_q   <= alarm_delay;
          load_go_q     <= 1'b0;
        end
      end

      // start a DMA phase
      if (dma_cmd_valid && dma_cmd_ready) begin
        dma_busy_q <= 1'b1;
        if (want_load) begin
          pst_q[empty_p]   <= P_LOADING;
          ptask_q[empty_p] <= best;
          dma_part_q       <= empty_p;
          load_go_q        <= 1'b0;
          ev_load          <= 1'b1;
          ev_idle_load     <= idle_sys;
        end else begin
          pst_q[done_p] <= P_UNLOADING;
          dma_part_q    <= done_p;
          ev_unload     <= 1'b1;
        end
      end

      // releases join the load queue; the job picked this cycle leaves it
      pending_q <= (pending_q | release_i) &
                   ~((dma_cmd_valid && dma_cmd_ready && want_load) ? (N_TASKS'(1) << best) : '0);
    end
  end

  // at most one partition computes and the DMA handles one phase at a time
  assert property (@(posedge clk) disable iff (!rst_n) !(pst_q[0] == P_RUNNING && pst_q[1] == P_RUNNING));
  assert property (@(posedge clk) disable iff (!rst_n)
    !((pst_q[0] inside {P_LOADING, P_UNLOADING}) && (pst_q[1] inside {P_LOADING, P_UNLOADING})));

endmodule
