// Self-checking testbench of tdma_dma.
//
// Three cores hand random load/unload phases (random length, random start
// time, each core in its own address region) to the engine, which copies
// through a behavioural memory with read latency and random stalls
// (write-data ready and read-data valid drop at random). Checks:
//  - every copied byte arrives at its destination;
//  - data moves only in the slot of the core the data belongs to, never
//    during the first OVH cycles of a slot, and at most CHUNK_BYTES[j] per slot;
//  - a phase of k slots' worth finishes within k * T + SLOT_CYCLES[j] cycles of
//    being handed over (T = round length), the bound of the TDMA analysis;
//  - phases longer than a chunk are split over several slots;
//  - no slot is stretched (the slots are sized for the memory latency).
module tb_tdma_dma;
  import axi_pkg::*;
  import mc_pkg::*;

  localparam int N = 3;
  localparam int unsigned SLOT [N]  = '{400, 300, 350};
  localparam int unsigned CHUNK [N] = '{512, 256, 384};
  localparam int OVH = 20;
  localparam int T = 400 + 300 + 350;

  logic clk = 0, rst_n = 0;
  logic     cmd_valid [N];
  logic     cmd_ready [N];
  dma_cmd_t cmd       [N];
  logic     done      [N];
  req_t     m_req;
  resp_t    m_resp;
  logic [1:0] slot_owner;
  logic     xfer_active, overrun;
  int checks = 0, failures = 0;
  int splits = 0, overruns = 0;

  tdma_dma #(.N_CORES(N), .SLOT_CYCLES(SLOT), .CHUNK_BYTES(CHUNK), .OVH_CYCLES(OVH), .BURST_BEATS(16)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .done, .m_req, .m_resp,
    .slot_owner, .xfer_active, .overrun
  );
  axi_mem_model #(.LATENCY(3), .STALL(1'b1)) mem (.clk, .rst_n, .s_req(m_req), .s_resp(m_resp));

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slot monitor
  int cyc = 0, slot_start = 0, slot_beats = 0;
  logic [1:0] owner_q = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (slot_owner != owner_q) begin
      slot_start = cyc;
      slot_beats = 0;
      owner_q = slot_owner;
    end
    if (m_req.ar_valid && m_resp.ar_ready) begin
      checks++;
      // the region of the source address tells which core the data belongs to
      if (int'(m_req.ar.addr[25:24]) != int'(slot_owner)) begin
        failures++;
        $display("FAIL: core %0d data moved in slot of core %0d", m_req.ar.addr[25:24], slot_owner);
      end
      checks++;
      if (cyc - slot_start < OVH) begin
        failures++;
        $display("FAIL: transfer inside the programming overhead");
      end
    end
    if (m_req.w_valid && m_resp.w_ready) begin
      slot_beats++;
      checks++;
      if (slot_beats * 8 > CHUNK[slot_owner]) begin
        failures++;
        $display("FAIL: more than a chunk moved in one slot");
      end
    end
    if (overrun) overruns++;
  end

  task automatic run_phase(int j, int n);
    int len = 8 * $urandom_range(1, 200);
    addr_t src = addr_t'((j << 24) | (n << 16) | (8 * $urandom_range(0, 511)));
    addr_t dst = addr_t'(32'h8000_0000 | (j << 24) | (n << 16) | (8 * $urandom_range(0, 511)));
    int t0, k, slots_used = 0;
    logic [1:0] last_owner = 2'd3;
    if ($urandom % 2) begin addr_t t = src; src = dst; dst = t; end
    repeat ($urandom_range(0, 900)) @(posedge clk);
    cmd[j].op        <= ($urandom % 2) ? DMA_LOAD : DMA_UNLOAD;
    cmd[j].src       <= src;
    cmd[j].dst       <= dst;
    cmd[j].len_bytes <= 24'(len);
    cmd_valid[j]     <= 1'b1;
    do @(posedge clk); while (!cmd_ready[j]);
    cmd_valid[j] <= 1'b0;
    t0 = cyc;
    do begin
      @(posedge clk);
      if (xfer_active && slot_owner == 2'(j) && last_owner != 2'(j)) slots_used++;
      last_owner = xfer_active ? slot_owner : 2'd3;
    end while (!done[j]);
    k = (len + CHUNK[j] - 1) / CHUNK[j];
    checks++;
    if (cyc - t0 > k * T + int'(SLOT[j])) begin
      failures++;
      $display("FAIL: core %0d phase of %0d bytes took %0d cycles, bound %0d", j, len, cyc - t0, k * T + SLOT[j]);
    end
    check("slots used", slots_used, k);
    if (k > 1) splits++;
    for (int b = 0; b < len; b++)
      begin
        if (mem.rd_byte(longint'(dst) + b) != mem.rd_byte(longint'(src) + b)) $display("core %0d n %0d src %h dst %h len %0d byte %0d", j, n, src, dst, len, b);
        check("copied byte", longint'(mem.rd_byte(longint'(dst) + b)), longint'(mem.rd_byte(longint'(src) + b)));
      end
  endtask

  initial begin
    for (int j = 0; j < N; j++) begin cmd_valid[j] = 0; cmd[j] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    fork
      for (int n = 0; n < 12; n++) run_phase(0, n);
      for (int n = 0; n < 12; n++) run_phase(1, n);
      for (int n = 0; n < 12; n++) run_phase(2, n);
    join
    check("overruns", overruns, 0);
    checks++;
    if (splits == 0) begin failures++; $display("FAIL: no phase was split"); end
    $display("split phases: %0d", splits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
