// DMA engine with fine-grained TDMA arbitration among the real-time cores.
//
// Each real-time core j may hand the engine one load or unload phase at a time
// (a dma_cmd_t: source, destination, length). Time is divided into rounds of
// N_CORES slots; slot j lasts SLOT_CYCLES[j] clocks and belongs to core j only,
// so the memory traffic of one core never delays another's. Within its slot a
// core's phase is served for at most CHUNK_BYTES[j] bytes; a phase longer than
// that is split and continues in the core's next slots, instead of requiring
// slots sized for the largest phase. The first OVH_CYCLES of a used slot are
// spent idle: they stand for the time to re-program the DMA for each piece,
// so SLOT_CYCLES - OVH_CYCLES is the usable part of a slot. A phase that arrives
// after its core's slot has begun waits for the next one, so a phase needing k
// slots completes at most k * T + SLOT_CYCLES[j] clocks after it is handed over,
// T being the round length (sum of the slot lengths).
//
// Data path: the engine copies with a single bus master. Each burst is a read
// of up to BURST_BEATS beats into an internal buffer, followed by a write of
// the same beats; a burst never crosses a 4 KB boundary on either side. If the
// memory is so slow that a chunk has not finished when its slot ends, the slot
// is stretched until the chunk ends and `overrun` pulses; slots should be sized
// so this does not happen.
//
// Slot lengths, chunk sizes and the overhead are given in clock cycles and
// bytes; their defaults follow the reference example of a 32 KB chunk per slot
// and three real-time cores, at an assumed 300 MHz clock: a 42.7 us slot is
// 12810 cycles, of which the 3.89 us programming overhead is 1167. The engine
// itself (a slot timer instead of firmware, a copy through a burst buffer) is
// this design's choice. Lengths and addresses
// must be multiples of the 8-byte beat. Read and write response codes are not
// examined: every target in this system answers OKAY.
module tdma_dma
  import axi_pkg::*;
  import mc_pkg::*;
#(
  parameter int unsigned N_CORES     = 3,
  parameter int unsigned SLOT_CYCLES [N_CORES] = '{default: 12810},
  parameter int unsigned CHUNK_BYTES [N_CORES] = '{default: 32768},
  parameter int unsigned OVH_CYCLES  = 1167,
  parameter int unsigned BURST_BEATS = 16,
  localparam int unsigned CW = (N_CORES > 1) ? $clog2(N_CORES) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // one command port per real-time core
  input  logic                cmd_valid [N_CORES],
  output logic                cmd_ready [N_CORES],
  input  dma_cmd_t            cmd       [N_CORES],
  output logic                done      [N_CORES],   // one-cycle pulse: phase finished
  // bus master towards DRAM and the SPMs
  output req_t                m_req,
  input  resp_t               m_resp,
  // observation
  output logic [CW-1:0]       slot_owner,            // core owning the current slot
  output logic                xfer_active,           // data moving in this slot
  output logic                overrun                // one-cycle pulse: slot stretched
);

  localparam int unsigned LSB = $clog2(BEAT_BYTES);
  localparam int unsigned BW  = $clog2(BURST_BEATS + 1);
  typedef logic [23-LSB:0] beats_t;     // phase length in beats
  typedef logic [31:0]     cyc_t;

  typedef enum logic [2:0] {S_START, S_OVH, S_AR, S_R, S_AW, S_W, S_B, S_WAIT} state_e;

  // per-core phase registers
  logic   active_q [N_CORES];
  addr_t  src_q    [N_CORES];
  addr_t  dst_q    [N_CORES];
  beats_t rem_q    [N_CORES];

  state_e        state_q;
  logic [CW-1:0] cur_q;
  cyc_t          slot_cnt_q;
  beats_t        chunk_rem_q;   // beats still allowed in this slot
  logic [BW-1:0] bl_q;          // beats of the burst in flight
  logic [BW-1:0] idx_q;
  logic          stretched_q;
  data_t         buf_q [BURST_BEATS];

  function automatic beats_t beats_to_4k(addr_t a);
    return beats_t'((beats_t'(13'h1000) - beats_t'(a[11:0])) >> LSB);
  endfunction

  function automatic beats_t min2(beats_t a, beats_t b);
    return (a < b) ? a : b;
  endfunction

  // length of the next burst of the current core
  beats_t bl_next;
  always_comb begin
    bl_next = min2(beats_t'(BURST_BEATS), chunk_rem_q);
    bl_next = min2(bl_next, beats_to_4k(src_q[cur_q]));
    bl_next = min2(bl_next, beats_to_4k(dst_q[cur_q]));
  end

  logic slot_end;
  assign slot_end = (slot_cnt_q >= cyc_t'(SLOT_CYCLES[cur_q] - 1));

  always_comb begin
    for (int j = 0; j < N_CORES; j++) cmd_ready[j] = !active_q[j];
  end

  always_comb begin
    m_req          = '0;
    m_req.ar.addr  = src_q[cur_q];
    m_req.ar.len   = len_t'(bl_next) - 8'd1;
    m_req.aw.addr  = dst_q[cur_q];
    m_req.aw.len   = len_t'(bl_q) - 8'd1;
    m_req.w.data   = buf_q[32'(idx_q) % BURST_BEATS];
    m_req.w.strb   = '1;
    m_req.w.last   = (idx_q == bl_q - 1'b1);
    m_req.ar_valid = (state_q == S_AR);
    m_req.r_ready  = (state_q == S_R);
    m_req.aw_valid = (state_q == S_AW);
    m_req.w_valid  = (state_q == S_W);
    m_req.b_ready  = (state_q == S_B);
  end

  assign slot_owner  = cur_q;
  assign xfer_active = (state_q inside {S_AR, S_R, S_AW, S_W, S_B});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_CORES; j++) begin
        active_q[j] <= 1'b0;
        src_q[j]    <= '0;
        dst_q[j]    <= '0;
        rem_q[j]    <= '0;
        done[j]     <= 1'b0;
      end
      state_q     <= S_START;
      cur_q       <= '0;
      slot_cnt_q  <= '0;
      chunk_rem_q <= '0;
      bl_q        <= '0;
      idx_q       <= '0;
      stretched_q <= 1'b0;
      overrun     <= 1'b0;
    end else begin
      overrun <= 1'b0;
      for (int j = 0; j < N_CORES; j++) begin
        done[j] <= 1'b0;
        if (cmd_valid[j] && !active_q[j]) begin
          active_q[j] <= (cmd[j].len_bytes[23:LSB] != '0);
          done[j]     <= (cmd[j].len_bytes[23:LSB] == '0);  // empty phase: done at once
          src_q[j]    <= cmd[j].src;
          dst_q[j]    <= cmd[j].dst;
          rem_q[j]    <= cmd[j].len_bytes[23:LSB];
        end
      end

      slot_cnt_q <= slot_cnt_q + 1'b1;
      if (slot_end && state_q != S_WAIT && state_q != S_START && state_q != S_OVH && !stretched_q) begin
        stretched_q <= 1'b1;
        overrun     <= 1'b1;
      end

      unique case (state_q)
        S_START: begin
          // a phase is served in this slot only if it was pending when the slot began
          state_q <= active_q[cur_q] ? S_OVH : S_WAIT;
          chunk_rem_q <= min2(rem_q[cur_q], beats_t'(CHUNK_BYTES[cur_q] >> LSB));
        end
        S_OVH: if (slot_cnt_q >= cyc_t'(OVH_CYCLES)) state_q <= S_AR;
        S_AR: begin
          if (m_resp.ar_ready) begin
            bl_q    <= BW'(bl_next);
            state_q <= S_R;
            idx_q   <= '0;
          end
        end
        S_R: if (m_resp.r_valid) begin
          buf_q[32'(idx_q) % BURST_BEATS] <= m_resp.r.data;
          idx_q <= idx_q + 1'b1;
          if (m_resp.r.last) state_q <= S_AW;
        end
        S_AW: if (m_resp.aw_ready) begin
          state_q <= S_W;
          idx_q   <= '0;
        end
        S_W: if (m_resp.w_ready) begin
          idx_q <= idx_q + 1'b1;
          if (idx_q == bl_q - 1'b1) state_q <= S_B;
        end
        S_B: if (m_resp.b_valid) begin
          src_q[cur_q] <= src_q[cur_q] + (addr_t'(bl_q) << LSB);
          dst_q[cur_q] <= dst_q[cur_q] + (addr_t'(bl_q) << LSB);
          rem_q[cur_q] <= rem_q[cur_q] - beats_t'(bl_q);
          chunk_rem_q  <= chunk_rem_q - beats_t'(bl_q);
          if (rem_q[cur_q] == beats_t'(bl_q)) begin
            active_q[cur_q] <= 1'b0;
            done[cur_q]     <= 1'b1;
            state_q         <= S_WAIT;
          end else if (chunk_rem_q == beats_t'(bl_q)) begin
            state_q <= S_WAIT;
          end else begin
            state_q <= S_AR;
          end
        end
        S_WAIT: if (slot_end || stretched_q) begin
          state_q     <= S_START;
          slot_cnt_q  <= '0;
          stretched_q <= 1'b0;
          cur_q       <= (cur_q == CW'(N_CORES - 1)) ? '0 : cur_q + 1'b1;
        end
        default: state_q <= S_START;
      endcase
    end
  end

  // commands must be beat-aligned
  for (genvar j = 0; j < N_CORES; j++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      cmd_valid[j] && !active_q[j] |->
        cmd[j].len_bytes[LSB-1:0] == '0 && cmd[j].src[LSB-1:0] == '0 && cmd[j].dst[LSB-1:0] == '0)
      else $error("DMA phase not aligned to the bus beat");
  end

endmodule
