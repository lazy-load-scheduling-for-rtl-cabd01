// Bus controller for one port of a dual-ported scratchpad.
//
// Turns AXI4 (subset of axi_pkg) read and write bursts into word accesses on
// one port of spm_dpram, one beat per clock. The reference design places one
// such controller on each SPM port, the core's and the DMA's, so that the two
// never contend in a controller; how the controller works inside is this
// design's own, simplest choice: one transaction at a time, reads and writes
// alternating in priority when both are waiting.
//
// Timing: AW/AR are accepted in the IDLE state. A write burst takes one beat
// per cycle while W is valid, then one B beat. A read burst presents its first
// beat the cycle after AR is accepted and then one beat per cycle while R is
// taken; the RAM output register holds a beat under back-pressure. Addresses
// wrap inside the SPM (only the low log2(BYTES) bits are used); INCR bursts
// only. Responses are always OKAY.
module spm_axi_ctrl
  import axi_pkg::*;
#(
  parameter int unsigned BYTES = 2 * 1024 * 1024,
  localparam int unsigned WORDS = BYTES / BEAT_BYTES,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  req_t          s_req,
  output resp_t         s_resp,
  // RAM port
  output logic          ram_en,
  output strb_t         ram_we,
  output logic [AW-1:0] ram_addr,
  output data_t         ram_wdata,
  input  data_t         ram_rdata
);

  localparam int unsigned LSB = $clog2(BEAT_BYTES);

  typedef enum logic [1:0] {S_IDLE, S_WR, S_WB, S_RD} state_e;

  state_e        state_q, state_d;
  logic [AW-1:0] addr_q, addr_d;
  len_t          cnt_q, cnt_d;
  logic          rd_prio_q, rd_prio_d;  // 1: a waiting read goes first

  always_comb begin
    state_d   = state_q;
    addr_d    = addr_q;
    cnt_d     = cnt_q;
    rd_prio_d = rd_prio_q;
    s_resp    = '0;
    ram_en    = 1'b0;
    ram_we    = '0;
    ram_addr  = addr_q;
    ram_wdata = s_req.w.data;

    unique case (state_q)
      S_IDLE: begin
        if (s_req.aw_valid && !(s_req.ar_valid && rd_prio_q)) begin
          s_resp.aw_ready = 1'b1;
          addr_d    = s_req.aw.addr[AW+LSB-1:LSB];
          cnt_d     = s_req.aw.len;
          rd_prio_d = 1'b1;
          state_d   = S_WR;
        end else if (s_req.ar_valid) begin
          s_resp.ar_ready = 1'b1;
          ram_en    = 1'b1;
          ram_addr  = s_req.ar.addr[AW+LSB-1:LSB];
          addr_d    = s_req.ar.addr[AW+LSB-1:LSB] + 1'b1;
          cnt_d     = s_req.ar.len;
          rd_prio_d = 1'b0;
          state_d   = S_RD;
        end
      end
      S_WR: begin
        s_resp.w_ready = 1'b1;
        if (s_req.w_valid) begin
          ram_en = 1'b1;
          ram_we = s_req.w.strb;
          addr_d = addr_q + 1'b1;
          cnt_d  = cnt_q - 1'b1;
          if (s_req.w.last || cnt_q == '0) state_d = S_WB;
        end
      end
      S_WB: begin
        s_resp.b_valid = 1'b1;
        s_resp.b_resp  = RESP_OKAY;
        if (s_req.b_ready) state_d = S_IDLE;
      end
      S_RD: begin
        s_resp.r_valid   = 1'b1;
        s_resp.r.data    = ram_rdata;
        s_resp.r.resp    = RESP_OKAY;
        s_resp.r.last    = (cnt_q == '0);
        if (s_req.r_ready) begin
          if (cnt_q == '0) begin
            state_d = S_IDLE;
          end else begin
            ram_en = 1'b1;
            addr_d = addr_q + 1'b1;
            cnt_d  = cnt_q - 1'b1;
          end
        end
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      addr_q    <= '0;
      cnt_q     <= '0;
      rd_prio_q <= 1'b0;
    end else begin
      state_q   <= state_d;
      addr_q    <= addr_d;
      cnt_q     <= cnt_d;
      rd_prio_q <= rd_prio_d;
    end
  end

  // Handshake rule: a response held valid must stay valid until taken.
  property p_b_hold;
    @(posedge clk) disable iff (!rst_n) s_resp.b_valid && !s_req.b_ready |=> s_resp.b_valid;
  endproperty
  assert property (p_b_hold);
  property p_r_hold;
    @(posedge clk) disable iff (!rst_n) s_resp.r_valid && !s_req.r_ready |=> s_resp.r_valid && $stable(s_resp.r);
  endproperty
  assert property (p_r_hold);

endmodule
