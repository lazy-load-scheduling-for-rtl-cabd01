// Behavioural bus memory for testbenches (stands for the DRAM behind the PS
// memory controller, which is not part of the PL design).
//
// Sparse byte memory on an axi_pkg slave port. A byte never written reads as
// a fixed function of its address (init_byte), so a testbench can predict it.
// Reads answer after LATENCY cycles and then one beat per cycle; with
// STALL != 0 the ready and valid signals drop at random. One transaction at a
// time per direction, INCR bursts.
module axi_mem_model
  import axi_pkg::*;
#(
  parameter int LATENCY = 4,
  parameter bit STALL   = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  req_t  s_req,
  output resp_t s_resp
);

  byte unsigned mem [longint];

  function automatic byte unsigned init_byte(longint a);
    return byte'((a * 7 + (a >> 8) * 13 + 8'h5A) & 8'hFF);
  endfunction

  function automatic byte unsigned rd_byte(longint a);
    return mem.exists(a) ? mem[a] : init_byte(a);
  endfunction

  // write side
  initial begin
    s_resp.aw_ready = 1'b0;
    s_resp.w_ready  = 1'b0;
    s_resp.b_valid  = 1'b0;
    s_resp.b_resp   = RESP_OKAY;
    forever begin
      longint a;
      int n;
      @(posedge clk);
      if (!rst_n || !s_req.aw_valid) continue;
      s_resp.aw_ready <= 1'b1;
      a = longint'(s_req.aw.addr);
      n = int'(s_req.aw.len) + 1;
      @(posedge clk);
      s_resp.aw_ready <= 1'b0;
      for (int b = 0; b < n; ) begin
        s_resp.w_ready <= !(STALL && ($urandom % 4 == 0));
        @(posedge clk);
        if (s_resp.w_ready && s_req.w_valid) begin
          for (int k = 0; k < BEAT_BYTES; k++)
            if (s_req.w.strb[k]) mem[a + BEAT_BYTES * b + k] = s_req.w.data[8*k +: 8];
          b++;
        end
      end
      s_resp.w_ready <= 1'b0;
      s_resp.b_valid <= 1'b1;
      do @(posedge clk); while (!s_req.b_ready);
      s_resp.b_valid <= 1'b0;
    end
  end

  // read side
  initial begin
    s_resp.ar_ready = 1'b0;
    s_resp.r_valid  = 1'b0;
    s_resp.r        = '0;
    forever begin
      longint a;
      int n;
      @(posedge clk);
      if (!rst_n || !s_req.ar_valid) continue;
      s_resp.ar_ready <= 1'b1;
      a = longint'(s_req.ar.addr);
      n = int'(s_req.ar.len) + 1;
      @(posedge clk);
      s_resp.ar_ready <= 1'b0;
      repeat (LATENCY) @(posedge clk);
      for (int b = 0; b < n; ) begin
        data_t d;
        for (int k = 0; k < BEAT_BYTES; k++) d[8*k +: 8] = rd_byte(a + BEAT_BYTES * b + k);
        if (STALL && ($urandom % 4 == 0)) begin
          s_resp.r_valid <= 1'b0;
          @(posedge clk);
          continue;
        end
        s_resp.r_valid <= 1'b1;
        s_resp.r.data  <= d;
        s_resp.r.last  <= (b == n - 1);
        s_resp.r.resp  <= RESP_OKAY;
        do @(posedge clk); while (!s_req.r_ready);
        b++;
      end
      s_resp.r_valid <= 1'b0;
    end
  end

endmodule
