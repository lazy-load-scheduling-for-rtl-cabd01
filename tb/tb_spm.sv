// Self-checking testbench of spm (dual-ported scratchpad with two controllers).
//
// Writes random bursts through one port and reads them back through the same
// and the other port, with random strobes and random back-pressure, against a
// byte-level model of the memory kept in the testbench. Checks that a read
// burst streams one beat per clock after the first beat, which arrives one
// cycle after the address is accepted, and that both ports work at the same
// time on different halves of the SPM.
module tb_spm;
  import axi_pkg::*;

  localparam int unsigned BYTES = 2 * 1024 * 1024;

  logic  clk = 0, rst_n = 0;
  req_t  rq [2];
  resp_t rs [2];
  int checks = 0, failures = 0;
  byte unsigned model [int];

  spm #(.BYTES(BYTES)) dut (
    .clk, .rst_n, .core_req(rq[0]), .core_resp(rs[0]), .dma_req(rq[1]), .dma_resp(rs[1])
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr_burst(int p, int addr, int beats, bit stall, bit rnd_strb = 1);
    rq[p].aw.addr  <= addr_t'(addr);
    rq[p].aw.len   <= len_t'(beats - 1);
    rq[p].aw_valid <= 1'b1;
    do @(posedge clk); while (!rs[p].aw_ready);
    rq[p].aw_valid <= 1'b0;
    for (int b = 0; b < beats; b++) begin
      data_t d = {$urandom, $urandom};
      strb_t s = (rnd_strb && b % 3 == 0) ? strb_t'($urandom) : '1;
      while (stall && ($urandom % 3 == 0)) begin
        rq[p].w_valid <= 1'b0;
        @(posedge clk);
      end
      rq[p].w.data  <= d;
      rq[p].w.strb  <= s;
      rq[p].w.last  <= (b == beats - 1);
      rq[p].w_valid <= 1'b1;
      do @(posedge clk); while (!rs[p].w_ready);
      for (int k = 0; k < 8; k++)
        if (s[k]) model[(addr % BYTES) + 8*b + k] = d[8*k +: 8];
    end
    rq[p].w_valid <= 1'b0;
    rq[p].b_ready <= 1'b1;
    do @(posedge clk); while (!rs[p].b_valid);
    rq[p].b_ready <= 1'b0;
    check("bresp", longint'(rs[p].b_resp), 0);
  endtask

  task automatic rd_burst(int p, int addr, int beats, bit stall);
    int got = 0, t0 = 0, cyc = 0;
    rq[p].ar.addr  <= addr_t'(addr);
    rq[p].ar.len   <= len_t'(beats - 1);
    rq[p].ar_valid <= 1'b1;
    do @(posedge clk); while (!rs[p].ar_ready);
    rq[p].ar_valid <= 1'b0;
    rq[p].r_ready  <= 1'b1;
    while (got < beats) begin
      logic take;
      take = stall ? ($urandom % 2 == 0) : 1'b1;
      rq[p].r_ready <= take;
      @(posedge clk);
      cyc++;
      if (rs[p].r_valid && rq[p].r_ready) begin
        data_t exp = '0;
        if (got == 0) t0 = cyc;
        for (int k = 0; k < 8; k++)
          exp[8*k +: 8] = model.exists((addr % BYTES) + 8*got + k) ? model[(addr % BYTES) + 8*got + k] : 8'h00;
        check("rdata", longint'(rs[p].r.data), longint'(exp));
        check("rlast", longint'(rs[p].r.last), longint'(got == beats - 1));
        got++;
      end
    end
    rq[p].r_ready <= 1'b0;
    if (!stall) begin
      // first beat one cycle after AR, then one beat per cycle
      check("first beat latency", t0, 1);
      check("burst cycles", cyc, beats);
    end
  endtask

  initial begin
    rq[0] = '0; rq[1] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    begin
      // initialise two 4 KB areas with full-strobe bursts, one per port
      for (int a = 0; a < 4096; a += 128) begin
        fork
          wr_burst(0, a, 16, 0, 0);
          wr_burst(1, BYTES / 2 + a, 16, 0, 0);
        join
      end
    end
    for (int n = 0; n < 300; n++) begin
      int p = $urandom % 2;
      int beats = $urandom_range(1, 16);
      int off = ($urandom_range(0, 4096 / 8 - 16)) * 8;
      int base = ($urandom % 2) ? BYTES / 2 : 0;
      bit st = 1'($urandom);
      if ($urandom % 2) wr_burst(p, base + off, beats, st);
      else              rd_burst(p, base + off, beats, st);
    end
    // concurrent read on the core port and write on the DMA port, other halves
    fork
      rd_burst(0, 0, 16, 0);
      wr_burst(1, BYTES / 2 + 256, 16, 0);
    join
    rd_burst(1, BYTES / 2 + 256, 16, 0);
    rd_burst(0, BYTES / 2 + 256, 16, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
