// Self-checking testbench of axi_demux.
//
// One master writes and reads bursts at random addresses through a 3-way
// switch (two decoded windows and a default route) to three behavioural
// memories with random stalls. Checks that each write lands only in the memory
// its address selects (read back through the memories' own storage), that reads
// return that memory's bytes, and that the switch adds no cycles to a burst.
module tb_axi_demux;
  import axi_pkg::*;

  logic clk = 0, rst_n = 0;
  req_t  s_req;
  resp_t s_resp;
  req_t  m_req [3];
  resp_t m_resp [3];
  int checks = 0, failures = 0;

  axi_demux #(
    .N_SLV(3),
    .BASE({32'h0, 32'h8020_0000, 32'h8000_0000}),
    .MASK({32'h0, 32'hFFF8_0000, 32'hFFE0_0000})
  ) dut (.clk, .rst_n, .s_req, .s_resp, .m_req, .m_resp);

  axi_mem_model #(.LATENCY(2), .STALL(1'b1)) mem0 (.clk, .rst_n, .s_req(m_req[0]), .s_resp(m_resp[0]));
  axi_mem_model #(.LATENCY(5), .STALL(1'b1)) mem1 (.clk, .rst_n, .s_req(m_req[1]), .s_resp(m_resp[1]));
  axi_mem_model #(.LATENCY(1), .STALL(1'b0)) mem2 (.clk, .rst_n, .s_req(m_req[2]), .s_resp(m_resp[2]));

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int route(addr_t a);
    if (a >= 32'h8000_0000 && a < 32'h8020_0000) return 0;
    if (a >= 32'h8020_0000 && a < 32'h8028_0000) return 1;
    return 2;
  endfunction

  function automatic byte unsigned mem_byte(int m, longint a);
    case (m)
      0: return mem0.rd_byte(a);
      1: return mem1.rd_byte(a);
      default: return mem2.rd_byte(a);
    endcase
  endfunction

  task automatic wr(addr_t a, int beats);
    data_t d [16];
    s_req.aw.addr <= a; s_req.aw.len <= len_t'(beats - 1); s_req.aw_valid <= 1'b1;
    do @(posedge clk); while (!s_resp.aw_ready);
    s_req.aw_valid <= 1'b0;
    for (int b = 0; b < beats; b++) begin
      d[b] = {$urandom, $urandom};
      s_req.w.data <= d[b]; s_req.w.strb <= '1; s_req.w.last <= (b == beats - 1); s_req.w_valid <= 1'b1;
      do @(posedge clk); while (!s_resp.w_ready);
    end
    s_req.w_valid <= 1'b0;
    s_req.b_ready <= 1'b1;
    do @(posedge clk); while (!s_resp.b_valid);
    s_req.b_ready <= 1'b0;
    for (int b = 0; b < beats; b++)
      for (int k = 0; k < 8; k++)
        for (int m = 0; m < 3; m++) begin
          longint ad = longint'(a) + 8*b + k;
          if (m == route(a)) check("byte in selected memory", mem_byte(m, ad), d[b][8*k +: 8]);
          else begin
            // the other memories must still hold their initial contents
            checks++;
            if (m == 0 ? mem0.mem.exists(ad) : m == 1 ? mem1.mem.exists(ad) : mem2.mem.exists(ad)) begin
              failures++;
              $display("FAIL write leaked to memory %0d", m);
            end
          end
        end
  endtask

  task automatic rd(addr_t a, int beats);
    int got = 0;
    s_req.ar.addr <= a; s_req.ar.len <= len_t'(beats - 1); s_req.ar_valid <= 1'b1;
    do @(posedge clk); while (!s_resp.ar_ready);
    s_req.ar_valid <= 1'b0;
    s_req.r_ready <= 1'b1;
    while (got < beats) begin
      @(posedge clk);
      if (s_resp.r_valid) begin
        data_t e;
        for (int k = 0; k < 8; k++) e[8*k +: 8] = mem_byte(route(a), longint'(a) + 8*got + k);
        check("read data", longint'(s_resp.r.data), longint'(e));
        check("read last", longint'(s_resp.r.last), longint'(got == beats - 1));
        got++;
      end
    end
    s_req.r_ready <= 1'b0;
  endtask

  // the switch is transparent: slave-side and master-side handshakes coincide
  always @(posedge clk) if (rst_n) begin
    int n;
    n = 0;
    for (int m = 0; m < 3; m++) if (m_req[m].w_valid && m_resp[m].w_ready) n++;
    check("one W beat per master beat", n, int'(s_req.w_valid && s_resp.w_ready));
  end

  initial begin
    s_req = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      addr_t a;
      case ($urandom % 3)
        0: a = 32'h8000_0000 + ($urandom % 32'h0020_0000);
        1: a = 32'h8020_0000 + ($urandom % 32'h0008_0000);
        default: a = $urandom % 32'h4000_0000;
      endcase
      a[2:0] = 3'b0;
      a[11:0] = a[11:0] & 12'hF00;
      if ($urandom % 2) wr(a, $urandom_range(1, 16));
      else rd(a, $urandom_range(1, 16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
