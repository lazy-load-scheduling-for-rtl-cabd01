// Self-checking testbench of addr_translator.
//
// Drives random read and write addresses (plus the reference example
// 0xA0023456 -> 0x0B456) through the 8 MB-to-2 MB translator and a 2 MB-to-
// 512 KB instance, and compares the SPM-side address with an arithmetic model:
// out = (off / 64 KB) * 16 KB + (off mod 16 KB), off being the offset inside the
// coloured window. Also checks that data, lengths and handshakes pass unchanged
// in both directions and that the translator adds no latency.
module tb_addr_translator;
  import axi_pkg::*;

  req_t  s_req, m_req, s_req2, m_req2;
  resp_t s_resp, m_resp, s_resp2, m_resp2;
  int checks = 0, failures = 0;

  addr_translator #(.IN_ADDR_W(23)) dut    (.s_req(s_req),  .s_resp(s_resp),  .m_req(m_req),  .m_resp(m_resp));
  addr_translator #(.IN_ADDR_W(21)) dut_mid(.s_req(s_req2), .s_resp(s_resp2), .m_req(m_req2), .m_resp(m_resp2));

  function automatic longint model(longint a, int win_bytes);
    longint off = a % win_bytes;
    return (off / 65536) * 16384 + (off % 16384);
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_req = '0; m_resp = '0; s_req2 = '0; m_resp2 = '0;
    // reference example
    s_req.ar.addr = 32'hA002_3456;
    s_req.ar_valid = 1'b1;
    #1;
    check("example", longint'(m_req.ar.addr), 64'h0B456);
    for (int n = 0; n < 2000; n++) begin
      s_req.aw.addr  = $urandom & 32'hFFFF_FFF8;
      s_req.ar.addr  = $urandom & 32'hFFFF_FFF8;
      s_req.aw.len   = 8'($urandom_range(0, 7));
      s_req.ar.len   = 8'($urandom_range(0, 7));
      s_req.aw.addr[11:0] = 12'($urandom_range(0, 4095 - 64)) & 12'hFF8;
      s_req.ar.addr[11:0] = 12'($urandom_range(0, 4095 - 64)) & 12'hFF8;
      s_req.w.data   = {$urandom, $urandom};
      s_req.w.strb   = 8'($urandom);
      s_req.w_valid  = 1'($urandom);
      s_req.r_ready  = 1'($urandom);
      s_req.aw_valid = 1'($urandom);
      s_req2         = s_req;
      m_resp.r.data  = {$urandom, $urandom};
      m_resp.r_valid = 1'($urandom);
      m_resp.aw_ready = 1'($urandom);
      m_resp2        = m_resp;
      #1;
      check("aw addr", longint'(m_req.aw.addr), model(longint'(s_req.aw.addr), 8*1024*1024));
      check("ar addr", longint'(m_req.ar.addr), model(longint'(s_req.ar.addr), 8*1024*1024));
      check("ar addr mid", longint'(m_req2.ar.addr), model(longint'(s_req2.ar.addr), 2*1024*1024));
      check("aw len", longint'(m_req.aw.len), longint'(s_req.aw.len));
      check("w data", longint'(m_req.w.data), longint'(s_req.w.data));
      check("w valid", longint'(m_req.w_valid), longint'(s_req.w_valid));
      check("r data", longint'(s_resp.r.data), longint'(m_resp.r.data));
      check("r valid", longint'(s_resp.r_valid), longint'(m_resp.r_valid));
      check("aw ready", longint'(s_resp.aw_ready), longint'(m_resp.aw_ready));
      // the output must fit the dense SPM
      check("range", longint'(m_req.ar.addr < 32'h0020_0000), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
