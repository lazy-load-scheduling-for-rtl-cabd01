// One private scratchpad memory (SPM) of a real-time core.
//
// A dual-ported block RAM with a bus controller on each port: port A serves
// the core (through its address translator), port B serves the DMA engine that
// loads and unloads task images. Because each side has its own port and its
// own controller, the core executing a task from one half of the SPM never
// waits for the DMA reloading the other half, and vice versa. The reference
// design uses 2 MB for the high-criticality core and 512 KB for each
// mid-criticality core; BYTES selects the size.
//
// Timing is that of spm_axi_ctrl on each side: one beat per clock, first read
// beat one cycle after the address is accepted.
module spm
  import axi_pkg::*;
#(
  parameter int unsigned BYTES = 2 * 1024 * 1024
) (
  input  logic  clk,
  input  logic  rst_n,
  input  req_t  core_req,
  output resp_t core_resp,
  input  req_t  dma_req,
  output resp_t dma_resp
);

  localparam int unsigned WORDS = BYTES / BEAT_BYTES;
  localparam int unsigned AW    = $clog2(WORDS);

  logic          a_en, b_en;
  strb_t         a_we, b_we;
  logic [AW-1:0] a_addr, b_addr;
  data_t         a_wdata, b_wdata, a_rdata, b_rdata;

  spm_axi_ctrl #(.BYTES(BYTES)) u_ctrl_core (
    .clk, .rst_n, .s_req(core_req), .s_resp(core_resp),
    .ram_en(a_en), .ram_we(a_we), .ram_addr(a_addr), .ram_wdata(a_wdata), .ram_rdata(a_rdata)
  );

  spm_axi_ctrl #(.BYTES(BYTES)) u_ctrl_dma (
    .clk, .rst_n, .s_req(dma_req), .s_resp(dma_resp),
    .ram_en(b_en), .ram_we(b_we), .ram_addr(b_addr), .ram_wdata(b_wdata), .ram_rdata(b_rdata)
  );

  spm_dpram #(.WORDS(WORDS), .DATA_W(DATA_W)) u_ram (
    .clk,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

endmodule
