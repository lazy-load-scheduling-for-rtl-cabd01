// True dual-port scratchpad memory array (the block RAM of one SPM).
//
// WORDS words of DATA_W bits, two independent ports A and B, each with an
// enable, a per-byte write enable and one cycle of read latency. The read
// output register of a port changes only on a cycle in which that port is
// enabled and not writing, so a bus controller can hold a read beat for as long
// as its master stalls. Each port reads the old contents when it writes
// (no write-through). When both ports write the same word in the same cycle the
// result is undefined; the scheduling of the design keeps the core and the DMA
// in different halves of the SPM. Contents are not reset, like block RAM.
module spm_dpram #(
  parameter int unsigned WORDS  = 262144,   // 2 MB of 64-bit words
  parameter int unsigned DATA_W = 64,
  localparam int unsigned AW    = $clog2(WORDS),
  localparam int unsigned NB    = DATA_W / 8
) (
  input  logic              clk,
  // port A
  input  logic              a_en,
  input  logic [NB-1:0]     a_we,
  input  logic [AW-1:0]     a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  // port B
  input  logic              b_en,
  input  logic [NB-1:0]     b_we,
  input  logic [AW-1:0]     b_addr,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_rdata
);

  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      for (int i = 0; i < NB; i++)
        if (a_we[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
      if (a_we == '0) a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      for (int i = 0; i < NB; i++)
        if (b_we[i]) mem[b_addr][8*i +: 8] <= b_wdata[8*i +: 8];
      if (b_we == '0) b_rdata <= mem[b_addr];
    end
  end

endmodule
