// Constants and types of the mixed-criticality PL design.
//
// Holds the address map seen by the DMA engine, the sizes of the three private
// scratchpads (2 MB for the high-criticality core, 512 KB for each of the two
// mid-criticality cores), the colour-bit position used by the address
// translators (bits 14 and 15) and the DMA command format exchanged between the
// per-core Lazy Load schedulers and the TDMA DMA engine. The SPM sizes and the
// colour bits follow the reference platform; the base addresses are this
// design's choice.
package mc_pkg;
  import axi_pkg::*;

  // Real-time (mid/high criticality) cores served by the SPMs and the DMA.
  localparam int unsigned N_RT_CORES = 3;

  // Scratchpad sizes in bytes: index 0 is the high-criticality core.
  localparam int unsigned SPM_HI_BYTES  = 2 * 1024 * 1024;
  localparam int unsigned SPM_MID_BYTES = 512 * 1024;

  // LLC colour bits removed by the translators.
  localparam int unsigned COLOR_LSB  = 14;
  localparam int unsigned COLOR_BITS = 2;

  // DMA-side address map: SPMs above 0x8000_0000, DRAM everywhere else.
  localparam addr_t SPM_HI_BASE   = 32'h8000_0000;
  localparam addr_t SPM_MID0_BASE = 32'h8020_0000;
  localparam addr_t SPM_MID1_BASE = 32'h8028_0000;

  // Core-side (HPM1) map of the two mid-criticality translator windows, 2 MB each.
  localparam addr_t HPM1_MID0_BASE = 32'hA000_0000;
  localparam addr_t HPM1_MID1_BASE = 32'hA020_0000;

  typedef enum logic {DMA_LOAD = 1'b0, DMA_UNLOAD = 1'b1} dma_op_e;

  // One DMA phase: copy len_bytes from src to dst.
  typedef struct packed {
    dma_op_e     op;
    addr_t       src;
    addr_t       dst;
    logic [23:0] len_bytes;
  } dma_cmd_t;

endpackage
