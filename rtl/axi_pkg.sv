// Simplified AXI4 memory-mapped bus types shared by every bus port of the design.
//
// One request struct (master to slave) and one response struct (slave to master)
// carry the five AXI4 channels with their valid/ready handshakes. The subset kept
// is what the scratchpad path needs: a single transaction ID, INCR bursts only,
// full-width beats (AxSIZE fixed to the data width), byte strobes on writes and
// OKAY/DECERR responses. Widths are this design's choice: 32-bit addresses and a
// 64-bit data path.
package axi_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 64;
  localparam int unsigned STRB_W = DATA_W / 8;
  localparam int unsigned BEAT_BYTES = DATA_W / 8;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [STRB_W-1:0] strb_t;
  typedef logic [7:0]        len_t;   // beats - 1, as in AXI4

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_DECERR = 2'b11;

  typedef struct packed {
    addr_t addr;
    len_t  len;
  } ax_t;

  typedef struct packed {
    data_t data;
    strb_t strb;
    logic  last;
  } w_t;

  typedef struct packed {
    data_t      data;
    logic [1:0] resp;
    logic       last;
  } r_t;

  typedef struct packed {
    ax_t  aw;
    logic aw_valid;
    w_t   w;
    logic w_valid;
    logic b_ready;
    ax_t  ar;
    logic ar_valid;
    logic r_ready;
  } req_t;

  typedef struct packed {
    logic       aw_ready;
    logic       w_ready;
    logic [1:0] b_resp;
    logic       b_valid;
    logic       ar_ready;
    r_t         r;
    logic       r_valid;
  } resp_t;

endpackage
