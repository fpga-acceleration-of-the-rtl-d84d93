// Shared AXI4 types for the matrix-vector accelerator.
//
// Every AXI link in the design (host ports, crossbars, BRAM controllers, the
// matrix-vector block's memory master and its control slave) uses the same
// request/response struct pair, so one crossbar module can serve all of them.
// Addresses are 40 bits wide, as on the host side of the processing system;
// masters with 32-bit pointers (the matrix-vector block) zero-extend. Data is
// 64 bits: one double per beat, as on the accelerator's memory port. No ID
// signals are carried: every slave answers in order. The AXI4-Lite links are
// the same structs restricted to single-beat transfers (len = 0).
package axi_pkg;

  localparam int unsigned ADDR_W = 40;
  localparam int unsigned DATA_W = 64;
  localparam int unsigned STRB_W = DATA_W / 8;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [STRB_W-1:0] strb_t;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } resp_e;

  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10
  } burst_e;

  // address channel (shared layout for AW and AR)
  typedef struct packed {
    addr_t      addr;
    logic [7:0] len;    // beats - 1
    logic [2:0] size;   // log2(bytes per beat)
    burst_e     burst;
  } ax_t;

  typedef struct packed {
    data_t data;
    strb_t strb;
    logic  last;
  } w_t;

  typedef struct packed {
    resp_e resp;
  } b_t;

  typedef struct packed {
    data_t data;
    resp_e resp;
    logic  last;
  } r_t;

  // master -> slave
  typedef struct packed {
    logic aw_valid;
    ax_t  aw;
    logic w_valid;
    w_t   w;
    logic b_ready;
    logic ar_valid;
    ax_t  ar;
    logic r_ready;
  } axi_req_t;

  // slave -> master
  typedef struct packed {
    logic aw_ready;
    logic w_ready;
    logic b_valid;
    b_t   b;
    logic ar_ready;
    logic r_valid;
    r_t   r;
  } axi_rsp_t;

  localparam axi_req_t AXI_REQ_IDLE = '0;
  localparam axi_rsp_t AXI_RSP_IDLE = '0;

  // worse of two responses (DECERR > SLVERR > OKAY)
  function automatic resp_e resp_merge(resp_e a, resp_e b);
    return (a > b) ? a : b;
  endfunction

endpackage
