// matvec_system: the programmable-logic side of the accelerator: NBLK
// matrix-vector blocks, each with a private 256 kB BRAM bank that the host
// fills with operands and empties of results.
//
// Structure (host ports at the top, banks at the bottom):
//
//   hpm0, hpm1 (host AXI masters)
//        |
//   axi_interconnect_0 (2 x 2): 0x00_A000_0000 +256 MB register region,
//        |                       0x00_B000_0000 +256 MB memory region
//        |-- axi_protocol_converter_0 -> axi_crossbar_0 (1 x NBLK)
//        |        -> control port of block i at REG_BASE + i * 8 kB
//        |-- axi_crossbar_1 (1 x NBLK)
//                 -> bank crossbar i (2 x 1) <- memory master of block i
//                        -> axi_bram_ctrl i -> bram i at MEM_BASE + i * 256 kB
//
// A block's memory master sees only its own bank (any other address gets
// DECERR); the host sees all banks and all register windows. To run the
// kernel the host copies x and the transposed matrix into a bank, writes
// the three array addresses into the block's registers, sets ap_start,
// waits for ap_idle (or the block's irq) and copies lhs back. All blocks run
// in parallel. proc_sys_reset turns the host's reset and the clock
// generator's lock signal into the synchronous resets of the design; the
// clock generator itself lies outside (clk and dcm_locked are inputs).
//
// The block count, bank size and the address map are those of the published
// 12-block design; which crossbar carries which traffic, the 2 x 2
// interconnect and the bus widths (64-bit data, 40-bit host addresses) are
// this design's reading of its block diagram.
module matvec_system
  import axi_pkg::*;
#(
  parameter int unsigned NBLK       = 12,
  parameter int unsigned BANK_BYTES = 262144,
  parameter addr_t       REG_BASE   = 40'h00_A000_0000,
  parameter addr_t       MEM_BASE   = 40'h00_B000_0000,
  parameter int unsigned REG_BYTES  = 8192
) (
  input  logic            clk,
  input  logic            ext_resetn,   // host reset, active low
  input  logic            dcm_locked,   // clock generator locked
  input  axi_req_t        hpm0_req,
  output axi_rsp_t        hpm0_rsp,
  input  axi_req_t        hpm1_req,
  output axi_rsp_t        hpm1_rsp,
  output logic [NBLK-1:0] irq
);

  localparam int unsigned REG_BITS  = $clog2(REG_BYTES);
  localparam int unsigned BANK_BITS = $clog2(BANK_BYTES);
  localparam int unsigned REGION_BITS_TOP = 28;    // 256 MB regions

  typedef addr_t       base_arr_t [NBLK];
  typedef int unsigned bits_arr_t [NBLK];

  function automatic base_arr_t bases(addr_t base, int unsigned stride_bits);
    base_arr_t r;
    for (int i = 0; i < NBLK; i++) r[i] = base + (addr_t'(i) << stride_bits);
    return r;
  endfunction

  function automatic bits_arr_t same_bits(int unsigned b);
    bits_arr_t r;
    for (int i = 0; i < NBLK; i++) r[i] = b;
    return r;
  endfunction

  localparam addr_t       IC_BASE [2] = '{REG_BASE, MEM_BASE};
  localparam int unsigned IC_BITS [2] = '{REGION_BITS_TOP, REGION_BITS_TOP};
  localparam base_arr_t   REG_BASES = bases(REG_BASE, REG_BITS);
  localparam base_arr_t   MEM_BASES = bases(MEM_BASE, BANK_BITS);
  localparam bits_arr_t   REG_BITS_A  = same_bits(REG_BITS);
  localparam bits_arr_t   BANK_BITS_A = same_bits(BANK_BITS);

  // ---------------- reset ----------------
  logic ic_rst_n, per_rst_n;
  proc_sys_reset u_rst (
    .slowest_sync_clk     (clk),
    .ext_reset_in         (ext_resetn),
    .dcm_locked           (dcm_locked),
    .interconnect_aresetn (ic_rst_n),
    .peripheral_aresetn   (per_rst_n)
  );

  // ---------------- host interconnect ----------------
  axi_req_t ic_m_req [2];
  axi_rsp_t ic_m_rsp [2];
  axi_req_t ic_s_req [2];
  axi_rsp_t ic_s_rsp [2];

  assign ic_m_req[0] = hpm0_req;
  assign ic_m_req[1] = hpm1_req;
  assign hpm0_rsp    = ic_m_rsp[0];
  assign hpm1_rsp    = ic_m_rsp[1];

  axi_crossbar #(.NM(2), .NS(2), .BASE(IC_BASE), .REGION_BITS(IC_BITS)) u_interconnect (
    .clk, .rst_n(ic_rst_n), .m_req(ic_m_req), .m_rsp(ic_m_rsp),
    .s_req(ic_s_req), .s_rsp(ic_s_rsp));

  // ---------------- register path ----------------
  axi_req_t lite_req [1];
  axi_rsp_t lite_rsp [1];
  axi_req_t ctrl_req [NBLK];
  axi_rsp_t ctrl_rsp [NBLK];

  axi_protocol_converter u_pc (
    .clk, .rst_n(ic_rst_n), .s_req(ic_s_req[0]), .s_rsp(ic_s_rsp[0]),
    .m_req(lite_req[0]), .m_rsp(lite_rsp[0]));

  axi_crossbar #(.NM(1), .NS(NBLK), .BASE(REG_BASES), .REGION_BITS(REG_BITS_A)) u_xbar_reg (
    .clk, .rst_n(ic_rst_n), .m_req(lite_req), .m_rsp(lite_rsp),
    .s_req(ctrl_req), .s_rsp(ctrl_rsp));

  // ---------------- memory path ----------------
  axi_req_t mem_req [1];
  axi_rsp_t mem_rsp [1];
  axi_req_t host_bank_req [NBLK];
  axi_rsp_t host_bank_rsp [NBLK];

  assign mem_req[0]  = ic_s_req[1];
  assign ic_s_rsp[1] = mem_rsp[0];

  axi_crossbar #(.NM(1), .NS(NBLK), .BASE(MEM_BASES), .REGION_BITS(BANK_BITS_A)) u_xbar_mem (
    .clk, .rst_n(ic_rst_n), .m_req(mem_req), .m_rsp(mem_rsp),
    .s_req(host_bank_req), .s_rsp(host_bank_rsp));

  // ---------------- blocks and banks ----------------
  for (genvar i = 0; i < NBLK; i++) begin : g_blk
    localparam addr_t       BANK_BASE [1] = '{MEM_BASES[i]};
    localparam int unsigned BANK_RB   [1] = '{BANK_BITS};

    axi_req_t bx_m_req [2];
    axi_rsp_t bx_m_rsp [2];
    axi_req_t bx_s_req [1];
    axi_rsp_t bx_s_rsp [1];
    axi_req_t acc_req;
    axi_rsp_t acc_rsp;

    logic                         bram_en;
    logic [STRB_W-1:0]            bram_we;
    logic [$clog2(BANK_BYTES/8)-1:0] bram_addr;
    data_t                        bram_wdata, bram_rdata;

    matvec_8x6x40 u_matvec (
      .ap_clk         (clk),
      .ap_rst_n       (per_rst_n),
      .s_axi_ctrl_req (ctrl_req[i]),
      .s_axi_ctrl_rsp (ctrl_rsp[i]),
      .m_axi_bram_req (acc_req),
      .m_axi_bram_rsp (acc_rsp),
      .irq            (irq[i])
    );

    assign bx_m_req[0]      = host_bank_req[i];
    assign host_bank_rsp[i] = bx_m_rsp[0];
    assign bx_m_req[1]      = acc_req;
    assign acc_rsp          = bx_m_rsp[1];

    axi_crossbar #(.NM(2), .NS(1), .BASE(BANK_BASE), .REGION_BITS(BANK_RB)) u_xbar_bank (
      .clk, .rst_n(ic_rst_n), .m_req(bx_m_req), .m_rsp(bx_m_rsp),
      .s_req(bx_s_req), .s_rsp(bx_s_rsp));

    axi_bram_ctrl #(.MEM_BYTES(BANK_BYTES)) u_bram_ctrl (
      .clk, .rst_n(per_rst_n), .s_req(bx_s_req[0]), .s_rsp(bx_s_rsp[0]),
      .bram_en, .bram_we, .bram_addr, .bram_wdata, .bram_rdata);

    bram_sp #(.DEPTH(BANK_BYTES / 8)) u_bram (
      .clk, .en(bram_en), .we(bram_we), .addr(bram_addr),
      .wdata(bram_wdata), .rdata(bram_rdata));
  end

endmodule
