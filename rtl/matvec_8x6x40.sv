// matvec_8x6x40: one matrix-vector accelerator block of the design.
//
// It computes lhs[df][k] = sum_j x[j][k] * matrix[df][j][k] in double
// precision for NDF1 = 8 rows, NDF2 = 6 columns and NK = 40 vertical levels
// (3840 flops per call), reading its operands from and writing its result
// to memory over its own AXI4 master port, the way the host-side C kernel
// would with memcpy to and from local arrays.
//
// It is made of two parts:
//   matvec_ctrl_regs  the control slave: the host writes the three array
//                     addresses, sets ap_start in CTRL and polls ap_idle
//                     (or takes the irq);
//   matvec_engine     the burst memory master and the multiply-add pipeline.
//
// Interface: s_axi_ctrl is the single-beat control port (8 kB window, see
// matvec_ctrl_regs for the register map); m_axi_bram is a 64-bit AXI4 master
// issuing 32-bit addresses, zero-extended onto the 40-bit bus. irq is
// level, high while an enabled status bit is set and GIER is on.
// Timing: about 2500 cycles per call against a memory that streams one beat
// per cycle (see matvec_engine).
module matvec_8x6x40
  import axi_pkg::*;
#(
  parameter int unsigned NDF1            = 8,
  parameter int unsigned NDF2            = 6,
  parameter int unsigned NK              = 40,
  parameter int unsigned MAX_BURST       = 64,
  parameter int unsigned MAX_OUTSTANDING = 8,
  parameter int unsigned MUL_LAT         = 3,
  parameter int unsigned ADD_LAT         = 3
) (
  input  logic     ap_clk,
  input  logic     ap_rst_n,
  input  axi_req_t s_axi_ctrl_req,
  output axi_rsp_t s_axi_ctrl_rsp,
  output axi_req_t m_axi_bram_req,
  input  axi_rsp_t m_axi_bram_rsp,
  output logic     irq
);

  logic        start, idle, done;
  logic [31:0] matrix_addr, x_addr, lhs_addr;

  matvec_ctrl_regs u_regs (
    .clk            (ap_clk),
    .rst_n          (ap_rst_n),
    .s_req          (s_axi_ctrl_req),
    .s_rsp          (s_axi_ctrl_rsp),
    .ap_start_pulse (start),
    .ap_idle        (idle),
    .ap_done        (done),
    .matrix_addr,
    .x_addr,
    .lhs_addr,
    .irq
  );

  matvec_engine #(
    .NDF1(NDF1), .NDF2(NDF2), .NK(NK), .MAX_BURST(MAX_BURST),
    .MAX_OUTSTANDING(MAX_OUTSTANDING), .MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT)
  ) u_engine (
    .clk   (ap_clk),
    .rst_n (ap_rst_n),
    .start,
    .matrix_addr,
    .x_addr,
    .lhs_addr,
    .idle,
    .done,
    .m_req (m_axi_bram_req),
    .m_rsp (m_axi_bram_rsp)
  );

endmodule
