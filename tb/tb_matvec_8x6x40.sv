// Self-checking testbench for matvec_8x6x40, driven the way the host driver
// drives it: the three array addresses are written into the control
// registers, ap_start is set and ap_idle is polled. Memory is a BRAM
// controller and bank set up directly by the testbench. Checks every lhs
// element bit for bit against a reference computed in double arithmetic in
// the same order, the ap_done interrupt, and the run time of the call
// measured from the start write to the interrupt (within 2520 + register
// access cycles, i.e. about the 1.53 flops per cycle measured on hardware).
module tb_matvec_8x6x40;
  import axi_pkg::*;
  localparam int NDF1 = 8, NDF2 = 6, NK = 40;
  localparam int NX = NDF2 * NK, NMX = NDF1 * NDF2 * NK, NL = NDF1 * NK;
  localparam int unsigned MEM_BYTES = 262144, DEPTH = MEM_BYTES / 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t c_req, m_req;
  axi_rsp_t c_rsp, m_rsp;
  logic irq;
  logic en;
  logic [7:0] we;
  logic [$clog2(DEPTH)-1:0] a;
  data_t wd, rd;

  matvec_8x6x40 dut (.ap_clk(clk), .ap_rst_n(rst_n), .s_axi_ctrl_req(c_req),
                     .s_axi_ctrl_rsp(c_rsp), .m_axi_bram_req(m_req),
                     .m_axi_bram_rsp(m_rsp), .irq);
  axi_bram_ctrl #(.MEM_BYTES(MEM_BYTES)) ctrl (.clk, .rst_n, .s_req(m_req), .s_rsp(m_rsp),
    .bram_en(en), .bram_we(we), .bram_addr(a), .bram_wdata(wd), .bram_rdata(rd));
  bram_sp #(.DEPTH(DEPTH)) mem (.clk, .en, .we, .addr(a), .wdata(wd), .rdata(rd));
  axi_master_bfm host (.clk, .req(c_req), .rsp(c_rsp));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  localparam addr_t REG = 40'h00_A000_0000;
  localparam logic [31:0] MEM = 32'hB000_0000;

  task automatic run_call(int mw, int xw, int lw);
    real xr [NX];
    real mr [NMX];
    real acc, p;
    logic [31:0] v;
    int t0, t1;
    for (int i = 0; i < NX; i++) begin
      mem.mem[xw + i] = $realtobits(real'($urandom % 20001) / 1000.0 - 10.0);
      xr[i] = $bitstoreal(mem.mem[xw + i]);
    end
    for (int i = 0; i < NMX; i++) begin
      mem.mem[mw + i] = $realtobits(real'($urandom % 200001) / 7.0 - 14000.0);
      mr[i] = $bitstoreal(mem.mem[mw + i]);
    end
    host.write32(REG + 'h18, MEM + 32'(mw * 8));
    host.write32(REG + 'h20, MEM + 32'(xw * 8));
    host.write32(REG + 'h28, MEM + 32'(lw * 8));
    t0 = cyc;
    host.write32(REG + 'h00, 32'h1);
    do @(posedge clk); while (!irq);
    t1 = cyc;
    $display("call: %0d cycles from start write to interrupt", t1 - t0);
    check(t1 - t0 <= 2520 + 10, "call time");
    host.read32(REG + 'h00, v);
    check(v[2] && v[1] && !v[0], $sformatf("CTRL shows idle and done (%h)", v));
    host.write32(REG + 'h0C, 32'h1);
    check(!irq, "interrupt acknowledged");
    for (int df = 0; df < NDF1; df++)
      for (int k = 0; k < NK; k++) begin
        acc = 0.0;
        for (int j = 0; j < NDF2; j++) begin
          p   = xr[j * NK + k] * mr[(df * NDF2 + j) * NK + k];
          acc = acc + p;
        end
        check(mem.mem[lw + df * NK + k] == $realtobits(acc), $sformatf("lhs[%0d][%0d]", df, k));
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    host.write32(REG + 'h04, 32'h1);   // GIER
    host.write32(REG + 'h08, 32'h1);   // ap_done interrupt
    // one column's worth of data, packed as the host driver packs it
    run_call(0, NMX, NMX + NX);
    run_call(20000, 30000, 31000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
