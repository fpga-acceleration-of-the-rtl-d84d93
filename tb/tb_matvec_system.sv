// End-to-end testbench for matvec_system at its default size (12 blocks,
// 12 banks of 256 kB), following the host driver's scheme:
//   1. fill every bank with NCOL columns' operands (x and transposed matrix)
//      through the memory region, in 64-beat bursts;
//   2. for each column, program and start all 12 blocks through the
//      register region, and while they run, read back and check the
//      previous column's results (host and accelerator then share a bank);
//   3. read back the last column.
// Every lhs element is compared bit for bit with a reference computed here
// in double arithmetic in the kernel's order. The run also checks: reset
// release after the clock locks; the first column's call time (no host
// traffic in the banks); DECERR for addresses outside the map; interrupts.
// It counts how often each mechanism of the design happened and fails if
// one never did: burst splitting in the protocol converter, host/accelerator
// contention at a bank crossbar, chained read bursts in a BRAM controller,
// RREADY back-pressure, decode errors, interrupts.
module tb_matvec_system;
  import axi_pkg::*;
  localparam int NBLK = 12;
  localparam int NDF1 = 8, NDF2 = 6, NK = 40;
  localparam int NX = NDF2 * NK, NMX = NDF1 * NDF2 * NK, NL = NDF1 * NK;
  localparam int COLW = NMX + NX + NL;            // words per column: 2480
  localparam int NCOL = 13;                        // columns per 256 kB bank
  localparam addr_t REG = 40'h00_A000_0000;
  localparam addr_t MEM = 40'h00_B000_0000;

  logic clk = 0;
  always #5 clk = ~clk;
  logic ext_resetn = 0, dcm_locked = 0;
  axi_req_t hpm0_req, hpm1_req;
  axi_rsp_t hpm0_rsp, hpm1_rsp;
  logic [NBLK-1:0] irq;

  matvec_system dut (.*);

  axi_master_bfm host_reg (.clk, .req(hpm0_req), .rsp(hpm0_rsp));
  axi_master_bfm host_mem (.clk, .req(hpm1_req), .rsp(hpm1_rsp));

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

  // ---------------- mechanism counters ----------------
  int n_split = 0, n_contention = 0, n_chain = 0, n_decerr = 0, n_irq = 0;
  logic [NBLK-1:0] irq_q = '0;
  bit counting = 0;                 // set once reset has been released
  always @(posedge clk) begin
    if (dut.u_pc.s_req.aw_valid && dut.u_pc.s_rsp.aw_ready && dut.u_pc.s_req.aw.len != 0) n_split++;
    if (dut.u_pc.s_req.ar_valid && dut.u_pc.s_rsp.ar_ready && dut.u_pc.s_req.ar.len != 0) n_split++;
    if (counting) n_irq += $countones(irq & ~irq_q);
    irq_q <= irq;
  end
  for (genvar i = 0; i < NBLK; i++) begin : g_mon
    always @(posedge clk) begin
      if ((dut.g_blk[i].bx_m_req[0].ar_valid || dut.g_blk[i].bx_m_req[0].aw_valid) &&
          (dut.g_blk[i].bx_m_req[1].ar_valid || dut.g_blk[i].bx_m_req[1].aw_valid))
        n_contention++;
      if (dut.g_blk[i].u_bram_ctrl.take_ar && dut.g_blk[i].u_bram_ctrl.chain_ok) n_chain++;
    end
  end

  // ---------------- data ----------------
  // operands are generated from a seed per (bank, column, index) so that the
  // reference needs no storage: value = f(hash)
  function automatic real operand(int b, int c, int i);
    int unsigned h;
    h = 32'h9E37_79B9 * (32'(b) * 7919 + 32'(c) * 104729 + 32'(i) + 1);
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    return (real'(h % 2000003) - 1000001.0) / real'(1 + (h >> 24));
  endfunction

  function automatic addr_t col_addr(int b, int c, int w);
    return MEM + addr_t'(b) * 40'h4_0000 + addr_t'((c * COLW + w) * 8);
  endfunction

  task automatic fill(int b, int c);
    data_t d[$];
    resp_e r;
    for (int base = 0; base < NMX + NX; base += 64) begin
      d = {};
      for (int i = base; i < base + 64 && i < NMX + NX; i++)
        d.push_back($realtobits(operand(b, c, i)));
      host_mem.write_burst(col_addr(b, c, base), d, 8'hFF, r);
      check(r == RESP_OKAY, "fill response");
    end
  endtask

  task automatic readback(int b, int c);
    data_t q[$];
    resp_e r;
    int e;
    real acc, p;
    for (int base = 0; base < NL; base += 64) begin
      host_mem.read_burst(col_addr(b, c, NMX + NX + base), 64, q, r, e);
      check(r == RESP_OKAY && e == 0 && q.size() == 64, "readback framing");
      for (int w = 0; w < 64; w++) begin
        int df, k;
        df = (base + w) / NK;
        k  = (base + w) % NK;
        acc = 0.0;
        for (int j = 0; j < NDF2; j++) begin
          p   = operand(b, c, NMX + j * NK + k) * operand(b, c, (df * NDF2 + j) * NK + k);
          acc = acc + p;
        end
        check(q[w] == $realtobits(acc), $sformatf("bank %0d column %0d lhs[%0d][%0d]", b, c, df, k));
      end
    end
  endtask

  task automatic program_and_start(int b, int c);
    addr_t ra;
    data_t d[$];
    resp_e r;
    ra = REG + addr_t'(b) * 40'h2000;
    if (b % 2 == 0) begin
      // one 3-beat burst over matrix, x, lhs (split by the protocol converter)
      d = {64'(col_addr(b, c, 0)), 64'(col_addr(b, c, NMX)), 64'(col_addr(b, c, NMX + NX))};
      host_reg.write_burst(ra + 'h18, d, 8'h0F, r);
      check(r == RESP_OKAY, "register burst");
    end else begin
      host_reg.write32(ra + 'h18, 32'(col_addr(b, c, 0)));
      host_reg.write32(ra + 'h20, 32'(col_addr(b, c, NMX)));
      host_reg.write32(ra + 'h28, 32'(col_addr(b, c, NMX + NX)));
    end
    host_reg.write32(ra, 32'h1);
  endtask

  initial begin
    int t_start [NBLK];
    int t_call;
    logic [31:0] v;
    data_t q[$];
    resp_e r;
    int e;

    // reset: host reset released first, the clock locks later
    repeat (5) @(posedge clk);
    ext_resetn = 1;
    repeat (10) @(posedge clk);
    check(!dut.per_rst_n, "held in reset until the clock locks");
    dcm_locked = 1;
    repeat (30) @(posedge clk);
    check(dut.per_rst_n && dut.ic_rst_n, "reset released");
    counting = 1;

    // interrupts on ap_done for every block
    for (int b = 0; b < NBLK; b++) begin
      host_reg.write32(REG + addr_t'(b) * 40'h2000 + 'h4, 32'h1);
      host_reg.write32(REG + addr_t'(b) * 40'h2000 + 'h8, 32'h1);
      host_reg.read32(REG + addr_t'(b) * 40'h2000, v);
      check(v == 32'h4, "block idle after reset");
    end

    // 1. fill
    for (int b = 0; b < NBLK; b++)
      for (int c = 0; c < NCOL; c++) fill(b, c);
    $display("banks filled at cycle %0d", cyc);

    // 2. run column by column, overlapping readback of the previous column
    host_mem.rready_pct = 80;
    for (int c = 0; c < NCOL; c++) begin
      fork
        begin
          for (int b = 0; b < NBLK; b++) begin
            program_and_start(b, c);
            t_start[b] = cyc;
          end
        end
        begin
          if (c > 0) for (int b = 0; b < NBLK; b++) readback(b, c - 1);
        end
      join
      for (int b = 0; b < NBLK; b++) begin
        while (!irq[b]) @(posedge clk);
        if (c == 0 && b == NBLK - 1) begin
          t_call = cyc - t_start[b];
          $display("column 0, block %0d: %0d cycles from start to interrupt", b, t_call);
          check(t_call <= 2530, "call time without host traffic");
        end
        host_reg.write32(REG + addr_t'(b) * 40'h2000 + 'hC, 32'h1);
        host_reg.read32(REG + addr_t'(b) * 40'h2000, v);
        check(v[2] && !v[0], "block idle after its call");
      end
    end
    for (int b = 0; b < NBLK; b++) readback(b, NCOL - 1);
    $display("all columns checked at cycle %0d", cyc);

    // 3. addresses outside the map
    host_mem.read_burst(MEM + 40'h30_0000, 2, q, r, e);        // past bank 11
    if (r == RESP_DECERR) n_decerr++;
    host_reg.read_burst(40'h00_C000_0000, 1, q, r, e);         // no region
    if (r == RESP_DECERR) n_decerr++;
    check(n_decerr == 2, "decode errors");

    $display("mechanisms: register bursts split=%0d bank contention cycles=%0d chained read bursts=%0d",
             n_split, n_contention, n_chain);
    $display("            RREADY stalls=%0d decode errors=%0d interrupts=%0d",
             host_mem.beats_waited, n_decerr, n_irq);
    check(n_split > 0, "protocol converter split a burst");
    check(n_contention > 0, "host and accelerator contended for a bank");
    check(n_chain > 0, "chained read bursts");
    check(host_mem.beats_waited > 0, "read back-pressure");
    check(n_irq == NBLK * NCOL, "one interrupt per call");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
