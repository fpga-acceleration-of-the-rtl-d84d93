// Self-checking testbench for matvec_engine at the default 8 x 6 x 40 size.
// The engine runs against an AXI BRAM controller and a 64 kB bank whose
// contents are set up directly. Each call's lhs is compared bit for bit with
// a reference computed in the testbench with the simulator's double
// arithmetic in the same summation order, and the call's cycle count is
// checked against the one-beat-per-cycle budget. Calls use 4 kB-aligned
// arrays and arrays at odd offsets whose bursts must be split at 4 kB
// boundaries, and a back-to-back second call.
module tb_matvec_engine;
  import axi_pkg::*;
  localparam int NDF1 = 8, NDF2 = 6, NK = 40;
  localparam int NX = NDF2 * NK, NMX = NDF1 * NDF2 * NK, NL = NDF1 * NK;
  localparam int unsigned MEM_BYTES = 65536, DEPTH = MEM_BYTES / 8;
  localparam int MAX_CYCLES = 2520;   // >= 1.52 flops per cycle

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t req;
  axi_rsp_t rsp;
  logic start, idle, done;
  logic [31:0] matrix_addr, x_addr, lhs_addr;
  logic en;
  logic [7:0] we;
  logic [$clog2(DEPTH)-1:0] a;
  data_t wd, rd;

  matvec_engine dut (.clk, .rst_n, .start, .matrix_addr, .x_addr, .lhs_addr,
                     .idle, .done, .m_req(req), .m_rsp(rsp));
  axi_bram_ctrl #(.MEM_BYTES(MEM_BYTES)) ctrl (.clk, .rst_n, .s_req(req), .s_rsp(rsp),
    .bram_en(en), .bram_we(we), .bram_addr(a), .bram_wdata(wd), .bram_rdata(rd));
  bram_sp #(.DEPTH(DEPTH)) mem (.clk, .en, .we, .addr(a), .wdata(wd), .rdata(rd));

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

  function automatic logic [63:0] rnd_val();
    real v;
    v = (real'($urandom % 2000000) - 1000000.0) / 1000.0 / real'(1 + $urandom % 97);
    return $realtobits(v);
  endfunction

  task automatic run_call(int mw, int xw, int lw);   // word offsets
    real xr [NX];
    real mr [NMX];
    real acc, p;
    int t0;
    for (int i = 0; i < NX; i++) begin
      mem.mem[xw + i] = rnd_val();
      xr[i] = $bitstoreal(mem.mem[xw + i]);
    end
    for (int i = 0; i < NMX; i++) begin
      mem.mem[mw + i] = rnd_val();
      mr[i] = $bitstoreal(mem.mem[mw + i]);
    end
    matrix_addr <= 32'(mw * 8); x_addr <= 32'(xw * 8); lhs_addr <= 32'(lw * 8);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    t0 = cyc;
    do @(posedge clk); while (!done);
    $display("call took %0d cycles (%0.2f flops/cycle)", cyc - t0,
             real'(2 * NMX) / real'(cyc - t0));
    check(cyc - t0 <= MAX_CYCLES, "cycle budget");
    check(cyc - t0 >= NX + NMX, "cannot beat the read stream");
    @(posedge clk);
    for (int df = 0; df < NDF1; df++)
      for (int k = 0; k < NK; k++) begin
        acc = 0.0;
        for (int j = 0; j < NDF2; j++) begin
          p   = xr[j * NK + k] * mr[(df * NDF2 + j) * NK + k];
          acc = acc + p;
        end
        check(mem.mem[lw + df * NK + k] == $realtobits(acc),
              $sformatf("lhs[%0d][%0d] got %h exp %h", df, k, mem.mem[lw + df * NK + k], $realtobits(acc)));
      end
  endtask

  initial begin
    start = 0; matrix_addr = 0; x_addr = 0; lhs_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(idle, "idle after reset");
    run_call(0, 2048, 3072);                  // 4 kB aligned
    run_call(4096 + 37, 1024 + 501, 7000 + 3);  // unaligned, 4 kB crossings
    run_call(100, 6000, 3000);
    check(idle, "idle at end");
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
