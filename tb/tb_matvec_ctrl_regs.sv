// Self-checking testbench for matvec_ctrl_regs. A bus master writes and
// reads the registers; the testbench plays the engine (it answers a start
// pulse with a done pulse some cycles later). Checks the array address
// outputs, write-only registers reading 0, the CTRL start/done/idle/ready
// protocol with clear-on-read done, auto-restart, and the interrupt path
// (GIER, IP_IER, IP_ISR with write-1-to-clear).
module tb_matvec_ctrl_regs;
  import axi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t req;
  axi_rsp_t rsp;
  logic ap_start_pulse, ap_idle, ap_done, irq;
  logic [31:0] matrix_addr, x_addr, lhs_addr;

  matvec_ctrl_regs dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp), .ap_start_pulse,
                        .ap_idle, .ap_done, .matrix_addr, .x_addr, .lhs_addr, .irq);
  axi_master_bfm bfm (.clk, .req, .rsp);

  // engine model: busy for 20 cycles per start
  int starts = 0;
  initial begin
    ap_idle = 1; ap_done = 0;
    forever begin
      @(posedge clk);
      if (rst_n && ap_start_pulse) begin
        starts++;
        ap_idle <= 0;
        repeat (20) @(posedge clk);
        ap_done <= 1; ap_idle <= 1;
        @(posedge clk);
        ap_done <= 0;
      end
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam addr_t B = 40'h00_A000_2000;

  initial begin
    logic [31:0] v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    bfm.read32(B + 0, v);
    check(v == 32'h4, $sformatf("CTRL after reset: idle only (%h)", v));
    bfm.write32(B + 'h18, 32'hB000_0000);
    bfm.write32(B + 'h20, 32'hB000_3C00);
    bfm.write32(B + 'h28, 32'hB000_4000);
    check(matrix_addr == 32'hB000_0000 && x_addr == 32'hB000_3C00 && lhs_addr == 32'hB000_4000,
          "array addresses");
    bfm.read32(B + 'h18, v); check(v == 0, "matrix is write-only");
    bfm.read32(B + 'h10, v); check(v == 0, "ap_return");
    // start, poll idle
    bfm.write32(B + 0, 32'h1);
    bfm.read32(B + 0, v);
    check(v[0] == 1 && v[2] == 0, "running: start set, not idle");
    repeat (30) @(posedge clk);
    bfm.read32(B + 0, v);
    check(v[0] == 0 && v[1] == 1 && v[2] == 1, "finished: done, idle, start cleared");
    bfm.read32(B + 0, v);
    check(v[1] == 0, "done cleared on read");
    check(starts == 1, "one start");
    // interrupt
    bfm.write32(B + 4, 32'h1);
    bfm.write32(B + 8, 32'h1);
    bfm.write32(B + 0, 32'h1);
    check(!irq, "no interrupt while running");
    repeat (30) @(posedge clk);
    check(irq, "interrupt on done");
    bfm.read32(B + 'hC, v); check(v == 32'h1, "ISR channel 0");
    bfm.write32(B + 'hC, 32'h1);
    check(!irq, "ISR cleared");
    bfm.write32(B + 4, 32'h0);
    // auto restart
    bfm.write32(B + 0, 32'h81);
    repeat (70) @(posedge clk);
    check(starts >= 4, "auto restart keeps starting");
    check(starts <= 6, "no spurious starts");
    bfm.write32(B + 0, 32'h00);
    repeat (30) @(posedge clk);
    bfm.read32(B + 0, v);
    check(v[0] == 0 && v[7] == 0 && v[2] == 1, "stops after auto restart cleared");
    $display("starts: %0d", starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
