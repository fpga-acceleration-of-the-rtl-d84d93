// Self-checking testbench for axi_crossbar: two masters hammer two
// BRAM-backed slaves concurrently (each master owns half of each slave, so
// the expected contents are known), with RREADY back-pressure. Checks data,
// burst framing, that both masters really contended for one slave, and the
// DECERR answers for an unmapped address.
module tb_axi_crossbar;
  import axi_pkg::*;
  localparam int unsigned NM = 2, NS = 2;
  localparam int unsigned WORDS = 512;          // per slave (4 kB)
  localparam addr_t BASE [NS] = '{40'h0000_1000, 40'h0000_3000};
  localparam int unsigned RB [NS] = '{12, 12};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t m_req [NM];
  axi_rsp_t m_rsp [NM];
  axi_req_t s_req [NS];
  axi_rsp_t s_rsp [NS];

  axi_crossbar #(.NM(NM), .NS(NS), .BASE(BASE), .REGION_BITS(RB)) dut (.*);

  for (genvar m = 0; m < NM; m++) begin : g_m
    axi_master_bfm bfm (.clk, .req(m_req[m]), .rsp(m_rsp[m]));
  end
  for (genvar s = 0; s < NS; s++) begin : g_s
    logic en;
    logic [7:0] we;
    logic [8:0] a;
    data_t wd, rd;
    axi_bram_ctrl #(.MEM_BYTES(WORDS * 8)) ctrl (
      .clk, .rst_n, .s_req(s_req[s]), .s_rsp(s_rsp[s]),
      .bram_en(en), .bram_we(we), .bram_addr(a), .bram_wdata(wd), .bram_rdata(rd));
    bram_sp #(.DEPTH(WORDS)) mem (.clk, .en, .we, .addr(a), .wdata(wd), .rdata(rd));
  end

  data_t model [NS][WORDS];
  bit    known [NS][WORDS];
  int checks = 0, failures = 0, contention = 0, done_m = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // both masters asking for the same slave in the same cycle
  always @(posedge clk)
    if (rst_n && m_req[0].ar_valid && m_req[1].ar_valid &&
        m_req[0].ar.addr[13] == m_req[1].ar.addr[13])
      contention++;

  task automatic run_master(int m);
    data_t d[$], q[$];
    resp_e r;
    int e, s, len, w;
    for (int t = 0; t < 150; t++) begin
      s   = $urandom % NS;
      len = 1 + $urandom % 32;
      w   = m * (WORDS / 2) + $urandom % (WORDS / 2 - len);
      if ($urandom % 2) begin
        d = {};
        for (int i = 0; i < len; i++) begin
          d.push_back({$urandom, $urandom});
          model[s][w + i] = d[i];
          known[s][w + i] = 1;
        end
        case (m)
          0: g_m[0].bfm.write_burst(BASE[s] + addr_t'(w * 8), d, 8'hFF, r);
          default: g_m[1].bfm.write_burst(BASE[s] + addr_t'(w * 8), d, 8'hFF, r);
        endcase
        check(r == RESP_OKAY, "write response");
      end else begin
        case (m)
          0: g_m[0].bfm.read_burst(BASE[s] + addr_t'(w * 8), len, q, r, e);
          default: g_m[1].bfm.read_burst(BASE[s] + addr_t'(w * 8), len, q, r, e);
        endcase
        check(q.size() == len && e == 0 && r == RESP_OKAY, "read framing");
        for (int i = 0; i < len && i < q.size(); i++)
          if (known[s][w + i]) check(q[i] == model[s][w + i], "read data");
      end
    end
    done_m++;
  endtask

  initial begin
    data_t d[$], q[$];
    resp_e r;
    int e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    g_m[0].bfm.rready_pct = 70;
    g_m[1].bfm.rready_pct = 85;
    @(posedge clk);
    fork
      run_master(0);
      run_master(1);
    join
    // unmapped address: DECERR
    g_m[0].bfm.read_burst(40'h0000_8000, 4, q, r, e);
    check(q.size() == 4 && e == 0 && r == RESP_DECERR, "DECERR read");
    d = {64'h1, 64'h2, 64'h3};
    g_m[1].bfm.write_burst(40'h00_A000_0000, d, 8'hFF, r);
    check(r == RESP_DECERR, "DECERR write");
    check(contention > 0, "masters contended");
    $display("contention cycles: %0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
