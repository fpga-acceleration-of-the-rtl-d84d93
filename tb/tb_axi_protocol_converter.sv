// Self-checking testbench for axi_protocol_converter. An AXI4 master sends
// bursts through the converter, a one-slave crossbar and a BRAM controller.
// Checks the data, that every downstream transfer is a single beat, that an
// N-beat burst becomes exactly N downstream transfers, and that an error
// from an unmapped address comes back merged into the burst's response.
module tb_axi_protocol_converter;
  import axi_pkg::*;
  localparam int unsigned WORDS = 512;
  localparam addr_t BASE [1] = '{40'h0};
  localparam int unsigned RB [1] = '{12};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t up_req, lite_req, mem_req;
  axi_rsp_t up_rsp, lite_rsp, mem_rsp;
  axi_req_t x_m_req [1];
  axi_rsp_t x_m_rsp [1];
  axi_req_t x_s_req [1];
  axi_rsp_t x_s_rsp [1];

  axi_master_bfm bfm (.clk, .req(up_req), .rsp(up_rsp));
  axi_protocol_converter dut (.clk, .rst_n, .s_req(up_req), .s_rsp(up_rsp),
                              .m_req(lite_req), .m_rsp(lite_rsp));
  assign x_m_req[0] = lite_req;
  assign lite_rsp   = x_m_rsp[0];
  axi_crossbar #(.NM(1), .NS(1), .BASE(BASE), .REGION_BITS(RB)) xbar (
    .clk, .rst_n, .m_req(x_m_req), .m_rsp(x_m_rsp), .s_req(x_s_req), .s_rsp(x_s_rsp));
  assign mem_req    = x_s_req[0];
  assign x_s_rsp[0] = mem_rsp;

  logic en;
  logic [7:0] we;
  logic [8:0] a;
  data_t wd, rd;
  axi_bram_ctrl #(.MEM_BYTES(WORDS * 8)) ctrl (.clk, .rst_n, .s_req(mem_req), .s_rsp(mem_rsp),
    .bram_en(en), .bram_we(we), .bram_addr(a), .bram_wdata(wd), .bram_rdata(rd));
  bram_sp #(.DEPTH(WORDS)) mem (.clk, .en, .we, .addr(a), .wdata(wd), .rdata(rd));

  int checks = 0, failures = 0;
  int n_ar = 0, n_aw = 0, bad_len = 0;
  always @(posedge clk) if (rst_n) begin
    if (lite_req.ar_valid && lite_rsp.ar_ready) begin
      n_ar++;
      if (lite_req.ar.len != 0) bad_len++;
    end
    if (lite_req.aw_valid && lite_rsp.aw_ready) begin
      n_aw++;
      if (lite_req.aw.len != 0) bad_len++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  data_t model [WORDS];

  initial begin
    data_t d[$], q[$];
    resp_e r;
    int e, len, w, ar0, aw0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < WORDS; i += 16) begin
      d = {};
      for (int k = 0; k < 16; k++) begin
        d.push_back({$urandom, $urandom});
        model[i + k] = d[k];
      end
      bfm.write_burst(addr_t'(i * 8), d, 8'hFF, r);
    end
    bfm.rready_pct = 70;
    for (int t = 0; t < 100; t++) begin
      len = 1 + $urandom % 16;
      w   = $urandom % (WORDS - len);
      if ($urandom % 2) begin
        d = {};
        for (int k = 0; k < len; k++) begin
          d.push_back({$urandom, $urandom});
          model[w + k] = d[k];
        end
        aw0 = n_aw;
        bfm.write_burst(addr_t'(w * 8), d, 8'hFF, r);
        check(r == RESP_OKAY, "write response");
        check(n_aw - aw0 == len, "one Lite write per beat");
      end else begin
        ar0 = n_ar;
        bfm.read_burst(addr_t'(w * 8), len, q, r, e);
        check(q.size() == len && e == 0 && r == RESP_OKAY, "read framing");
        check(n_ar - ar0 == len, "one Lite read per beat");
        for (int k = 0; k < len && k < q.size(); k++) check(q[k] == model[w + k], "read data");
      end
    end
    check(bad_len == 0, "downstream transfers are single beats");
    // burst running off the mapped region: last two beats fail
    d = {64'h11, 64'h22, 64'h33, 64'h44};
    bfm.write_burst(40'h0FF0, d, 8'hFF, r);
    check(r == RESP_DECERR, "merged write error");
    bfm.read_burst(40'h0FF0, 4, q, r, e);
    check(r == RESP_DECERR && q.size() == 4 && q[0] == 64'h11 && q[1] == 64'h22, "merged read error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
