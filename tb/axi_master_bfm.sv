// axi_master_bfm: testbench-only AXI4 master with blocking burst tasks.
// Drives with non-blocking assignments right after a rising edge and
// samples handshakes as they were at that edge, one transaction at a time.
// rready_pct sets how often RREADY is high (100 = always), so tests can
// apply back-pressure.
module axi_master_bfm
  import axi_pkg::*;
(
  input  logic     clk,
  output axi_req_t req,
  input  axi_rsp_t rsp
);
  int rready_pct = 100;
  int beats_waited = 0;   // cycles with RVALID high but RREADY low

  initial req = AXI_REQ_IDLE;

  task automatic write_burst(input addr_t addr, input data_t data[$],
                             input strb_t strb, output resp_e resp);
    req.aw_valid <= 1'b1;
    req.aw       <= '{addr: addr, len: 8'(data.size() - 1), size: 3'd3, burst: BURST_INCR};
    do @(posedge clk); while (!rsp.aw_ready);
    req.aw_valid <= 1'b0;
    foreach (data[i]) begin
      req.w_valid <= 1'b1;
      req.w       <= '{data: data[i], strb: strb, last: (i == data.size() - 1)};
      do @(posedge clk); while (!rsp.w_ready);
    end
    req.w_valid <= 1'b0;
    req.b_ready <= 1'b1;
    do @(posedge clk); while (!rsp.b_valid);
    resp = rsp.b.resp;
    req.b_ready <= 1'b0;
  endtask

  task automatic read_burst(input addr_t addr, input int beats,
                            output data_t data[$], output resp_e resp,
                            output int nlast_err);
    data = {};
    resp = RESP_OKAY;
    nlast_err = 0;
    req.ar_valid <= 1'b1;
    req.ar       <= '{addr: addr, len: 8'(beats - 1), size: 3'd3, burst: BURST_INCR};
    req.r_ready  <= ($urandom % 100) < rready_pct;
    do @(posedge clk); while (!rsp.ar_ready);
    req.ar_valid <= 1'b0;
    forever begin
      if (rsp.r_valid && req.r_ready) begin
        data.push_back(rsp.r.data);
        resp = resp_merge(resp, rsp.r.resp);
        if (rsp.r.last != (data.size() == beats)) nlast_err++;
        if (rsp.r.last) break;
      end
      if (rsp.r_valid && !req.r_ready) beats_waited++;
      req.r_ready <= ($urandom % 100) < rready_pct;
      @(posedge clk);
    end
    req.r_ready <= 1'b0;
  endtask

  task automatic write32(input addr_t addr, input logic [31:0] v);
    resp_e r;
    data_t d[$];
    d = {{v, v}};
    write_burst(addr, d, addr[2] ? 8'hF0 : 8'h0F, r);
  endtask

  task automatic read32(input addr_t addr, output logic [31:0] v);
    data_t d[$];
    resp_e r;
    int e;
    read_burst(addr, 1, d, r, e);
    v = addr[2] ? d[0][63:32] : d[0][31:0];
  endtask
endmodule
