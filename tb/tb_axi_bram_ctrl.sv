// Self-checking testbench for axi_bram_ctrl with a bram_sp bank behind it.
// Random write bursts (random byte strobes) and read bursts with random
// RREADY back-pressure are checked against a reference memory; a full-speed
// 64-beat read must stream one beat per cycle (finished within 64 + 3
// cycles of the address handshake).
module tb_axi_bram_ctrl;
  import axi_pkg::*;
  localparam int unsigned MEM_BYTES = 8192;
  localparam int unsigned DEPTH = MEM_BYTES / 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t req;
  axi_rsp_t rsp;
  logic                     bram_en;
  logic [7:0]               bram_we;
  logic [$clog2(DEPTH)-1:0] bram_addr;
  data_t                    bram_wdata, bram_rdata;

  axi_bram_ctrl #(.MEM_BYTES(MEM_BYTES)) dut (
    .clk, .rst_n, .s_req(req), .s_rsp(rsp),
    .bram_en, .bram_we, .bram_addr, .bram_wdata, .bram_rdata);
  bram_sp #(.DEPTH(DEPTH)) mem (
    .clk, .en(bram_en), .we(bram_we), .addr(bram_addr), .wdata(bram_wdata), .rdata(bram_rdata));
  axi_master_bfm bfm (.clk, .req, .rsp);

  data_t model [DEPTH];
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

  initial begin
    data_t d[$], q[$];
    resp_e r;
    int e, w, len, t0;
    strb_t s;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // fill the whole bank
    for (int base = 0; base < DEPTH; base += 64) begin
      d = {};
      for (int i = 0; i < 64; i++) begin
        d.push_back({$urandom, $urandom});
        model[base + i] = d[i];
      end
      bfm.write_burst(addr_t'(base * 8), d, 8'hFF, r);
      check(r == RESP_OKAY, "write resp");
    end
    // random partial writes
    for (int t = 0; t < 60; t++) begin
      len = 1 + $urandom % 64;
      w   = $urandom % (DEPTH - len);
      s   = 8'($urandom);
      d = {};
      for (int i = 0; i < len; i++) begin
        d.push_back({$urandom, $urandom});
        for (int b = 0; b < 8; b++)
          if (s[b]) model[w + i][8*b +: 8] = d[i][8*b +: 8];
      end
      bfm.write_burst(addr_t'(w * 8), d, s, r);
      check(r == RESP_OKAY, "write resp");
    end
    // random reads under back-pressure
    bfm.rready_pct = 60;
    for (int t = 0; t < 80; t++) begin
      len = 1 + $urandom % 64;
      w   = $urandom % (DEPTH - len);
      bfm.read_burst(addr_t'(w * 8), len, q, r, e);
      check(q.size() == len && e == 0 && r == RESP_OKAY, "read framing");
      for (int i = 0; i < len && i < q.size(); i++)
        check(q[i] == model[w + i], $sformatf("read data at word %0d", w + i));
    end
    check(bfm.beats_waited > 0, "back-pressure happened");
    // full-rate burst
    bfm.rready_pct = 100;
    t0 = cyc;
    bfm.read_burst(addr_t'(512), 64, q, r, e);
    $display("64-beat read took %0d cycles", cyc - t0);
    check(cyc - t0 <= 64 + 3, "one beat per cycle");
    for (int i = 0; i < 64; i++) check(q[i] == model[64 + i], "burst data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
