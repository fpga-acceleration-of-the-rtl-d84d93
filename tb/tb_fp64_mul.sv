// Self-checking testbench for fp64_mul. Random normal operands (and a few
// special values) are pushed one per cycle; every result is compared with
// the simulator's own IEEE double product, and the latency is checked.
module tb_fp64_mul;
  localparam int unsigned LAT = 3;
  localparam int N = 4000;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [63:0] a, b, y;
  logic out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp64_mul #(.LAT(LAT)) dut (.*);

  logic [63:0] exp_q[$];
  int          issue_cyc[$];
  int          cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [63:0] rnd_normal(int emin, int emax);
    logic [63:0] v;
    v[63]    = 1'($urandom);
    v[62:52] = 11'(emin + ($urandom % (emax - emin + 1)));
    v[51:0]  = {20'($urandom), $urandom};
    return v;
  endfunction

  // reference: real product, with results in the subnormal range flushed
  function automatic logic [63:0] ref_mul(logic [63:0] x, logic [63:0] z);
    logic [63:0] r;
    if (x[62:52] == 0 || z[62:52] == 0) begin
      if (x[62:52] == 11'h7FF || z[62:52] == 11'h7FF) return 64'h7FF8_0000_0000_0000;
      return {x[63] ^ z[63], 63'b0};
    end
    r = $realtobits($bitstoreal(x) * $bitstoreal(z));
    if (r[62:52] == 11'h7FF && r[51:0] != 0) return 64'h7FF8_0000_0000_0000;
    if (r[62:52] == 0) return {r[63], 63'b0};
    return r;
  endfunction

  task automatic push(logic [63:0] x, logic [63:0] z);
    a <= x; b <= z; in_valid <= 1'b1;
    exp_q.push_back(ref_mul(x, z));
    @(posedge clk);
  endtask

  always @(posedge clk) if (rst_n && in_valid) issue_cyc.push_back(cyc);

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [63:0] e;
      int c0;
      e  = exp_q.pop_front();
      c0 = issue_cyc.pop_front();
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("MUL mismatch: got %h exp %h", y, e);
      end
      checks++;
      if (cyc - c0 != LAT) begin
        failures++;
        $display("MUL latency %0d, expected %0d", cyc - c0, LAT);
      end
    end
  end

  initial begin
    in_valid = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // specials
    push(64'h3FF0_0000_0000_0000, 64'h4000_0000_0000_0000); // 1*2
    push(64'h7FF0_0000_0000_0000, 64'hC000_0000_0000_0000); // inf*-2
    push(64'h0000_0000_0000_0000, 64'hC000_0000_0000_0000); // 0*-2
    push(64'h7FF0_0000_0000_0000, 64'h0000_0000_0000_0000); // inf*0
    push(64'h7FEF_FFFF_FFFF_FFFF, 64'h4000_0000_0000_0000); // overflow
    push(64'h3FF0_0000_0000_0001, 64'h3FF0_0000_0000_0001); // rounding
    push(64'h3FF8_0000_0000_0000, 64'h3FF8_0000_0000_0000); // 1.5*1.5
    for (int i = 0; i < N; i++) push(rnd_normal(700, 1300), rnd_normal(700, 1300));
    in_valid <= 1'b0;
    repeat (LAT + 3) @(posedge clk);
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
