// Self-checking testbench for bram_sp: random byte-masked writes and reads
// against a reference array, checking the one-cycle read latency.
module tb_bram_sp;
  localparam int unsigned DEPTH = 1024;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en;
  logic [7:0] we;
  logic [9:0] addr;
  logic [63:0] wdata, rdata;
  bram_sp #(.DEPTH(DEPTH)) dut (.*);

  logic [63:0] model [DEPTH];
  int checks = 0, failures = 0;

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    @(posedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      en <= 1; we <= 8'hFF; addr <= 10'(i); wdata <= {$urandom, $urandom};
      @(posedge clk);
      model[i] = wdata;
    end
    for (int t = 0; t < 5000; t++) begin
      logic [9:0] a;
      logic [7:0] w;
      logic [63:0] d;
      a = 10'($urandom); w = ($urandom % 2) ? 8'($urandom) : 8'h00; d = {$urandom, $urandom};
      en <= 1; we <= w; addr <= a; wdata <= d;
      @(posedge clk);
      #1;
      checks++;
      if (rdata != model[a]) begin   // read-first
        failures++;
        if (failures < 10) $display("FAIL at %0d: got %h exp %h", a, rdata, model[a]);
      end
      for (int b = 0; b < 8; b++) if (w[b]) model[a][8*b +: 8] = d[8*b +: 8];
    end
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
