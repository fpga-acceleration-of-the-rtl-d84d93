// Self-checking testbench for proc_sys_reset: release must come exactly
// 2 (synchroniser) + HOLD_CYCLES + 1 cycles after both ext_reset_in and
// dcm_locked are high, and either input going low must reset at once.
module tb_proc_sys_reset;
  localparam int unsigned HOLD = 16;
  logic slowest_sync_clk = 0;
  always #5 slowest_sync_clk = ~slowest_sync_clk;
  logic ext_reset_in, dcm_locked, interconnect_aresetn, peripheral_aresetn;
  proc_sys_reset #(.HOLD_CYCLES(HOLD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(output int n);
    n = 0;
    while (!peripheral_aresetn && n < 100) begin
      @(posedge slowest_sync_clk); #1; n++;
    end
  endtask

  initial begin
    int n;
    ext_reset_in = 0; dcm_locked = 0;
    repeat (5) @(posedge slowest_sync_clk);
    #1 check(!peripheral_aresetn && !interconnect_aresetn, "held in reset");
    ext_reset_in = 1;                       // clock not yet locked
    repeat (30) @(posedge slowest_sync_clk);
    #1 check(!peripheral_aresetn, "waits for lock");
    dcm_locked = 1;
    measure(n);
    $display("release after %0d cycles", n);
    check(n == HOLD + 3, "release delay");
    check(interconnect_aresetn, "interconnect released");
    repeat (5) @(posedge slowest_sync_clk);
    #2 ext_reset_in = 0;
    #1 check(!peripheral_aresetn && !interconnect_aresetn, "asynchronous assertion");
    @(posedge slowest_sync_clk); #1 ext_reset_in = 1;
    measure(n);
    check(n == HOLD + 3, "second release delay");
    #2 dcm_locked = 0;
    #1 check(!peripheral_aresetn, "loss of lock resets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge slowest_sync_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
