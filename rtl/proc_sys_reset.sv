// proc_sys_reset: reset generator for the programmable logic.
//
// The design is held in reset while the host's reset output (ext_reset_in,
// active low) is asserted or the clock generator reports that its clock has
// not locked (dcm_locked low). Either condition resets it at once
// (asynchronous assertion); release is synchronised to clk by a two-stage
// synchroniser and then delayed by HOLD_CYCLES clock cycles, so every block
// leaves reset on the same clean edge. Two active-low outputs are given, one
// for the interconnect and one for the peripherals (the accelerators and
// BRAM controllers); here both are released together. The synchroniser
// depth and hold time are this design's choice.
module proc_sys_reset #(
  parameter int unsigned HOLD_CYCLES = 16
) (
  input  logic slowest_sync_clk,
  input  logic ext_reset_in,        // active low
  input  logic dcm_locked,
  output logic interconnect_aresetn,
  output logic peripheral_aresetn
);

  logic       arst_n;
  logic [1:0] sync;
  logic [$clog2(HOLD_CYCLES+1)-1:0] cnt;

  assign arst_n = ext_reset_in & dcm_locked;

  always_ff @(posedge slowest_sync_clk or negedge arst_n) begin
    if (!arst_n) begin
      sync                 <= '0;
      cnt                  <= '0;
      interconnect_aresetn <= 1'b0;
      peripheral_aresetn   <= 1'b0;
    end else begin
      sync <= {sync[0], 1'b1};
      if (sync[1]) begin
        if (cnt != ($bits(cnt))'(HOLD_CYCLES)) cnt <= cnt + 1'b1;
        else begin
          interconnect_aresetn <= 1'b1;
          peripheral_aresetn   <= 1'b1;
        end
      end
    end
  end

endmodule
