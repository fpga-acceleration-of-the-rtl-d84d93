// matvec_ctrl_regs: the control-register slave (s_axi_AXILiteS) of one
// matrix-vector block, through which the host starts it and hands it the
// bus addresses of its three arrays.
//
// Register map (byte offsets in the block's 8 kB window, 32-bit registers):
//   0x00 CTRL    bit0 ap_start (rw), bit1 ap_done (ro, cleared when CTRL is
//                read), bit2 ap_idle (ro), bit3 ap_ready (ro),
//                bit7 auto_restart (rw); other bits read 0
//   0x04 GIER    bit0 global irq enable
//   0x08 IP_IER  bit0 enable channel 0 (ap_done), bit1 channel 1 (ap_ready)
//   0x0C IP_ISR  bit0/bit1 status of channels 0/1; writing 1 clears a bit
//   0x10 ap_return (ro) return value of the kernel (always 0)
//   0x18 matrix  (wo) address of the matrix array
//   0x20 x       (wo) address of the x array
//   0x28 lhs     (wo) address of the lhs array
// Write-only registers read as 0. The map and bit positions are those of the
// block's published register table; what a write to IP_ISR does, and the
// 64-bit bus lanes, are this design's choice.
//
// Start protocol: ap_start is set by the host; the block pulses start to the
// engine while it is idle. ap_done and ap_ready are raised when the engine
// reports done (the kernel is not pipelined across calls, so it is ready for
// new inputs when it finishes). ap_start then clears unless auto_restart is
// set, in which case the engine is started again. The host can poll ap_idle
// returning to 1, or enable the interrupt.
//
// Bus: single-beat (Lite) reads and writes on a 64-bit data bus; a register
// at offset o sits in byte lane o[2] (bits 31:0 or 63:32), read data is the
// register value in both halves. One write and one read are handled at a time;
// the response follows the address one cycle later.
module matvec_ctrl_regs
  import axi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  axi_req_t    s_req,
  output axi_rsp_t    s_rsp,
  // to/from the engine
  output logic        ap_start_pulse,
  input  logic        ap_idle,
  input  logic        ap_done,      // one-cycle pulse at the end of a call
  output logic [31:0] matrix_addr,
  output logic [31:0] x_addr,
  output logic [31:0] lhs_addr,
  output logic        irq
);

  logic ap_start_q, done_q, auto_restart_q, gie_q;
  logic [1:0] ier_q, isr_q;

  // write channel: AW and W may arrive in either order
  logic        aw_got, w_got, bvalid_q;
  logic [12:0] waddr_q;
  logic [31:0] wdata_q;
  logic [3:0]  wstrb_q;
  // read channel
  logic        rvalid_q;
  logic [31:0] rdata_q;

  logic        do_write;
  logic [12:0] wa;
  logic [31:0] wd;
  logic [3:0]  ws;

  function automatic logic [31:0] apply(logic [31:0] old, logic [31:0] v, logic [3:0] s);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[8*i +: 8] = s[i] ? v[8*i +: 8] : old[8*i +: 8];
    return r;
  endfunction

  always_comb begin
    s_rsp          = AXI_RSP_IDLE;
    s_rsp.aw_ready = !aw_got && !bvalid_q;
    s_rsp.w_ready  = !w_got && !bvalid_q;
    s_rsp.b_valid  = bvalid_q;
    s_rsp.b.resp   = RESP_OKAY;
    s_rsp.ar_ready = !rvalid_q;
    s_rsp.r_valid  = rvalid_q;
    s_rsp.r        = '{data: {rdata_q, rdata_q}, resp: RESP_OKAY, last: 1'b1};

    // the register write happens once both address and data are present
    wa = aw_got ? waddr_q : s_req.aw.addr[12:0];
    wd = w_got ? wdata_q : (wa[2] ? s_req.w.data[63:32] : s_req.w.data[31:0]);
    ws = w_got ? wstrb_q : (wa[2] ? s_req.w.strb[7:4] : s_req.w.strb[3:0]);
    do_write = !bvalid_q && (aw_got || s_req.aw_valid) && (w_got || s_req.w_valid);

    ap_start_pulse = ap_start_q && ap_idle && !(ap_done && !auto_restart_q);
    irq      = gie_q && (isr_q != 2'b00);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ap_start_q     <= 1'b0;
      done_q         <= 1'b0;
      auto_restart_q <= 1'b0;
      gie_q          <= 1'b0;
      ier_q          <= '0;
      isr_q          <= '0;
      matrix_addr    <= '0;
      x_addr         <= '0;
      lhs_addr       <= '0;
      aw_got         <= 1'b0;
      w_got          <= 1'b0;
      bvalid_q       <= 1'b0;
      waddr_q        <= '0;
      wdata_q        <= '0;
      wstrb_q        <= '0;
      rvalid_q       <= 1'b0;
      rdata_q        <= '0;
    end else begin
      // engine status
      if (ap_done) begin
        done_q <= 1'b1;
        if (!auto_restart_q) ap_start_q <= 1'b0;
        if (ier_q[0]) isr_q[0] <= 1'b1;
        if (ier_q[1]) isr_q[1] <= 1'b1;
      end

      // write channel
      if (s_req.aw_valid && s_rsp.aw_ready) begin
        aw_got  <= 1'b1;
        waddr_q <= s_req.aw.addr[12:0];
      end
      if (s_req.w_valid && s_rsp.w_ready) begin
        w_got   <= 1'b1;
        wdata_q <= wa[2] ? s_req.w.data[63:32] : s_req.w.data[31:0];
        wstrb_q <= wa[2] ? s_req.w.strb[7:4] : s_req.w.strb[3:0];
      end
      if (do_write) begin
        aw_got   <= 1'b0;
        w_got    <= 1'b0;
        bvalid_q <= 1'b1;
        unique case ({wa[12:2], 2'b00})
          13'h000: begin
            if (ws[0]) begin
              if (wd[0]) ap_start_q <= 1'b1;
              auto_restart_q <= wd[7];
            end
          end
          13'h004: if (ws[0]) gie_q <= wd[0];
          13'h008: if (ws[0]) ier_q <= wd[1:0];
          13'h00C: if (ws[0]) isr_q <= isr_q & ~wd[1:0];
          13'h018: matrix_addr <= apply(matrix_addr, wd, ws);
          13'h020: x_addr      <= apply(x_addr, wd, ws);
          13'h028: lhs_addr    <= apply(lhs_addr, wd, ws);
          default: ;
        endcase
      end
      if (bvalid_q && s_req.b_ready) bvalid_q <= 1'b0;

      // read channel
      if (s_req.ar_valid && s_rsp.ar_ready) begin
        rvalid_q <= 1'b1;
        unique case ({s_req.ar.addr[12:2], 2'b00})
          13'h000: begin
            rdata_q <= {24'b0, auto_restart_q, 3'b0, ap_done, ap_idle, done_q, ap_start_q};
            done_q  <= ap_done;    // clear on read
          end
          13'h004: rdata_q <= {31'b0, gie_q};
          13'h008: rdata_q <= {30'b0, ier_q};
          13'h00C: rdata_q <= {30'b0, isr_q};
          default: rdata_q <= '0;  // ap_return (0) and write-only registers
        endcase
      end
      if (rvalid_q && s_req.r_ready) rvalid_q <= 1'b0;
    end
  end

  // this port carries single-beat transfers only
  a_lite_ar: assert property (@(posedge clk) disable iff (!rst_n)
    s_req.ar_valid |-> s_req.ar.len == 8'd0);
  a_lite_aw: assert property (@(posedge clk) disable iff (!rst_n)
    s_req.aw_valid |-> s_req.aw.len == 8'd0);

endmodule
