// axi_bram_ctrl: AXI4 slave that gives bus access to one BRAM bank.
//
// It serves one burst at a time, reads and writes alternating when both are
// waiting; a read burst may be accepted while the previous one is still
// draining (once its last BRAM read is issued), so back-to-back read bursts
// stream without a gap unless a write is waiting for its turn. INCR and FIXED bursts of full-width (64-bit) beats are supported;
// the bank address is the byte address modulo the bank size, divided by 8.
// Reads are pipelined through the one-cycle BRAM latency into a two-entry
// output buffer, so a read burst streams one beat per cycle while RREADY is
// high (the accelerator relies on this). Writes take one W beat per cycle
// and answer with one B response per burst. Responses are always OKAY.
//
// Timing: AR accepted -> first R beat two cycles later; then one beat per
// cycle, also across chained read bursts. The arbitration, the buffer depth and the latency are this design's
// own; the block itself is the bank controller of the block diagram.
module axi_bram_ctrl
  import axi_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 262144,
  localparam int unsigned DEPTH    = MEM_BYTES / 8,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axi_req_t          s_req,
  output axi_rsp_t          s_rsp,
  // BRAM port
  output logic              bram_en,
  output logic [STRB_W-1:0] bram_we,
  output logic [AW-1:0]     bram_addr,
  output data_t             bram_wdata,
  input  data_t             bram_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE, S_BRESP} state_e;
  state_e state;

  logic          prio_wr;        // who wins when both are waiting
  logic [AW-1:0] addr_q;
  logic [8:0]    beats_left;     // read beats still to issue to the BRAM
  logic [8:0]    out_left;       // read beats still to hand to the bus
  logic          incr_q;

  // two-entry read buffer
  data_t       buf_data [2];
  logic        buf_last [2];
  logic [1:0]  buf_cnt;
  logic        rd_ptr, wr_ptr;
  logic        inflight, inflight_last;

  logic take_ar, take_aw, issue_rd, pop, wbeat, chain_ok;

  always_comb begin
    pop     = (buf_cnt != 0) && s_req.r_ready;
    issue_rd = (state == S_READ) && (beats_left != 0) &&
               ({1'b0, buf_cnt} + {2'b0, inflight} - {2'b0, pop} < 3'd2);
    // next read burst may follow the current one directly
    chain_ok = (state == S_READ) && !s_req.aw_valid &&
               (beats_left == 0 || (beats_left == 9'd1 && issue_rd));
    take_ar = s_req.ar_valid &&
              (((state == S_IDLE) && (!s_req.aw_valid || !prio_wr)) || chain_ok);
    take_aw = (state == S_IDLE) && s_req.aw_valid && (!s_req.ar_valid || prio_wr);
    wbeat   = (state == S_WRITE) && s_req.w_valid;

    s_rsp          = AXI_RSP_IDLE;
    s_rsp.ar_ready = take_ar;
    s_rsp.aw_ready = take_aw;
    s_rsp.w_ready  = (state == S_WRITE);
    s_rsp.b_valid  = (state == S_BRESP);
    s_rsp.b.resp   = RESP_OKAY;
    s_rsp.r_valid  = (buf_cnt != 0);
    s_rsp.r.data   = buf_data[rd_ptr];
    s_rsp.r.last   = buf_last[rd_ptr];
    s_rsp.r.resp   = RESP_OKAY;

    bram_en    = issue_rd || wbeat;
    bram_we    = wbeat ? s_req.w.strb : '0;
    bram_addr  = addr_q;
    bram_wdata = s_req.w.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      prio_wr       <= 1'b0;
      addr_q        <= '0;
      beats_left    <= '0;
      out_left      <= '0;
      incr_q        <= 1'b1;
      buf_cnt       <= '0;
      rd_ptr        <= 1'b0;
      wr_ptr        <= 1'b0;
      inflight      <= 1'b0;
      inflight_last <= 1'b0;
      for (int i = 0; i < 2; i++) begin
        buf_data[i] <= '0;
        buf_last[i] <= 1'b0;
      end
    end else begin
      // read data returning from the BRAM goes into the buffer
      inflight      <= issue_rd;
      inflight_last <= issue_rd && (beats_left == 9'd1);
      if (inflight) begin
        buf_data[wr_ptr] <= bram_rdata;
        buf_last[wr_ptr] <= inflight_last;
        wr_ptr           <= ~wr_ptr;
      end
      if (pop) rd_ptr <= ~rd_ptr;
      buf_cnt <= buf_cnt + {1'b0, inflight} - {1'b0, pop};

      if (issue_rd || wbeat) begin
        if (incr_q) addr_q <= addr_q + 1'b1;
        if (issue_rd) beats_left <= beats_left - 1'b1;
      end

      if (take_ar) begin
        state      <= S_READ;
        addr_q     <= s_req.ar.addr[AW+2:3];
        beats_left <= {1'b0, s_req.ar.len} + 9'd1;
        out_left   <= out_left + {1'b0, s_req.ar.len} + 9'd1 - 9'(pop);
        incr_q     <= (s_req.ar.burst != BURST_FIXED);
        prio_wr    <= 1'b1;
      end

      unique case (state)
        S_IDLE: begin
          if (take_aw) begin
            state   <= S_WRITE;
            addr_q  <= s_req.aw.addr[AW+2:3];
            incr_q  <= (s_req.aw.burst != BURST_FIXED);
            prio_wr <= 1'b0;
          end
        end
        S_READ: begin
          if (pop && !take_ar) begin
            out_left <= out_left - 1'b1;
            if (out_left == 9'd1) state <= S_IDLE;
          end
        end
        S_WRITE: if (wbeat && s_req.w.last) state <= S_BRESP;
        S_BRESP: if (s_req.b_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // only full-width beats are supported
  a_ar_size: assert property (@(posedge clk) disable iff (!rst_n)
    take_ar |-> s_req.ar.size == 3'd3);
  a_aw_size: assert property (@(posedge clk) disable iff (!rst_n)
    take_aw |-> s_req.aw.size == 3'd3);
  a_r_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_rsp.r_valid && !s_req.r_ready |=> s_rsp.r_valid && $stable(s_rsp.r));

endmodule
