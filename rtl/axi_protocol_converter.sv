// axi_protocol_converter: AXI4 (burst) slave to AXI4-Lite (single beat)
// master, placed in front of the control-register crossbar so that the
// host may use any burst to reach the accelerators' register files.
//
// A read burst of N beats becomes N single-beat reads at consecutive
// addresses (step 2^size bytes, or the same address for FIXED bursts); each
// answer is passed up with RLAST on the N-th. A write burst becomes N
// single-beat writes, each AW with its W beat; the N write responses are
// merged (worst wins) into the one B response of the burst. One Lite
// transaction is outstanding at a time, which suits the rare, small
// register accesses it carries. The conversion scheme is this design's
// own; the block is the protocol converter of the block diagram.
module axi_protocol_converter
  import axi_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t s_req,   // AXI4 from the interconnect
  output axi_rsp_t s_rsp,
  output axi_req_t m_req,   // AXI4-Lite subset towards the slaves
  input  axi_rsp_t m_rsp
);

  typedef enum logic [1:0] {R_IDLE, R_ADDR, R_DATA} rstate_e;
  typedef enum logic [2:0] {W_IDLE, W_SEND, W_RESP, W_BRESP} wstate_e;

  rstate_e    rstate;
  ax_t        rax;
  logic [8:0] rleft;

  wstate_e    wstate;
  ax_t        wax;
  logic [8:0] wleft;
  logic       aw_sent, w_sent;
  resp_e      bresp_acc;

  function automatic addr_t next_addr(ax_t ax);
    return (ax.burst == BURST_FIXED) ? ax.addr : ax.addr + (addr_t'(1) << ax.size);
  endfunction

  always_comb begin
    s_rsp = AXI_RSP_IDLE;
    m_req = AXI_REQ_IDLE;

    // read path
    s_rsp.ar_ready = (rstate == R_IDLE);
    m_req.ar_valid = (rstate == R_ADDR);
    m_req.ar       = '{addr: rax.addr, len: 8'd0, size: rax.size, burst: BURST_INCR};
    m_req.r_ready  = (rstate == R_DATA) && s_req.r_ready;
    s_rsp.r_valid  = (rstate == R_DATA) && m_rsp.r_valid;
    s_rsp.r        = '{data: m_rsp.r.data, resp: m_rsp.r.resp, last: (rleft == 9'd1)};

    // write path
    s_rsp.aw_ready = (wstate == W_IDLE);
    m_req.aw_valid = (wstate == W_SEND) && !aw_sent;
    m_req.aw       = '{addr: wax.addr, len: 8'd0, size: wax.size, burst: BURST_INCR};
    m_req.w_valid  = (wstate == W_SEND) && !w_sent && s_req.w_valid;
    m_req.w        = '{data: s_req.w.data, strb: s_req.w.strb, last: 1'b1};
    s_rsp.w_ready  = (wstate == W_SEND) && !w_sent && m_rsp.w_ready;
    m_req.b_ready  = (wstate == W_RESP);
    s_rsp.b_valid  = (wstate == W_BRESP);
    s_rsp.b.resp   = bresp_acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate    <= R_IDLE;
      rax       <= '0;
      rleft     <= '0;
      wstate    <= W_IDLE;
      wax       <= '0;
      wleft     <= '0;
      aw_sent   <= 1'b0;
      w_sent    <= 1'b0;
      bresp_acc <= RESP_OKAY;
    end else begin
      unique case (rstate)
        R_IDLE: if (s_req.ar_valid) begin
          rax    <= s_req.ar;
          rleft  <= {1'b0, s_req.ar.len} + 9'd1;
          rstate <= R_ADDR;
        end
        R_ADDR: if (m_rsp.ar_ready) rstate <= R_DATA;
        R_DATA: if (m_rsp.r_valid && s_req.r_ready) begin
          rleft    <= rleft - 9'd1;
          rax.addr <= next_addr(rax);
          rstate   <= (rleft == 9'd1) ? R_IDLE : R_ADDR;
        end
        default: rstate <= R_IDLE;
      endcase

      unique case (wstate)
        W_IDLE: if (s_req.aw_valid) begin
          wax       <= s_req.aw;
          wleft     <= {1'b0, s_req.aw.len} + 9'd1;
          bresp_acc <= RESP_OKAY;
          aw_sent   <= 1'b0;
          w_sent    <= 1'b0;
          wstate    <= W_SEND;
        end
        W_SEND: begin
          if (m_req.aw_valid && m_rsp.aw_ready) aw_sent <= 1'b1;
          if (m_req.w_valid && m_rsp.w_ready) begin
            w_sent   <= 1'b1;
          end
          if ((aw_sent || m_rsp.aw_ready) && (w_sent || (m_req.w_valid && m_rsp.w_ready)))
            wstate <= W_RESP;
        end
        W_RESP: if (m_rsp.b_valid) begin
          bresp_acc <= resp_merge(bresp_acc, m_rsp.b.resp);
          wleft     <= wleft - 9'd1;
          wax.addr  <= next_addr(wax);
          aw_sent   <= 1'b0;
          w_sent    <= 1'b0;
          wstate    <= (wleft == 9'd1) ? W_BRESP : W_SEND;
        end
        W_BRESP: if (s_req.b_ready) wstate <= W_IDLE;
        default: wstate <= W_IDLE;
      endcase
    end
  end

  // the upstream WLAST must mark the last beat of the burst
  a_wlast: assert property (@(posedge clk) disable iff (!rst_n)
    (wstate == W_SEND) && m_req.w_valid && m_rsp.w_ready |-> s_req.w.last == (wleft == 9'd1));

endmodule
