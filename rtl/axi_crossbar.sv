// axi_crossbar: AXI4 switch from NM masters to NS address-mapped slaves.
//
// One module serves every switch of the design: the host-side interconnect
// (2 host ports to the register and memory regions), the two fan-out
// crossbars (one region to 12 blocks) and the twelve per-bank crossbars
// (host and accelerator sharing one BRAM controller).
//
// Slave s owns the addresses whose bits above REGION_BITS[s] equal those of
// BASE[s]; addresses pass through unchanged. Reads and writes are switched
// independently. Each slave serves one burst at a time: an idle slave grants
// the next requesting master in round-robin order, and stays with it until
// the last R beat (reads) or the B response (writes) has been handed over.
// A master likewise has one read and one write burst in flight through the
// switch; further address requests wait (READY low). One exception keeps
// streaming reads at full rate: while a master owns a slave's read side and
// no other master is asking for that slave, its further read bursts to the
// same slave are passed on at once (up to MAX_RD bursts in flight); the
// slave answers them in order. An address that maps
// to no slave is answered by an internal error slave: DECERR on every R beat
// of the burst, or W beats drained and a DECERR write response.
//
// Timing: the grant is registered, so an address handshake happens at the
// earliest one cycle after VALID rises; data beats then pass straight
// through (combinational VALID/READY paths). The arbitration scheme and the
// one-burst-per-slave rule are this design's choice.
module axi_crossbar
  import axi_pkg::*;
#(
  parameter int unsigned NM = 2,
  parameter int unsigned NS = 2,
  parameter addr_t       BASE        [NS] = '{default: '0},
  parameter int unsigned REGION_BITS [NS] = '{default: 32},
  parameter int unsigned MAX_RD = 8,
  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1,
  localparam int unsigned SW = $clog2(NS + 1)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t m_req [NM],   // from the masters
  output axi_rsp_t m_rsp [NM],
  output axi_req_t s_req [NS],   // to the slaves
  input  axi_rsp_t s_rsp [NS]
);

  localparam int unsigned ERR = NS;  // index of the internal error slave

  function automatic logic [SW-1:0] decode(addr_t a);
    for (int s = 0; s < NS; s++)
      if ((a >> REGION_BITS[s]) == (BASE[s] >> REGION_BITS[s])) return SW'(s);
    return SW'(ERR);
  endfunction

  logic [SW-1:0] ar_dec [NM];
  logic [SW-1:0] aw_dec [NM];

  // per-slave ownership (index NS is the error slave)
  logic          r_busy [NS+1];
  logic [MW-1:0] r_own  [NS+1];
  logic          r_adone[NS+1];   // error slave: address taken
  logic [7:0]    r_cnt  [NS];     // bursts accepted by a slave, not finished
  logic          r_other[NS];     // another master wants this slave
  logic          w_busy [NS+1];
  logic [MW-1:0] w_own  [NS+1];
  logic          w_adone[NS+1];
  logic [MW-1:0] r_rr   [NS+1];
  logic [MW-1:0] w_rr   [NS+1];
  // per-master: a burst is in flight
  logic          m_rbusy[NM];
  logic          m_wbusy[NM];
  // error slave state
  logic [8:0]    err_rleft;
  logic          err_wdata_done;

  // granting decisions for this cycle
  logic          r_gnt  [NS+1];
  logic [MW-1:0] r_gnt_m[NS+1];
  logic          w_gnt  [NS+1];
  logic [MW-1:0] w_gnt_m[NS+1];

  // handshakes per slave port (including the error slave)
  logic ar_hs [NS+1];
  logic r_hs_last [NS+1];
  logic aw_hs [NS+1];
  logic b_hs [NS+1];

  always_comb begin
    for (int m = 0; m < NM; m++) begin
      ar_dec[m] = decode(m_req[m].ar.addr);
      aw_dec[m] = decode(m_req[m].aw.addr);
    end

    // round-robin arbitration for each idle slave
    for (int s = 0; s <= NS; s++) begin
      r_gnt[s]   = 1'b0;
      r_gnt_m[s] = '0;
      w_gnt[s]   = 1'b0;
      w_gnt_m[s] = '0;
      for (int k = 0; k < NM; k++) begin
        int m;
        m = (int'(r_rr[s]) + k) % NM;
        if (!r_busy[s] && !r_gnt[s] && m_req[m].ar_valid && !m_rbusy[m] &&
            ar_dec[m] == SW'(s)) begin
          r_gnt[s]   = 1'b1;
          r_gnt_m[s] = MW'(m);
        end
        m = (int'(w_rr[s]) + k) % NM;
        if (!w_busy[s] && !w_gnt[s] && m_req[m].aw_valid && !m_wbusy[m] &&
            aw_dec[m] == SW'(s)) begin
          w_gnt[s]   = 1'b1;
          w_gnt_m[s] = MW'(m);
        end
      end
    end

  end

  // slave-side requests (from master requests and ownership only)
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      r_other[s] = 1'b0;
      for (int m = 0; m < NM; m++)
        if (MW'(m) != r_own[s] && m_req[m].ar_valid && ar_dec[m] == SW'(s)) r_other[s] = 1'b1;
      s_req[s] = AXI_REQ_IDLE;
      s_req[s].ar       = m_req[r_own[s]].ar;
      s_req[s].ar_valid = r_busy[s] && m_req[r_own[s]].ar_valid &&
                          ar_dec[r_own[s]] == SW'(s) &&
                          (r_cnt[s] == 0 || (!r_other[s] && r_cnt[s] < 8'(MAX_RD)));
      s_req[s].r_ready  = r_busy[s] && m_req[r_own[s]].r_ready;
      s_req[s].aw       = m_req[w_own[s]].aw;
      s_req[s].aw_valid = w_busy[s] && !w_adone[s] && m_req[w_own[s]].aw_valid;
      s_req[s].w        = m_req[w_own[s]].w;
      s_req[s].w_valid  = w_busy[s] && m_req[w_own[s]].w_valid;
      s_req[s].b_ready  = w_busy[s] && m_req[w_own[s]].b_ready;
    end

  end

  // master-side responses
  always_comb begin
    for (int m = 0; m < NM; m++) m_rsp[m] = AXI_RSP_IDLE;
    for (int s = 0; s < NS; s++) begin
      if (r_busy[s]) begin
        m_rsp[r_own[s]].ar_ready = s_req[s].ar_valid && s_rsp[s].ar_ready;
        m_rsp[r_own[s]].r_valid  = s_rsp[s].r_valid;
        m_rsp[r_own[s]].r        = s_rsp[s].r;
      end
      if (w_busy[s]) begin
        m_rsp[w_own[s]].aw_ready = !w_adone[s] && s_rsp[s].aw_ready;
        m_rsp[w_own[s]].w_ready  = s_rsp[s].w_ready;
        m_rsp[w_own[s]].b_valid  = s_rsp[s].b_valid;
        m_rsp[w_own[s]].b        = s_rsp[s].b;
      end
    end
    // error slave
    if (r_busy[ERR]) begin
      m_rsp[r_own[ERR]].ar_ready = !r_adone[ERR];
      m_rsp[r_own[ERR]].r_valid  = r_adone[ERR];
      m_rsp[r_own[ERR]].r        = '{data: '0, resp: RESP_DECERR, last: (err_rleft == 9'd1)};
    end
    if (w_busy[ERR]) begin
      m_rsp[w_own[ERR]].aw_ready = !w_adone[ERR];
      m_rsp[w_own[ERR]].w_ready  = w_adone[ERR] && !err_wdata_done;
      m_rsp[w_own[ERR]].b_valid  = err_wdata_done;
      m_rsp[w_own[ERR]].b        = '{resp: RESP_DECERR};
    end
  end

  // handshakes seen on each slave port
  always_comb begin

    for (int s = 0; s < NS; s++) begin
      ar_hs[s]     = s_req[s].ar_valid && s_rsp[s].ar_ready;
      r_hs_last[s] = s_req[s].r_ready && s_rsp[s].r_valid && s_rsp[s].r.last;
      aw_hs[s]     = s_req[s].aw_valid && s_rsp[s].aw_ready;
      b_hs[s]      = s_req[s].b_ready && s_rsp[s].b_valid;
    end
    ar_hs[ERR]     = r_busy[ERR] && !r_adone[ERR] && m_req[r_own[ERR]].ar_valid;
    r_hs_last[ERR] = r_busy[ERR] && r_adone[ERR] && m_req[r_own[ERR]].r_ready &&
                     (err_rleft == 9'd1);
    aw_hs[ERR]     = w_busy[ERR] && !w_adone[ERR] && m_req[w_own[ERR]].aw_valid;
    b_hs[ERR]      = w_busy[ERR] && err_wdata_done && m_req[w_own[ERR]].b_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) r_cnt[s] <= '0;
      for (int s = 0; s <= NS; s++) begin
        r_busy[s] <= 1'b0; r_own[s] <= '0; r_adone[s] <= 1'b0; r_rr[s] <= '0;
        w_busy[s] <= 1'b0; w_own[s] <= '0; w_adone[s] <= 1'b0; w_rr[s] <= '0;
      end
      for (int m = 0; m < NM; m++) begin
        m_rbusy[m] <= 1'b0;
        m_wbusy[m] <= 1'b0;
      end
      err_rleft      <= '0;
      err_wdata_done <= 1'b0;
    end else begin
      for (int s = 0; s <= NS; s++) begin
        // read side
        if (r_gnt[s]) begin
          r_busy[s]           <= 1'b1;
          r_own[s]            <= r_gnt_m[s];
          r_adone[s]          <= 1'b0;
          r_rr[s]             <= MW'((int'(r_gnt_m[s]) + 1) % NM);
          m_rbusy[r_gnt_m[s]] <= 1'b1;
        end else if (r_busy[s]) begin
          if (ar_hs[s]) r_adone[s] <= 1'b1;
          if (s == ERR) begin
            if (r_hs_last[s]) begin
              r_busy[s]         <= 1'b0;
              m_rbusy[r_own[s]] <= 1'b0;
            end
          end else if (r_hs_last[s] && !ar_hs[s] && r_cnt[s] == 8'd1) begin
            r_busy[s]         <= 1'b0;
            m_rbusy[r_own[s]] <= 1'b0;
          end
        end
        if (s < NS)
          r_cnt[s] <= r_cnt[s] + 8'(ar_hs[s]) - 8'(r_hs_last[s]);
        // write side
        if (w_gnt[s]) begin
          w_busy[s]           <= 1'b1;
          w_own[s]            <= w_gnt_m[s];
          w_adone[s]          <= 1'b0;
          w_rr[s]             <= MW'((int'(w_gnt_m[s]) + 1) % NM);
          m_wbusy[w_gnt_m[s]] <= 1'b1;
        end else if (w_busy[s]) begin
          if (aw_hs[s]) w_adone[s] <= 1'b1;
          if (b_hs[s]) begin
            w_busy[s]         <= 1'b0;
            m_wbusy[w_own[s]] <= 1'b0;
          end
        end
      end
      // error slave beat counting
      if (ar_hs[ERR]) err_rleft <= {1'b0, m_req[r_own[ERR]].ar.len} + 9'd1;
      else if (r_busy[ERR] && r_adone[ERR] && m_req[r_own[ERR]].r_ready)
        err_rleft <= err_rleft - 9'd1;
      if (w_busy[ERR] && w_adone[ERR] && !err_wdata_done &&
          m_req[w_own[ERR]].w_valid && m_req[w_own[ERR]].w.last)
        err_wdata_done <= 1'b1;
      else if (b_hs[ERR])
        err_wdata_done <= 1'b0;
    end
  end

  // a master must hold its address stable until it is accepted
  for (genvar m = 0; m < NM; m++) begin : g_chk
    a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
      m_req[m].ar_valid && !m_rsp[m].ar_ready |=> m_req[m].ar_valid && $stable(m_req[m].ar));
    a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
      m_req[m].aw_valid && !m_rsp[m].aw_ready |=> m_req[m].aw_valid && $stable(m_req[m].aw));
  end

endmodule
