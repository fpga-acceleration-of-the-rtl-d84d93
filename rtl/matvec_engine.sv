// matvec_engine: the datapath and memory master of one matrix-vector block.
//
// One call computes, for df < NDF1 and k < NK,
//     lhs[df][k] = sum over j < NDF2 of x[j][k] * matrix[df][j][k]
// in IEEE double precision, with the three arrays in memory at the byte
// addresses given at start. Every array is stored with k fastest
// ("k-last"): x is [NDF2][NK], lhs is [NDF1][NK], and the matrix is in the
// transposed layout [NDF1][NDF2][NK], so that every array is read or
// written strictly sequentially.
//
// Operation:
//  1. x (NDF2*NK doubles) and then the matrix (NDF1*NDF2*NK doubles) are
//     read as one sequential stream of AXI4 INCR bursts of at most MAX_BURST
//     beats, never crossing a 4 kB boundary, with up to MAX_OUTSTANDING
//     bursts requested ahead. x is kept in a local array.
//  2. Each matrix beat, as it arrives, is multiplied with the matching x
//     element (fp64_mul) and added (fp64_add) to the running sum for
//     lhs[df][k], held in a local array of NDF1*NK doubles; the j = 0 term is
//     added to 0.0, as the reference code initialises lhs to zero. The same
//     lhs element comes back only NK beats later, so an adder latency below
//     NK needs no hazard logic; one multiply and one add are started per
//     beat, i.e. up to 2 flops per cycle.
//  3. When all sums are complete, lhs is written back as a burst stream.
// The summation order (j ascending for each element) is that of the
// reference code, so results are bit-identical to a sequential double
// implementation (subnormals excepted, see fp64_mul/fp64_add).
//
// Timing: with a memory that streams one beat per cycle a call takes about
// (NDF2*NK + NDF1*NDF2*NK) + NDF1*NK cycles plus pipeline and handshake
// overheads (about 2500 cycles at the default 8 x 6 x 40). Read/write
// response codes are not checked.
//
// Loop order, transposed layout, bursts of 64 beats and 8 outstanding
// requests follow the optimised kernel of the design; streaming the matrix
// straight into the multiplier (instead of first copying each row into a
// local buffer) and the operator latencies are this design's choice.
module matvec_engine
  import axi_pkg::*;
#(
  parameter int unsigned NDF1            = 8,
  parameter int unsigned NDF2            = 6,
  parameter int unsigned NK              = 40,
  parameter int unsigned MAX_BURST       = 64,
  parameter int unsigned MAX_OUTSTANDING = 8,
  parameter int unsigned MUL_LAT         = 3,
  parameter int unsigned ADD_LAT         = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,        // pulse, accepted when idle
  input  logic [31:0] matrix_addr,
  input  logic [31:0] x_addr,
  input  logic [31:0] lhs_addr,
  output logic        idle,
  output logic        done,         // one-cycle pulse when lhs is written
  output axi_req_t    m_req,
  input  axi_rsp_t    m_rsp
);

  localparam int unsigned NX  = NDF2 * NK;
  localparam int unsigned NMX = NDF1 * NDF2 * NK;
  localparam int unsigned NL  = NDF1 * NK;
  localparam int unsigned NRD = NX + NMX;
  localparam int unsigned CW  = $clog2(NRD + 1);
  localparam int unsigned XW  = $clog2(NX);
  localparam int unsigned LW  = $clog2(NL);
  localparam int unsigned OW  = $clog2(MAX_OUTSTANDING + 1);

  if (ADD_LAT + 1 > NK) begin : g_bad_lat
    $error("adder latency must be below NK: the accumulation relies on it");
  end

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE} state_e;
  state_e state;

  logic [31:0] m_base, x_base, l_base;

  // beats of the next burst starting at byte address a with rem beats left
  function automatic logic [8:0] burst_beats(logic [31:0] a, int unsigned rem);
    int unsigned to_4k, n;
    to_4k = (4096 - int'(a[11:0])) / 8;
    n = MAX_BURST;
    if (rem < n) n = rem;
    if (to_4k < n) n = to_4k;
    return 9'(n);
  endfunction

  // ---------------- read address stream ----------------
  logic [CW-1:0] rd_req;        // beats requested so far
  logic [OW-1:0] rd_out;        // bursts requested, not yet finished
  logic          ar_valid_q;
  ax_t           ar_q;
  logic [31:0]   rd_next_addr;
  int unsigned   rd_rem;

  always_comb begin
    if (rd_req < CW'(NX)) begin
      rd_next_addr = x_base + 32'(rd_req) * 32'd8;
      rd_rem       = NX - int'(rd_req);
    end else begin
      rd_next_addr = m_base + (32'(rd_req) - 32'(NX)) * 32'd8;
      rd_rem       = NRD - int'(rd_req);
    end
  end

  // ---------------- read data / compute ----------------
  logic [CW-1:0] rd_cnt;        // beats received
  logic [XW-1:0] xi;            // j*NK + k of the current matrix beat
  logic [$clog2(NK)-1:0]   kk;
  logic [$clog2(NDF2)-1:0] jj;
  logic [LW-1:0] lrow;          // df*NK of the current matrix beat
  data_t         x1 [NX];
  data_t         l1 [NL];

  logic r_hs, mat_beat;
  assign r_hs     = (state == S_READ) && m_rsp.r_valid;
  assign mat_beat = r_hs && (rd_cnt >= CW'(NX));

  // tag pipelines alongside the operators
  logic [LW-1:0] mtag_idx   [MUL_LAT];
  logic          mtag_first [MUL_LAT];
  logic [LW-1:0] atag_idx   [ADD_LAT];

  logic  mul_v, add_v;
  data_t mul_y, add_y, addend;

  fp64_mul #(.LAT(MUL_LAT)) u_mul (
    .clk, .rst_n, .in_valid(mat_beat), .a(x1[xi]), .b(m_rsp.r.data),
    .out_valid(mul_v), .y(mul_y));

  assign addend = mtag_first[MUL_LAT-1] ? 64'h0 : l1[mtag_idx[MUL_LAT-1]];

  fp64_add #(.LAT(ADD_LAT)) u_add (
    .clk, .rst_n, .in_valid(mul_v), .a(addend), .b(mul_y),
    .out_valid(add_v), .y(add_y));

  logic [CW-1:0] adds_done;

  // ---------------- write stream ----------------
  logic [LW:0]   wr_req;        // beats covered by issued AW
  logic [OW-1:0] wr_out;        // bursts issued, B not yet received
  logic          aw_valid_q;
  ax_t           aw_q;
  logic [LW:0]   w_cnt;         // W beats sent
  logic [LW:0]   w_bstart;      // first beat of the current W burst
  logic [8:0]    w_beat;        // beat within the current W burst
  logic [8:0]    w_blen;        // length of the current W burst
  logic          w_hs, b_hs;
  logic [31:0]   wr_next_addr;

  assign wr_next_addr = l_base + 32'(wr_req) * 32'd8;
  // W bursts are cut exactly as the AW bursts are
  assign w_blen = burst_beats(l_base + 32'(w_bstart) * 32'd8, NL - int'(w_bstart));
  assign w_hs = m_req.w_valid && m_rsp.w_ready;
  assign b_hs = m_req.b_ready && m_rsp.b_valid;

  always_comb begin
    m_req          = AXI_REQ_IDLE;
    m_req.ar_valid = ar_valid_q;
    m_req.ar       = ar_q;
    m_req.r_ready  = (state == S_READ);
    m_req.aw_valid = aw_valid_q;
    m_req.aw       = aw_q;
    m_req.w_valid  = (state == S_WRITE) && (w_cnt < wr_req);
    m_req.w.data   = l1[w_cnt[LW-1:0]];
    m_req.w.strb   = '1;
    m_req.w.last   = (w_beat == w_blen - 9'd1);
    m_req.b_ready  = (state == S_WRITE);
    idle           = (state == S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      m_base      <= '0;
      x_base      <= '0;
      l_base      <= '0;
      rd_req      <= '0;
      rd_out      <= '0;
      ar_valid_q  <= 1'b0;
      ar_q        <= '0;
      rd_cnt      <= '0;
      xi          <= '0;
      kk          <= '0;
      jj          <= '0;
      lrow        <= '0;
      adds_done   <= '0;
      wr_req      <= '0;
      wr_out      <= '0;
      aw_valid_q  <= 1'b0;
      aw_q        <= '0;
      w_cnt       <= '0;
      w_bstart    <= '0;
      w_beat      <= '0;
      done        <= 1'b0;
      for (int i = 0; i < MUL_LAT; i++) begin
        mtag_idx[i]   <= '0;
        mtag_first[i] <= 1'b0;
      end
      for (int i = 0; i < ADD_LAT; i++) atag_idx[i] <= '0;
    end else begin
      done <= 1'b0;

      // tag pipelines
      mtag_idx[0]   <= lrow + LW'(kk);
      mtag_first[0] <= (jj == 0);
      for (int i = 1; i < MUL_LAT; i++) begin
        mtag_idx[i]   <= mtag_idx[i-1];
        mtag_first[i] <= mtag_first[i-1];
      end
      atag_idx[0] <= mtag_idx[MUL_LAT-1];
      for (int i = 1; i < ADD_LAT; i++) atag_idx[i] <= atag_idx[i-1];

      unique case (state)
        S_IDLE: if (start) begin
          state       <= S_READ;
          m_base      <= matrix_addr;
          x_base      <= x_addr;
          l_base      <= lhs_addr;
          rd_req      <= '0;
          rd_out      <= '0;
          rd_cnt      <= '0;
          xi          <= '0;
          kk          <= '0;
          jj          <= '0;
          lrow        <= '0;
          adds_done   <= '0;
          wr_req      <= '0;
          wr_out      <= '0;
          w_cnt       <= '0;
          w_bstart    <= '0;
          w_beat      <= '0;
        end

        S_READ: begin
          // read requests
          if (ar_valid_q && m_rsp.ar_ready) ar_valid_q <= 1'b0;
          if ((!ar_valid_q || m_rsp.ar_ready) && rd_req < CW'(NRD) &&
              (rd_out - OW'(r_hs && m_rsp.r.last)) < OW'(MAX_OUTSTANDING)) begin
            logic [8:0] n;
            n = burst_beats(rd_next_addr, rd_rem);
            ar_valid_q <= 1'b1;
            ar_q       <= '{addr: addr_t'(rd_next_addr), len: 8'(n - 9'd1),
                            size: 3'd3, burst: BURST_INCR};
            rd_req     <= rd_req + CW'(n);
            rd_out     <= rd_out + 1'b1 - OW'(r_hs && m_rsp.r.last);
          end else if (r_hs && m_rsp.r.last) begin
            rd_out <= rd_out - 1'b1;
          end

          // read data
          if (r_hs) begin
            rd_cnt <= rd_cnt + 1'b1;
            if (rd_cnt < CW'(NX)) x1[rd_cnt[XW-1:0]] <= m_rsp.r.data;
            else begin
              xi <= (xi == XW'(NX - 1)) ? '0 : xi + 1'b1;
              if (kk == ($bits(kk))'(NK - 1)) begin
                kk <= '0;
                if (jj == ($bits(jj))'(NDF2 - 1)) begin
                  jj   <= '0;
                  lrow <= lrow + LW'(NK);
                end else jj <= jj + 1'b1;
              end else kk <= kk + 1'b1;
            end
          end

          if (adds_done == CW'(NMX)) state <= S_WRITE;
        end

        S_WRITE: begin
          // write requests
          if (aw_valid_q && m_rsp.aw_ready) aw_valid_q <= 1'b0;
          if ((!aw_valid_q || m_rsp.aw_ready) && wr_req < (LW+1)'(NL) &&
              (wr_out - OW'(b_hs)) < OW'(MAX_OUTSTANDING)) begin
            logic [8:0] n;
            n = burst_beats(wr_next_addr, NL - int'(wr_req));
            aw_valid_q         <= 1'b1;
            aw_q               <= '{addr: addr_t'(wr_next_addr), len: 8'(n - 9'd1),
                                    size: 3'd3, burst: BURST_INCR};
            wr_req             <= wr_req + (LW+1)'(n);
            wr_out             <= wr_out + 1'b1 - OW'(b_hs);
          end else if (b_hs) begin
            wr_out <= wr_out - 1'b1;
          end

          // write data
          if (w_hs) begin
            w_cnt <= w_cnt + 1'b1;
            if (m_req.w.last) begin
              w_bstart <= w_cnt + 1'b1;
              w_beat   <= '0;
            end else w_beat <= w_beat + 1'b1;
          end

          // finished when the last outstanding burst is acknowledged
          if (b_hs && wr_out == OW'(1) && wr_req == (LW+1)'(NL)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end

        default: state <= S_IDLE;
      endcase

      // accumulator write-back
      if (add_v) begin
        l1[atag_idx[ADD_LAT-1]] <= add_y;
        adds_done <= adds_done + 1'b1;
      end
    end
  end

  // the read data never stalls: every R beat is consumed on arrival
  a_no_stall: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_READ) |-> m_req.r_ready);
  // W beats only for bursts whose address has been issued
  a_w_after_aw: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.w_valid |-> w_cnt < wr_req);

endmodule
