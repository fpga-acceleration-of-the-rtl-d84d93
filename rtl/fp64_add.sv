// fp64_add: pipelined IEEE 754 double-precision adder (the "dadd" operator
// of the matrix-vector block).
//
// Classic single-path adder: the operands are ordered by magnitude, the
// smaller significand is aligned right with guard, round and sticky bits,
// added or subtracted, renormalised (leading-zero count for cancellation)
// and rounded to nearest, ties to even. Special operands follow IEEE 754
// (NaN propagation as the canonical quiet NaN, inf - inf = NaN, signed
// zeros: x + (-x) = +0, (-0) + (-0) = -0). Subnormals are not supported:
// subnormal operands are read as zero and results below the smallest normal
// number are flushed to zero (a design choice, as in fp64_mul).
//
// Interface: in_valid/a/b every cycle; out_valid/y LAT cycles later
// (LAT >= 1, one operation per cycle). LAT is this design's choice.
module fp64_add #(
  parameter int unsigned LAT = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic        out_valid,
  output logic [63:0] y
);

  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic [63:0] bgr, sml;
  logic        s_big, s_small;
  logic [10:0] e_big, e_small;
  logic [11:0] d;
  logic [55:0] m_big, m_small, m_sh, lost_mask;
  logic        sticky;
  logic [56:0] sum;
  logic [55:0] s;
  logic [5:0]  lz;
  logic signed [13:0] e;
  logic [52:0] mant;
  logic        inc;
  logic [53:0] mant_r;
  logic [63:0] res;

  always_comb begin
    a_nan  = (a[62:52] == 11'h7FF) && (a[51:0] != '0);
    b_nan  = (b[62:52] == 11'h7FF) && (b[51:0] != '0);
    a_inf  = (a[62:52] == 11'h7FF) && (a[51:0] == '0);
    b_inf  = (b[62:52] == 11'h7FF) && (b[51:0] == '0);
    a_zero = (a[62:52] == '0);
    b_zero = (b[62:52] == '0);

    // order by magnitude
    if (a[62:0] >= b[62:0]) begin
      bgr = a; sml = b;
    end else begin
      bgr = b; sml = a;
    end
    s_big   = bgr[63];
    s_small = sml[63];
    e_big   = bgr[62:52];
    e_small = sml[62:52];
    d       = {1'b0, e_big} - {1'b0, e_small};

    m_big   = {1'b1, bgr[51:0], 3'b000};
    m_small = {1'b1, sml[51:0], 3'b000};
    if (d >= 12'd56) begin
      lost_mask = '1;
      m_sh      = '0;
    end else begin
      lost_mask = (56'd1 << d[5:0]) - 56'd1;
      m_sh      = m_small >> d[5:0];
    end
    sticky  = |(m_small & lost_mask);
    m_sh[0] = m_sh[0] | sticky;

    if (s_big == s_small) sum = {1'b0, m_big} + {1'b0, m_sh};
    else                  sum = {1'b0, m_big} - {1'b0, m_sh};

    e = 14'(signed'({3'b0, e_big}));
    if (sum[56]) begin
      s = {sum[56:2], sum[1] | sum[0]};
      e = e + 14'sd1;
    end else begin
      s = sum[55:0];
    end

    // renormalise after cancellation
    lz = 6'd0;
    for (int i = 55; i >= 0; i--) begin
      if (s[i]) begin
        lz = 6'(55 - i);
        break;
      end
    end
    s = s << lz;
    e = e - 14'(lz);

    mant   = s[55:3];
    inc    = s[2] & (s[1] | s[0] | mant[0]);
    mant_r = {1'b0, mant} + 54'(inc);
    if (mant_r[53]) begin
      mant_r = mant_r >> 1;
      e      = e + 14'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (a[63] != b[63])))
      res = QNAN;
    else if (a_inf)
      res = a;
    else if (b_inf)
      res = b;
    else if (a_zero && b_zero)
      res = {a[63] & b[63], 63'b0};
    else if (b_zero)
      res = a;
    else if (a_zero)
      res = b;
    else if (sum == '0)
      res = 64'b0;
    else if (e >= 14'sd2047)
      res = {s_big, 11'h7FF, 52'b0};
    else if (e <= 14'sd0)
      res = {s_big, 63'b0};
    else
      res = {s_big, e[10:0], mant_r[51:0]};
  end

  logic [63:0] y_pipe [LAT];
  logic        v_pipe [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin
        v_pipe[i] <= 1'b0;
        y_pipe[i] <= '0;
      end
    end else begin
      v_pipe[0] <= in_valid;
      y_pipe[0] <= res;
      for (int i = 1; i < LAT; i++) begin
        v_pipe[i] <= v_pipe[i-1];
        y_pipe[i] <= y_pipe[i-1];
      end
    end
  end

  assign out_valid = v_pipe[LAT-1];
  assign y         = y_pipe[LAT-1];

endmodule
