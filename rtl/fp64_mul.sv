// fp64_mul: pipelined IEEE 754 double-precision multiplier (the "dmul"
// operator of the matrix-vector block).
//
// The product is formed exactly (53 x 53 -> 106 bits), normalised by at most
// one place and rounded to nearest, ties to even. Special operands follow
// IEEE 754: NaN in gives the canonical quiet NaN, inf * 0 gives NaN, inf * x
// gives a signed infinity, and exponent overflow gives a signed infinity.
// Subnormal numbers are not supported: subnormal operands are read as zero
// and results below the smallest normal number are flushed to a signed zero
// (a design choice; the matrix-vector data never comes near that range).
//
// Interface: in_valid/a/b are taken every cycle; out_valid/y appear LAT
// cycles later (LAT >= 1, fully pipelined, one operation per cycle). The
// arithmetic is done combinationally before a LAT-deep register chain, so
// retiming is left to synthesis. LAT is this design's choice.
module fp64_mul #(
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

  logic         sa, sb, sy;
  logic [10:0]  ea, eb;
  logic [51:0]  fa, fb;
  logic         a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic [105:0] prod;
  logic [52:0]  mant;
  logic         guard, sticky, inc;
  logic [53:0]  mant_r;
  logic signed [13:0] e;
  logic [63:0]  res;

  always_comb begin
    sa = a[63]; ea = a[62:52]; fa = a[51:0];
    sb = b[63]; eb = b[62:52]; fb = b[51:0];
    sy = sa ^ sb;
    a_nan  = (ea == 11'h7FF) && (fa != '0);
    b_nan  = (eb == 11'h7FF) && (fb != '0);
    a_inf  = (ea == 11'h7FF) && (fa == '0);
    b_inf  = (eb == 11'h7FF) && (fb == '0);
    a_zero = (ea == '0);
    b_zero = (eb == '0);

    prod = {1'b1, fa} * {1'b1, fb};
    e    = 14'(signed'({3'b0, ea})) + 14'(signed'({3'b0, eb})) - 14'sd1023;
    if (prod[105]) begin
      mant   = prod[105:53];
      guard  = prod[52];
      sticky = |prod[51:0];
      e      = e + 14'sd1;
    end else begin
      mant   = prod[104:52];
      guard  = prod[51];
      sticky = |prod[50:0];
    end
    inc    = guard & (sticky | mant[0]);
    mant_r = {1'b0, mant} + 54'(inc);
    if (mant_r[53]) begin
      mant_r = mant_r >> 1;
      e      = e + 14'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      res = QNAN;
    else if (a_inf || b_inf)
      res = {sy, 11'h7FF, 52'b0};
    else if (a_zero || b_zero)
      res = {sy, 63'b0};
    else if (e >= 14'sd2047)
      res = {sy, 11'h7FF, 52'b0};
    else if (e <= 14'sd0)
      res = {sy, 63'b0};
    else
      res = {sy, e[10:0], mant_r[51:0]};
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
