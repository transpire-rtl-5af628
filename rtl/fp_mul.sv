// fp_mul: combinational floating-point multiplier for one SIMD slice.
//
// Parameterised on exponent width E and mantissa width M (binary16alt: 8/7,
// binary8: 5/2). The (M+1)x(M+1) significand product is truncated (round
// toward zero). Subnormal inputs count as zero, underflow flushes to a signed
// zero and overflow saturates to the largest finite value. NaN inputs and
// inf x 0 give the canonical quiet NaN.
// Timing: purely combinational.
module fp_mul #(
  parameter int unsigned E = 8,
  parameter int unsigned M = 7
) (
  input  logic [E+M:0] a,
  input  logic [E+M:0] b,
  output logic [E+M:0] y
);
  localparam logic [E-1:0] EMAX = '1;
  localparam int BIAS = (1 << (E - 1)) - 1;

  logic         sa, sb, sy;
  logic [E-1:0] ea, eb;
  logic [M-1:0] ma, mb;
  logic         nan_a, nan_b, inf_a, inf_b, zer_a, zer_b;
  logic [2*M+1:0] p;
  int           er;
  logic [M-1:0] mr;

  always_comb begin
    sa = a[E+M];  ea = a[E+M-1:M];  ma = a[M-1:0];
    sb = b[E+M];  eb = b[E+M-1:M];  mb = b[M-1:0];
    sy = sa ^ sb;
    nan_a = (ea == EMAX) && (ma != '0);
    nan_b = (eb == EMAX) && (mb != '0);
    inf_a = (ea == EMAX) && (ma == '0);
    inf_b = (eb == EMAX) && (mb == '0);
    zer_a = (ea == '0);
    zer_b = (eb == '0);
    p  = {1'b1, ma} * {1'b1, mb};
    er = int'(ea) + int'(eb) - BIAS + (p[2*M+1] ? 1 : 0);
    mr = p[2*M+1] ? p[2*M:M+1] : p[2*M-1:M];
    if (nan_a || nan_b || (inf_a && zer_b) || (inf_b && zer_a))
      y = {1'b0, EMAX, 1'b1, {(M-1){1'b0}}};
    else if (inf_a || inf_b)
      y = {sy, EMAX, {M{1'b0}}};
    else if (zer_a || zer_b || er <= 0)
      y = {sy, {(E+M){1'b0}}};
    else if (er >= int'(EMAX))
      y = {sy, EMAX - 1'b1, {M{1'b1}}};
    else
      y = {sy, er[E-1:0], mr};
  end
endmodule
