// fp_addsub: combinational floating-point adder/subtractor for one SIMD slice.
//
// Parameterised on the exponent width E and mantissa width M, so one body
// serves the binary16alt slices (E=8, M=7) and the binary8 slices (E=5, M=2)
// of the mSFU. Computes y = a + b (sub=0) or y = a - b (sub=1).
// Rounding is truncation (toward zero): the smaller operand is aligned with
// three extra bits and a sticky bit that is subtracted on effective
// subtraction, which makes the truncated result exact. Subnormal inputs are
// read as zero and results below the normal range are flushed to zero;
// overflow saturates to the largest finite value, as round-toward-zero does.
// NaN inputs give the canonical quiet NaN; inf - inf gives NaN.
// Timing: purely combinational; the mSFU registers its operands in front.
module fp_addsub #(
  parameter int unsigned E = 8,
  parameter int unsigned M = 7
) (
  input  logic [E+M:0] a,
  input  logic [E+M:0] b,
  input  logic         sub,
  output logic [E+M:0] y
);
  localparam int unsigned W = M + 4;            // hidden + M + 3 extension bits
  localparam logic [E-1:0] EMAX = '1;

  logic         sa, sb;
  logic [E-1:0] ea, eb;
  logic [M-1:0] ma, mb;
  logic         nan_a, nan_b, inf_a, inf_b, zer_a, zer_b;

  always_comb begin
    sa = a[E+M];  ea = a[E+M-1:M];  ma = a[M-1:0];
    sb = b[E+M] ^ sub;  eb = b[E+M-1:M];  mb = b[M-1:0];
    nan_a = (ea == EMAX) && (ma != '0);
    nan_b = (eb == EMAX) && (mb != '0);
    inf_a = (ea == EMAX) && (ma == '0);
    inf_b = (eb == EMAX) && (mb == '0);
    zer_a = (ea == '0);
    zer_b = (eb == '0);
  end

  // magnitude order: x is the larger operand
  logic         sx, sy;
  logic [E-1:0] ex, ey;
  logic [M-1:0] mx, my;
  logic [E:0]   d;
  logic [2*W-1:0] sh;
  logic [W-1:0] fx, fy;
  logic         sticky;
  logic [W:0]   s;
  logic         eff_sub;
  int           lz;
  int           er;
  logic [W:0]   nrm;

  always_comb begin
    if ({ea, ma} >= {eb, mb}) begin
      sx = sa; ex = ea; mx = ma; sy = sb; ey = eb; my = mb;
    end else begin
      sx = sb; ex = eb; mx = mb; sy = sa; ey = ea; my = ma;
    end
    d       = {1'b0, ex} - {1'b0, ey};
    fx      = {1'b1, mx, 3'b000};
    sh      = {1'b1, my, 3'b000, {W{1'b0}}} >> ((int'(d) > int'(W)) ? (W + 1) : int'(d));
    fy      = sh[2*W-1:W];
    sticky  = |sh[W-1:0];
    eff_sub = sx ^ sy;
    if (eff_sub) s = {1'b0, fx} - {1'b0, fy} - {{W{1'b0}}, sticky};
    else         s = {1'b0, fx} + {1'b0, fy};
    // leading-one position
    lz = 0;
    for (int i = 0; i <= W; i++) if (s[i]) lz = W - i;
    // normalise so that the hidden bit lands in nrm[W-1]
    er  = int'(ex) + 1 - lz;
    nrm = (lz == 0) ? (s >> 1) : (s << (lz - 1));
  end

  always_comb begin
    if (nan_a || nan_b || (inf_a && inf_b && (sa != sb))) begin
      y = {1'b0, EMAX, 1'b1, {(M-1){1'b0}}};
    end else if (inf_a) begin
      y = {sa, EMAX, {M{1'b0}}};
    end else if (inf_b) begin
      y = {sb, EMAX, {M{1'b0}}};
    end else if (zer_a && zer_b) begin
      y = {sa & sb, {(E+M){1'b0}}};
    end else if (zer_a) begin
      y = {sb, eb, mb};
    end else if (zer_b) begin
      y = {sa, ea, ma};
    end else if (s == '0) begin
      y = '0;
    end else if (er <= 0) begin
      y = {sx, {(E+M){1'b0}}};
    end else if (er >= int'(EMAX)) begin
      y = {sx, EMAX - 1'b1, {M{1'b1}}};
    end else begin
      y = {sx, er[E-1:0], nrm[W-2:3]};
    end
  end
endmodule
