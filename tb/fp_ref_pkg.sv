// fp_ref_pkg: reference arithmetic for the testbenches.
//
// Converts small floating-point formats (exponent width e, mantissa width m)
// to and from SystemVerilog `real` and so gives expected results worked out
// with double precision rather than with the RTL's integer datapaths.
// Conventions match the hardware: subnormal inputs are zero, results are
// truncated toward zero, tiny results flush to signed zero, large ones
// saturate to the largest finite value. Only finite operands are handled;
// tests of infinities and NaN are written out by hand. Double precision is
// exact for products of these formats and for sums whose exponents differ by
// at most 40, which the testbenches respect.
package fp_ref_pkg;

  function automatic real fp_to_real(input logic [31:0] x, input int e, input int m);
    int  bias = (1 << (e - 1)) - 1;
    int  ex   = int'((x >> m) & ((1 << e) - 1));
    int  mn   = int'(x & ((1 << m) - 1));
    bit  s    = x[e + m];
    real v;
    if (ex == 0) v = 0.0;
    else v = (1.0 + real'(mn) / real'(1 << m)) * (2.0 ** (ex - bias));
    return s ? -v : v;
  endfunction

  function automatic logic [31:0] real_to_fp(input real r, input int e, input int m);
    logic [63:0] bits = $realtobits(r);
    int  bias = (1 << (e - 1)) - 1;
    int  emax = (1 << e) - 1;
    int  u, ex;
    logic [31:0] res;
    logic [31:0] mant;
    if (bits[62:52] == 11'd0) return 32'(bits[63]) << (e + m);
    u  = int'(bits[62:52]) - 1023;
    ex = u + bias;
    if (ex <= 0) return 32'(bits[63]) << (e + m);
    if (ex >= emax)
      return (32'(bits[63]) << (e + m)) | (32'(emax - 1) << m) | ((32'd1 << m) - 1);
    mant = 32'(bits[51:0] >> (52 - m));
    res  = (32'(bits[63]) << (e + m)) | (32'(ex) << m) | mant;
    return res;
  endfunction

  // op: 0 add, 1 sub, 2 mul, 3 div
  function automatic logic [31:0] ref_op(input int op, input logic [31:0] a, input logic [31:0] b,
                                         input int e, input int m);
    real ra = fp_to_real(a, e, m);
    real rb = fp_to_real(b, e, m);
    real r;
    case (op)
      0: r = ra + rb;
      1: r = ra - rb;
      2: r = ra * rb;
      default: r = ra / rb;
    endcase
    return real_to_fp(r, e, m);
  endfunction

  function automatic logic [31:0] ref_sqrt(input logic [31:0] a, input int e, input int m);
    real ra = fp_to_real(a, e, m);
    return real_to_fp($sqrt(ra), e, m);
  endfunction

  // random finite operand with exponent near ecentre (+/- spread)
  function automatic logic [31:0] rnd_fp(input int e, input int m, input int ecentre, input int spread);
    int emax = (1 << e) - 2;
    int ex = ecentre + int'($urandom_range(0, 2 * spread)) - spread;
    if (ex < 1) ex = 1;
    if (ex > emax) ex = emax;
    return (32'($urandom_range(0, 1)) << (e + m)) | (32'(ex) << m) | (32'($urandom) & ((32'd1 << m) - 1));
  endfunction

endpackage
