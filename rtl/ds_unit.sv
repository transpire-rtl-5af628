// ds_unit: binary16alt divide / square-root unit of a TRANSPIRE tile.
//
// Only the first three PEs of the array carry this unit. It handles one
// binary16alt value (1 sign, 8 exponent, 7 mantissa bits) in the low 16 bits
// of its operands, rounds by truncation and takes 5 cycles, which is what the
// architecture specifies; the iteration scheme below is this design's own.
//
// How it works: divide and square root share one restoring iteration
// datapath (a remainder register, a subtract-and-compare, a result shift
// register). In the issue cycle (`start` high) the operands are unpacked and
// special cases (zero, infinity, NaN, negative root) are resolved. In each of
// the next three advancing cycles (`adv` high) three result bits are produced,
// nine in all: the 9-bit quotient floor(ma*2^8/mb) of the two 8-bit
// significands, or the 9-bit root floor(sqrt(R*2^7)) of the exponent-adjusted
// radicand R. In the fifth cycle `y` presents the packed result, so the PE
// writes it at the end of that cycle. Subnormals are flushed to zero.
module ds_unit (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,    // issue cycle of FDIV/FSQRT, PE advancing
  input  logic        adv,      // PE advances this cycle (no global stall)
  input  logic        is_sqrt,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] y
);
  localparam int BIAS = 127;
  localparam int STEPS_PER_CYCLE = 3;

  logic         sqrt_q;
  logic         special_q;
  logic [15:0]  special_val_q;
  logic         sign_q;
  logic signed [9:0] exp_q;          // biased exponent before normalisation
  logic [11:0]  rem_q;               // partial remainder
  logic [8:0]   res_q;               // quotient / root bits
  logic [8:0]   div_q;               // divisor significand
  logic [17:0]  rad_q;               // radicand bits still to bring down
  logic [1:0]   iter_q;              // completed iteration cycles

  // ---------------- unpack and special cases (issue cycle) ----------------
  logic        sa, sb;
  logic [7:0]  ea, eb;
  logic [6:0]  ma, mb;
  logic        nan_a, nan_b, inf_a, inf_b, zer_a, zer_b;
  logic        sp;
  logic [15:0] sp_val;
  logic signed [9:0] e_init;
  logic [17:0] rad_init;
  localparam logic [15:0] QNAN = 16'h7FC0;

  always_comb begin
    sa = a[15]; ea = a[14:7]; ma = a[6:0];
    sb = b[15]; eb = b[14:7]; mb = b[6:0];
    nan_a = (ea == 8'hFF) && (ma != 0);  inf_a = (ea == 8'hFF) && (ma == 0);
    nan_b = (eb == 8'hFF) && (mb != 0);  inf_b = (eb == 8'hFF) && (mb == 0);
    zer_a = (ea == 0);                   zer_b = (eb == 0);
    sp = 1'b1; sp_val = QNAN;
    e_init = '0; rad_init = '0;
    if (is_sqrt) begin
      if (nan_a)              sp_val = QNAN;
      else if (zer_a)         sp_val = {sa, 15'h0};
      else if (sa)            sp_val = QNAN;
      else if (inf_a)         sp_val = 16'h7F80;
      else                    sp = 1'b0;
      // unbiased exponent u = ea - 127; odd u doubles the radicand
      if (ea[0]) begin   // ea odd -> u even
        e_init   = 10'((int'(ea) - BIAS) / 2 + BIAS);
        rad_init = {3'b000, 1'b1, ma, 7'b0};
      end else begin
        e_init   = 10'((int'(ea) - BIAS - 1) / 2 + BIAS);
        rad_init = {2'b00, 1'b1, ma, 8'b0};
      end
    end else begin
      if (nan_a || nan_b || (inf_a && inf_b) || (zer_a && zer_b)) sp_val = QNAN;
      else if (inf_a || zer_b) sp_val = {sa ^ sb, 15'h7F80};
      else if (zer_a || inf_b) sp_val = {sa ^ sb, 15'h0};
      else                     sp = 1'b0;
      e_init = 10'(int'(ea) - int'(eb) + BIAS);
    end
  end

  // ---------------- shared iteration datapath ----------------
  logic [11:0] rem_n;
  logic [8:0]  res_n;
  logic [17:0] rad_n;
  always_comb begin
    logic [11:0] trial;
    logic [11:0] r;
    rem_n = rem_q; res_n = res_q; rad_n = rad_q;
    for (int s = 0; s < STEPS_PER_CYCLE; s++) begin
      if (sqrt_q) begin
        r     = {rem_n[9:0], rad_n[17:16]};
        rad_n = {rad_n[15:0], 2'b00};
        trial = {1'b0, res_n, 2'b01};
      end else begin
        r     = rem_n;
        trial = {3'b000, div_q};
      end
      if (r >= trial) begin
        r     = r - trial;
        res_n = {res_n[7:0], 1'b1};
      end else begin
        res_n = {res_n[7:0], 1'b0};
      end
      rem_n = sqrt_q ? r : {r[10:0], 1'b0};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sqrt_q <= 1'b0; special_q <= 1'b0; special_val_q <= '0; sign_q <= 1'b0;
      exp_q <= '0; rem_q <= '0; res_q <= '0; div_q <= '0; rad_q <= '0; iter_q <= '0;
    end else if (start) begin
      sqrt_q        <= is_sqrt;
      special_q     <= sp;
      special_val_q <= sp_val;
      sign_q        <= is_sqrt ? 1'b0 : (sa ^ sb);
      exp_q         <= e_init;
      rem_q         <= is_sqrt ? 12'd0 : {4'b0, 1'b1, ma};
      res_q         <= '0;
      div_q         <= {1'b0, 1'b1, mb};
      rad_q         <= rad_init;
      iter_q        <= '0;
    end else if (adv && iter_q != 2'd3) begin
      rem_q  <= rem_n;
      res_q  <= res_n;
      rad_q  <= rad_n;
      iter_q <= iter_q + 2'd1;
    end
  end

  // ---------------- pack (fifth cycle) ----------------
  logic signed [9:0] e_fin;
  logic [6:0]        m_fin;
  always_comb begin
    if (sqrt_q) begin
      e_fin = exp_q;
      m_fin = res_q[6:0];
    end else if (res_q[8]) begin
      e_fin = exp_q;
      m_fin = res_q[7:1];
    end else begin
      e_fin = exp_q - 10'sd1;
      m_fin = res_q[6:0];
    end
    if (special_q)            y = special_val_q;
    else if (e_fin <= 0)      y = {sign_q, 15'h0};
    else if (e_fin >= 255)    y = {sign_q, 8'hFE, 7'h7F};
    else                      y = {sign_q, e_fin[7:0], m_fin};
  end
endmodule
