// msfu: mini-smallFloat unit of a TRANSPIRE processing element.
//
// The 32-bit datapath holds either two binary16alt values (1 sign, 8 exponent,
// 7 mantissa bits; lanes [15:0] and [31:16]) or four binary8 values (1/5/2;
// lanes of 8 bits). Two binary16alt slices and four binary8 slices perform
// SIMD add, subtract and multiply; float-absolute and float-less-than work on
// one IEEE-754 binary32 value and are shared by all slices. These are the
// unit's slice counts, formats and latencies as the architecture defines them.
//
// Timing: add/sub/mul take 2 cycles and are not pipelined: operands are
// registered when `start` is high (the issue cycle of the instruction) and
// `y` carries the result throughout the following cycle. abs and less-than
// take 1 cycle: `y` and `lt` follow `a`/`b` combinationally while `op` names
// them. `start` must only be high while the PE advances.
// This design's own choices: truncation rounding for the arithmetic slices,
// subnormal flush-to-zero, compare result 1/0 in y[0] and on `lt`.
module msfu
  import transpire_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  opcode_e     op,
  input  fmt_e        fmt,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        lt
);
  // operand registers of the 2-cycle operators
  opcode_e     op_q;
  fmt_e        fmt_q;
  logic [31:0] a_q, b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q <= OP_NOP; fmt_q <= FMT_W32; a_q <= '0; b_q <= '0;
    end else if (start && (op == OP_FADD || op == OP_FSUB || op == OP_FMUL)) begin
      op_q <= op; fmt_q <= fmt; a_q <= a; b_q <= b;
    end
  end

  // 2 x binary16alt slices
  logic [15:0] h_add [2];
  logic [15:0] h_mul [2];
  for (genvar i = 0; i < 2; i++) begin : g_h
    fp_addsub #(.E(8), .M(7)) u_add (.a(a_q[16*i +: 16]), .b(b_q[16*i +: 16]),
                                     .sub(op_q == OP_FSUB), .y(h_add[i]));
    fp_mul    #(.E(8), .M(7)) u_mul (.a(a_q[16*i +: 16]), .b(b_q[16*i +: 16]), .y(h_mul[i]));
  end

  // 4 x binary8 slices
  logic [7:0] q_add [4];
  logic [7:0] q_mul [4];
  for (genvar i = 0; i < 4; i++) begin : g_b
    fp_addsub #(.E(5), .M(2)) u_add (.a(a_q[8*i +: 8]), .b(b_q[8*i +: 8]),
                                     .sub(op_q == OP_FSUB), .y(q_add[i]));
    fp_mul    #(.E(5), .M(2)) u_mul (.a(a_q[8*i +: 8]), .b(b_q[8*i +: 8]), .y(q_mul[i]));
  end

  // shared binary32 operators
  logic a_nan, b_nan, both_zero;
  always_comb begin
    a_nan     = (a[30:23] == 8'hFF) && (a[22:0] != '0);
    b_nan     = (b[30:23] == 8'hFF) && (b[22:0] != '0);
    both_zero = (a[30:0] == '0) && (b[30:0] == '0);
    if (a_nan || b_nan || both_zero)  lt = 1'b0;
    else if (a[31] != b[31])          lt = a[31];
    else if (!a[31])                  lt = a[30:0] < b[30:0];
    else                              lt = a[30:0] > b[30:0];
  end

  always_comb begin
    y = '0;
    case (op)
      OP_FABS: y = {1'b0, a[30:0]};
      OP_FLT:  y = {31'b0, lt};
      default: begin
        unique case (fmt_q)
          FMT_B8:
            y = (op_q == OP_FMUL) ? {q_mul[3], q_mul[2], q_mul[1], q_mul[0]}
                                  : {q_add[3], q_add[2], q_add[1], q_add[0]};
          default:
            y = (op_q == OP_FMUL) ? {h_mul[1], h_mul[0]} : {h_add[1], h_add[0]};
        endcase
      end
    endcase
  end
endmodule
