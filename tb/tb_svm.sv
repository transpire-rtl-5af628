// tb_svm: workload testbench running the prediction stage of a linear
// support vector machine in binary8 on the TRANSPIRE system at its default
// size.
//
// f(x) = b + sum over s of alpha[s] * (sum over k of SV[s][k] * x[k]) for
// S = 8 support vectors of F = 8 features. Every word holds four binary8
// lanes, so PE p classifies the four test samples of its word column at
// once (32 samples in all); the support vectors, weights and bias are
// replicated across lanes. One program is broadcast to all eight PEs; the
// support-vector matrix is read through the FAGU's two-dimensional form.
// The PEs store f(x); its sign is the predicted class. Expected values come
// from reference binary8 arithmetic in the same order; the run time must
// equal the static schedule plus the counted stall cycles.
module tb_svm;
  import transpire_pkg::*;
  import transpire_asm_pkg::*;
  import fp_ref_pkg::*;

  localparam int NPE = 8, S = 8, F = 8;
  localparam logic [31:0] SV_B = 32'h0000, X_B = 32'h0400, AL_B = 32'h0800, Y_B = 32'h0C00;
  // two MOVs; S x (two MOVs, F x (LD LD FMUL FADD, ADD SLT CJMP), LD FMUL
  // FADD, ADD SLT CJMP); FADD; ST; EXIT; the done pulse
  localparam int SCHED = 2 + S * (2 + F * 11 + 6 + 3) + 2 + 1 + 1 + 1;

  logic clk = 0, rst_n = 0;
  logic ctx_we = 0, start = 0, busy, done;
  logic [9:0] ctx_waddr = 0, ctx_base = 0;
  logic [31:0] ctx_wdata = 0;
  logic h_req = 0, h_we = 0, h_gnt, h_rvalid;
  logic [3:0] h_be = 4'hF;
  logic [31:0] h_addr = 0, h_wdata = 0, h_rdata;
  int checks = 0, failures = 0;

  transpire_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int n_stall = 0, n_fmul = 0, cyc = 0, t_start = 0, t_done = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.u_array.stall) n_stall++;
    if (dut.u_dma.done) t_start = cyc;
    if (done) t_done = cyc;
    if (dut.u_array.g_row[1].g_col[2].u_pe.retire &&
        dut.u_array.g_row[1].g_col[2].u_pe.ins.op == OP_FMUL &&
        dut.u_array.g_row[1].g_col[2].u_pe.ins.fmt == FMT_B8) n_fmul++;
  end
  task automatic hwrite(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); h_req = 1; h_we = 1; h_addr = a; h_wdata = d; h_be = 4'hF;
    #1; while (!h_gnt) begin @(negedge clk); #1; end
    @(negedge clk); h_req = 0; h_we = 0;
  endtask
  task automatic hread(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); h_req = 1; h_we = 0; h_addr = a;
    #1; while (!h_gnt) begin @(negedge clk); #1; end
    @(negedge clk); h_req = 0;
    #1; d = h_rdata;
  endtask

  logic [31:0] img [$];
  task automatic rec_crf(input logic [7:0] mask, input int idx, input logic [31:0] vals [$]);
    img.push_back(hdr(0, 1, vals.size(), idx, mask));
    foreach (vals[i]) img.push_back(vals[i]);
  endtask
  task automatic rec_irf(input logic [7:0] mask, input int idx, input logic [63:0] words [$]);
    img.push_back(hdr(0, 0, words.size(), idx, mask));
    foreach (words[i]) begin img.push_back(words[i][31:0]); img.push_back(words[i][63:32]); end
  endtask

  // R1 = s, R2 = k, R3 = dot product, R4 = f(x), R5/R6 = operands
  function automatic logic [63:0] prog(input int n);
    case (n)
      0:  return ins(OP_MOV,  .rd(1), .wr(1));
      1:  return ins(OP_MOV,  .rd(4), .wr(1));
      2:  return ins(OP_MOV,  .rd(2), .wr(1));
      3:  return ins(OP_MOV,  .rd(3), .wr(1));
      4:  return ins(OP_LD,   .rd(5), .wr(1), .crf(0), .i0(SRC_R1), .i2(SRC_R2));
      5:  return ins(OP_LD,   .rd(6), .wr(1), .crf(3), .i2(SRC_R2));
      6:  return ins(OP_FMUL, .rd(5), .wr(1), .a(SRC_R5), .b(SRC_R6), .fmt(FMT_B8));
      7:  return ins(OP_FADD, .rd(3), .wr(1), .a(SRC_R3), .b(SRC_R5), .fmt(FMT_B8));
      8:  return ins(OP_ADD,  .rd(2), .wr(1), .a(SRC_R2), .b(SRC_CRF), .crf(9));
      9:  return ins(OP_SLT,  .a(SRC_R2), .b(SRC_CRF), .crf(10));
      10: return ins(OP_CJMP, .jt(4), .jf(11));
      11: return ins(OP_LD,   .rd(5), .wr(1), .crf(6), .i2(SRC_R1));
      12: return ins(OP_FMUL, .rd(3), .wr(1), .a(SRC_R3), .b(SRC_R5), .fmt(FMT_B8));
      13: return ins(OP_FADD, .rd(4), .wr(1), .a(SRC_R4), .b(SRC_R3), .fmt(FMT_B8));
      14: return ins(OP_ADD,  .rd(1), .wr(1), .a(SRC_R1), .b(SRC_CRF), .crf(9));
      15: return ins(OP_SLT,  .a(SRC_R1), .b(SRC_CRF), .crf(11));
      16: return ins(OP_CJMP, .jt(2), .jf(17));
      17: return ins(OP_FADD, .rd(4), .wr(1), .a(SRC_R4), .b(SRC_CRF), .crf(12), .fmt(FMT_B8));
      18: return ins(OP_ST,   .a(SRC_R4), .crf(13));
      default: return ins(OP_EXIT);
    endcase
  endfunction

  function automatic logic [31:0] lane(input logic [31:0] w, input int l);
    return 32'(w[8*l +: 8]);
  endfunction

  logic [7:0]  SV [S][F];
  logic [7:0]  AL [S];
  logic [7:0]  BIAS;
  logic [31:0] X [NPE][F];

  initial begin
    logic [63:0] p [$];
    logic [31:0] d, vals [$];
    int n_pos;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < S; s++) begin
      for (int k = 0; k < F; k++) begin
        SV[s][k] = rnd_fp(5, 2, 15, 2)[7:0];
        hwrite(SV_B + 4 * (s * F + k), {4{SV[s][k]}});
      end
      AL[s] = rnd_fp(5, 2, 13, 2)[7:0];
      hwrite(AL_B + 4 * s, {4{AL[s]}});
    end
    BIAS = rnd_fp(5, 2, 15, 2)[7:0];
    for (int q = 0; q < NPE; q++) for (int k = 0; k < F; k++) begin
      X[q][k] = {rnd_fp(5, 2, 15, 2)[7:0], rnd_fp(5, 2, 15, 2)[7:0],
                 rnd_fp(5, 2, 15, 2)[7:0], rnd_fp(5, 2, 15, 2)[7:0]};
      hwrite(X_B + 4 * (q * F + k), X[q][k]);
    end
    for (int n = 0; n < 20; n++) p.push_back(prog(n));
    rec_irf(8'hFF, 0, p);
    vals = '{SV_B, offs(0, 1, 0, 1), rowcfg(F, 2)};                      rec_crf(8'hFF, 0, vals);
    vals = '{offs(0, 0, 0, 1), rowcfg(0, 2),
             AL_B, offs(0, 0, 0, 1), rowcfg(0, 2), 1, F, S, {4{BIAS}}};  rec_crf(8'hFF, 4, vals);
    for (int q = 0; q < NPE; q++) begin
      vals = '{X_B + 4 * F * q};                 rec_crf(8'(1 << q), 3, vals);
      vals = '{Y_B + 4 * q, offs(0, 0, 0, 0), rowcfg(0, 2)};
      rec_crf(8'(1 << q), 13, vals);
    end
    img.push_back(hdr(1, 1, 0, 0, 8'h00));
    foreach (img[i]) begin
      @(negedge clk); ctx_we = 1; ctx_waddr = 10'(i); ctx_wdata = img[i];
    end
    @(negedge clk); ctx_we = 0;
    @(negedge clk); start = 1; ctx_base = '0;
    @(negedge clk); start = 0;
    wait (done);
    @(posedge clk); @(negedge clk);
    chk(!busy, "busy dropped");
    chk(t_done - t_start == SCHED + n_stall,
        $sformatf("run time %0d exp %0d", t_done - t_start, SCHED + n_stall));
    n_pos = 0;
    for (int q = 0; q < NPE; q++) begin
      hread(Y_B + 4 * q, d);
      for (int l = 0; l < 4; l++) begin
        logic [31:0] acc, dot;
        acc = 0;
        for (int s = 0; s < S; s++) begin
          dot = 0;
          for (int k = 0; k < F; k++)
            dot = ref_op(0, dot, ref_op(2, 32'(SV[s][k]), lane(X[q][k], l), 5, 2), 5, 2);
          acc = ref_op(0, acc, ref_op(2, dot, 32'(AL[s]), 5, 2), 5, 2);
        end
        acc = ref_op(0, acc, 32'(BIAS), 5, 2);
        chk(lane(d, l) == acc, $sformatf("f(x[%0d]) got %h exp %h", 4 * q + l, lane(d, l), acc));
        if (!d[8*l+7]) n_pos++;
      end
    end
    $display("cycles %0d (schedule %0d, stall cycles %0d), binary8 fmul on PE_12 %0d, positive class %0d of %0d",
             t_done - t_start, SCHED, n_stall, n_fmul, n_pos, 4 * NPE);
    chk(n_fmul == S * (F + 1), "SIMD multiplies on one PE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
