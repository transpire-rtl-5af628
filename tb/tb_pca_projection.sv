// tb_pca_projection: workload testbench running the principal-component
// projection step of a PCA in binary16alt on the TRANSPIRE system at its
// default size.
//
// Y[j][i] = sum over k of D[k][i] * E[k][j]: 16 samples of K = 16 features
// are projected onto J = 4 components. Each word of D holds two samples as
// binary16alt lanes, so PE p projects samples 2p and 2p+1; the component
// matrix E is replicated across lanes. One program is broadcast to all
// eight PEs and runs two nested loops; E and Y are addressed through the
// FAGU's two-dimensional form. Expected values come from reference
// binary16alt arithmetic in the same order; the run time must equal the
// static schedule plus the counted stall cycles.
module tb_pca_projection;
  import transpire_pkg::*;
  import transpire_asm_pkg::*;
  import fp_ref_pkg::*;

  localparam int NPE = 8, K = 16, J = 4;
  localparam logic [31:0] D_B = 32'h0000, E_B = 32'h0400, Y_B = 32'h0800;
  // MOV; J x (two MOVs, K x (LD LD FMUL FADD, ADD SLT CJMP), ST ADD SLT
  // CJMP); EXIT; the done pulse
  localparam int SCHED = 1 + J * (2 + K * 11 + 1 + 3) + 1 + 1;

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
    if (dut.u_array.g_row[0].g_col[3].u_pe.retire &&
        dut.u_array.g_row[0].g_col[3].u_pe.ins.op == OP_FMUL &&
        dut.u_array.g_row[0].g_col[3].u_pe.ins.fmt == FMT_H16) n_fmul++;
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

  // R1 = j, R2 = k, R3 = sum, R5/R6 = operands
  function automatic logic [63:0] prog(input int n);
    case (n)
      0:  return ins(OP_MOV,  .rd(1), .wr(1));
      1:  return ins(OP_MOV,  .rd(2), .wr(1));
      2:  return ins(OP_MOV,  .rd(3), .wr(1));
      3:  return ins(OP_LD,   .rd(5), .wr(1), .crf(0), .i0(SRC_R2));
      4:  return ins(OP_LD,   .rd(6), .wr(1), .crf(3), .i0(SRC_R2), .i2(SRC_R1));
      5:  return ins(OP_FMUL, .rd(5), .wr(1), .a(SRC_R5), .b(SRC_R6), .fmt(FMT_H16));
      6:  return ins(OP_FADD, .rd(3), .wr(1), .a(SRC_R3), .b(SRC_R5), .fmt(FMT_H16));
      7:  return ins(OP_ADD,  .rd(2), .wr(1), .a(SRC_R2), .b(SRC_CRF), .crf(9));
      8:  return ins(OP_SLT,  .a(SRC_R2), .b(SRC_CRF), .crf(10));
      9:  return ins(OP_CJMP, .jt(3), .jf(10));
      10: return ins(OP_ST,   .a(SRC_R3), .crf(6), .i0(SRC_R1));
      11: return ins(OP_ADD,  .rd(1), .wr(1), .a(SRC_R1), .b(SRC_CRF), .crf(9));
      12: return ins(OP_SLT,  .a(SRC_R1), .b(SRC_CRF), .crf(11));
      13: return ins(OP_CJMP, .jt(1), .jf(14));
      default: return ins(OP_EXIT);
    endcase
  endfunction

  function automatic logic [31:0] lane(input logic [31:0] w, input int l);
    return 32'(w[16*l +: 16]);
  endfunction

  logic [31:0] D [K][NPE];
  logic [15:0] E [K][J];

  initial begin
    logic [63:0] p [$];
    logic [31:0] d, e, vals [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < K; k++) begin
      for (int w = 0; w < NPE; w++) begin
        D[k][w] = {rnd_fp(8, 7, 127, 3)[15:0], rnd_fp(8, 7, 127, 3)[15:0]};
        hwrite(D_B + 4 * (k * NPE + w), D[k][w]);
      end
      for (int j = 0; j < J; j++) begin
        E[k][j] = rnd_fp(8, 7, 125, 2)[15:0];
        hwrite(E_B + 4 * (k * J + j), {2{E[k][j]}});
      end
    end
    for (int n = 0; n < 15; n++) p.push_back(prog(n));
    rec_irf(8'hFF, 0, p);
    vals = '{offs(0, 1, 0, 0), rowcfg(NPE, 2),
             E_B, offs(0, 1, 0, 1), rowcfg(J, 2)};                       rec_crf(8'hFF, 1, vals);
    vals = '{offs(0, 1, 0, 0), rowcfg(NPE, 2), 1, K, J};                 rec_crf(8'hFF, 7, vals);
    for (int q = 0; q < NPE; q++) begin
      vals = '{D_B + 4 * q};                     rec_crf(8'(1 << q), 0, vals);
      vals = '{Y_B + 4 * q};                     rec_crf(8'(1 << q), 6, vals);
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
    for (int j = 0; j < J; j++) for (int w = 0; w < NPE; w++) begin
      hread(Y_B + 4 * (j * NPE + w), d);
      for (int l = 0; l < 2; l++) begin
        e = 0;
        for (int k = 0; k < K; k++)
          e = ref_op(0, e, ref_op(2, lane(D[k][w], l), 32'(E[k][j]), 8, 7), 8, 7);
        chk(lane(d, l) == e, $sformatf("Y[%0d][%0d] got %h exp %h", j, 2 * w + l, lane(d, l), e));
      end
    end
    $display("cycles %0d (schedule %0d, stall cycles %0d), binary16alt fmul on PE_03 %0d",
             t_done - t_start, SCHED, n_stall, n_fmul);
    chk(n_fmul == J * K, "SIMD multiplies on one PE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
