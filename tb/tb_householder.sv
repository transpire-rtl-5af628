// tb_householder: workload testbench running the vector normalisation at
// the heart of a Householder reflection in binary16alt on the TRANSPIRE
// system at its default size, using the divide/square-root units.
//
// Each of the three DS tiles (PE_00, PE_01, PE_02) takes its own vector v of
// N = 8 values and computes nrm = sqrt(sum of v[i]^2) and u[i] = v[i] / nrm;
// the other five PEs exit at once. The values sit in the low binary16alt
// lane of each word (the DS unit works on that lane). Expected values come
// from reference binary16alt arithmetic in the same order; the run time
// must equal the static schedule plus the counted stall cycles, and every
// square root and divide must retire on a DS tile.
module tb_householder;
  import transpire_pkg::*;
  import transpire_asm_pkg::*;
  import fp_ref_pkg::*;

  localparam int NPE = 8, NDS = 3, N = 8;
  localparam logic [31:0] V_B = 32'h0000, U_B = 32'h0400, R_B = 32'h0800;
  // two MOVs; N x (LD 2, FMUL 2, FADD 2, ADD SLT CJMP); FSQRT 5; MOV;
  // N x (LD 2, FDIV 5, ST ADD SLT CJMP); ST; EXIT; the done pulse
  localparam int SCHED = 2 + N * 9 + 5 + 1 + N * 11 + 1 + 1 + 1;

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

  int n_stall = 0, n_ds = 0, cyc = 0, t_start = 0, t_done = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.u_array.stall) n_stall++;
    if (dut.u_dma.done) t_start = cyc;
    if (done) t_done = cyc;
    if (dut.u_array.g_row[0].g_col[0].u_pe.retire &&
        dut.u_array.g_row[0].g_col[0].u_pe.ins.op inside {OP_FDIV, OP_FSQRT}) n_ds++;
    if (dut.u_array.g_row[0].g_col[1].u_pe.retire &&
        dut.u_array.g_row[0].g_col[1].u_pe.ins.op inside {OP_FDIV, OP_FSQRT}) n_ds++;
    if (dut.u_array.g_row[0].g_col[2].u_pe.retire &&
        dut.u_array.g_row[0].g_col[2].u_pe.ins.op inside {OP_FDIV, OP_FSQRT}) n_ds++;
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

  // R1 = i, R2 = v[i], R3 = sum of squares, R4 = norm, R5 = v[i] / norm
  function automatic logic [63:0] prog(input int n);
    case (n)
      0:  return ins(OP_MOV,   .rd(1), .wr(1));
      1:  return ins(OP_MOV,   .rd(3), .wr(1));
      2:  return ins(OP_LD,    .rd(2), .wr(1), .crf(0), .i2(SRC_R1));
      3:  return ins(OP_FMUL,  .rd(2), .wr(1), .a(SRC_R2), .b(SRC_R2), .fmt(FMT_H16));
      4:  return ins(OP_FADD,  .rd(3), .wr(1), .a(SRC_R3), .b(SRC_R2), .fmt(FMT_H16));
      5:  return ins(OP_ADD,   .rd(1), .wr(1), .a(SRC_R1), .b(SRC_CRF), .crf(9));
      6:  return ins(OP_SLT,   .a(SRC_R1), .b(SRC_CRF), .crf(10));
      7:  return ins(OP_CJMP,  .jt(2), .jf(8));
      8:  return ins(OP_FSQRT, .rd(4), .wr(1), .a(SRC_R3));
      9:  return ins(OP_MOV,   .rd(1), .wr(1));
      10: return ins(OP_LD,    .rd(2), .wr(1), .crf(0), .i2(SRC_R1));
      11: return ins(OP_FDIV,  .rd(5), .wr(1), .a(SRC_R2), .b(SRC_R4));
      12: return ins(OP_ST,    .a(SRC_R5), .crf(3), .i2(SRC_R1));
      13: return ins(OP_ADD,   .rd(1), .wr(1), .a(SRC_R1), .b(SRC_CRF), .crf(9));
      14: return ins(OP_SLT,   .a(SRC_R1), .b(SRC_CRF), .crf(10));
      15: return ins(OP_CJMP,  .jt(10), .jf(16));
      16: return ins(OP_ST,    .a(SRC_R4), .crf(6));
      default: return ins(OP_EXIT);
    endcase
  endfunction

  logic [15:0] V [NDS][N];

  initial begin
    logic [63:0] p [$];
    logic [31:0] d, s, nrm, e, vals [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int q = 0; q < NDS; q++) for (int i = 0; i < N; i++) begin
      V[q][i] = rnd_fp(8, 7, 127, 3)[15:0];
      hwrite(V_B + 4 * (N * q + i), 32'(V[q][i]));
    end
    for (int n = 0; n < 18; n++) p.push_back(prog(n));
    rec_irf(8'h07, 0, p);
    p.delete(); p.push_back(ins(OP_EXIT));
    rec_irf(8'hF8, 0, p);
    vals = '{offs(0, 0, 0, 1), rowcfg(0, 2)};                            rec_crf(8'h07, 1, vals);
    vals = '{offs(0, 0, 0, 1), rowcfg(0, 2)};                            rec_crf(8'h07, 4, vals);
    vals = '{offs(0, 0, 0, 0), rowcfg(0, 2), 1, N};                      rec_crf(8'h07, 7, vals);
    for (int q = 0; q < NDS; q++) begin
      vals = '{V_B + 4 * N * q};                 rec_crf(8'(1 << q), 0, vals);
      vals = '{U_B + 4 * N * q};                 rec_crf(8'(1 << q), 3, vals);
      vals = '{R_B + 4 * q};                     rec_crf(8'(1 << q), 6, vals);
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
    for (int q = 0; q < NDS; q++) begin
      s = 0;
      for (int i = 0; i < N; i++) s = ref_op(0, s, ref_op(2, 32'(V[q][i]), 32'(V[q][i]), 8, 7), 8, 7);
      nrm = ref_sqrt(s, 8, 7);
      hread(R_B + 4 * q, d);
      chk(d[15:0] == nrm[15:0], $sformatf("PE%0d norm got %h exp %h", q, d[15:0], nrm[15:0]));
      for (int i = 0; i < N; i++) begin
        e = ref_op(3, 32'(V[q][i]), nrm, 8, 7);
        hread(U_B + 4 * (N * q + i), d);
        chk(d[15:0] == e[15:0], $sformatf("PE%0d u[%0d] got %h exp %h", q, i, d[15:0], e[15:0]));
      end
    end
    $display("cycles %0d (schedule %0d, stall cycles %0d), DS operations %0d",
             t_done - t_start, SCHED, n_stall, n_ds);
    chk(n_ds == NDS * (1 + N), "square roots and divides on the DS tiles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
