// tb_mean_covariance: workload testbench running the mean/covariance step
// of a principal component analysis in binary16alt on the TRANSPIRE system
// at its default size.
//
// The data matrix D has N = 16 samples of 16 variables; each 32-bit word
// holds two variables as binary16alt lanes, so word column w carries
// variables 2w (low lane) and 2w+1 (high lane), and PE p owns word column p.
// The work runs as two kernels, each loaded by the DMA and started by the
// host in turn, since the whole program does not fit one 21-entry IRF:
//   1. M[p] = (sum over i of D[i][p]) * 1/N          (column means)
//   2. C[p][q] = (sum over i of (D[i][p]-M[p]) * (D[i][q]-M[q])) * 1/N
// for q = 0..7, giving per lane the covariance of variables 2p+l and 2q+l.
// Kernel 2 reads the means stored by kernel 1 from the TCDM. Both kernels
// run a single program broadcast to all eight PEs, with per-PE base
// addresses in the CRF. Expected values come from reference binary16alt
// arithmetic in the same order; each run time must equal its static
// schedule plus the counted stall cycles.
module tb_mean_covariance;
  import transpire_pkg::*;
  import transpire_asm_pkg::*;
  import fp_ref_pkg::*;

  localparam int NPE = 8, N = 16, Q = 8;
  localparam logic [31:0] D_B = 32'h0000, M_B = 32'h0400, C_B = 32'h0800;
  localparam logic [31:0] INV_N = 32'h3D80_3D80;      // 1/16 in both lanes
  localparam int SCHED1 = 2 + N * 7 + 2 + 1 + 1 + 1;
  localparam int SCHED2 = 2 + 1 + Q * (2 + 2 + N * 15 + 2 + 1 + 3) + 1 + 1;

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

  int n_stall = 0, n_fsub = 0, cyc = 0, t_start = 0, t_done = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.u_array.stall) n_stall++;
    if (dut.u_dma.done) t_start = cyc;
    if (done) t_done = cyc;
    if (dut.u_array.g_row[0].g_col[2].u_pe.retire &&
        dut.u_array.g_row[0].g_col[2].u_pe.ins.op == OP_FSUB &&
        dut.u_array.g_row[0].g_col[2].u_pe.ins.fmt == FMT_H16) n_fsub++;
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

  // load the context image at word `base`, start, wait for done, check timing
  task automatic run(input int base, input int sched, input string name);
    int s0;
    foreach (img[i]) begin
      @(negedge clk); ctx_we = 1; ctx_waddr = 10'(base + i); ctx_wdata = img[i];
    end
    @(negedge clk); ctx_we = 0;
    s0 = n_stall;
    @(negedge clk); start = 1; ctx_base = 10'(base);
    @(negedge clk); start = 0;
    wait (done);
    @(posedge clk); @(negedge clk);
    chk(!busy, {name, " busy dropped"});
    chk(t_done - t_start == sched + n_stall - s0,
        $sformatf("%s run time %0d exp %0d", name, t_done - t_start, sched + n_stall - s0));
    $display("%s: %0d cycles (schedule %0d, stall cycles %0d)", name, t_done - t_start,
             sched, n_stall - s0);
    img.delete();
  endtask

  // kernel 1, R1 = i, R3 = sum, R4 = mean, R6 = sample
  function automatic logic [63:0] prog1(input int n);
    case (n)
      0: return ins(OP_MOV,  .rd(1), .wr(1));
      1: return ins(OP_MOV,  .rd(3), .wr(1));
      2: return ins(OP_LD,   .rd(6), .wr(1), .crf(0), .i0(SRC_R1));
      3: return ins(OP_FADD, .rd(3), .wr(1), .a(SRC_R3), .b(SRC_R6), .fmt(FMT_H16));
      4: return ins(OP_ADD,  .rd(1), .wr(1), .a(SRC_R1), .b(SRC_CRF), .crf(6));
      5: return ins(OP_SLT,  .a(SRC_R1), .b(SRC_CRF), .crf(7));
      6: return ins(OP_CJMP, .jt(2), .jf(7));
      7: return ins(OP_FMUL, .rd(4), .wr(1), .a(SRC_R3), .b(SRC_CRF), .crf(8), .fmt(FMT_H16));
      8: return ins(OP_ST,   .a(SRC_R4), .crf(3));
      default: return ins(OP_EXIT);
    endcase
  endfunction

  // kernel 2, R1 = i, R2 = q, R3 = sum, R4 = M[p], R5 = M[q], R6/R7 = samples
  function automatic logic [63:0] prog2(input int n);
    case (n)
      0:  return ins(OP_LD,   .rd(4), .wr(1), .crf(3));
      1:  return ins(OP_MOV,  .rd(2), .wr(1));
      2:  return ins(OP_MOV,  .rd(1), .wr(1));
      3:  return ins(OP_MOV,  .rd(3), .wr(1));
      4:  return ins(OP_LD,   .rd(5), .wr(1), .crf(6), .i2(SRC_R2));
      5:  return ins(OP_LD,   .rd(6), .wr(1), .crf(0), .i0(SRC_R1));
      6:  return ins(OP_LD,   .rd(7), .wr(1), .crf(9), .i0(SRC_R1), .i2(SRC_R2));
      7:  return ins(OP_FSUB, .rd(6), .wr(1), .a(SRC_R6), .b(SRC_R4), .fmt(FMT_H16));
      8:  return ins(OP_FSUB, .rd(7), .wr(1), .a(SRC_R7), .b(SRC_R5), .fmt(FMT_H16));
      9:  return ins(OP_FMUL, .rd(6), .wr(1), .a(SRC_R6), .b(SRC_R7), .fmt(FMT_H16));
      10: return ins(OP_FADD, .rd(3), .wr(1), .a(SRC_R3), .b(SRC_R6), .fmt(FMT_H16));
      11: return ins(OP_ADD,  .rd(1), .wr(1), .a(SRC_R1), .b(SRC_CRF), .crf(15));
      12: return ins(OP_SLT,  .a(SRC_R1), .b(SRC_CRF), .crf(16));
      13: return ins(OP_CJMP, .jt(5), .jf(14));
      14: return ins(OP_FMUL, .rd(3), .wr(1), .a(SRC_R3), .b(SRC_CRF), .crf(18), .fmt(FMT_H16));
      15: return ins(OP_ST,   .a(SRC_R3), .crf(12), .i2(SRC_R2));
      16: return ins(OP_ADD,  .rd(2), .wr(1), .a(SRC_R2), .b(SRC_CRF), .crf(15));
      17: return ins(OP_SLT,  .a(SRC_R2), .b(SRC_CRF), .crf(17));
      18: return ins(OP_CJMP, .jt(2), .jf(19));
      default: return ins(OP_EXIT);
    endcase
  endfunction

  function automatic logic [31:0] lane(input logic [31:0] w, input int l);
    return 32'(w[16*l +: 16]);
  endfunction

  logic [31:0] D [N][NPE];
  logic [31:0] Mr [NPE];

  initial begin
    logic [63:0] p [$];
    logic [31:0] d, vals [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) for (int w = 0; w < NPE; w++) begin
      D[i][w] = {rnd_fp(8, 7, 127, 3)[15:0], rnd_fp(8, 7, 127, 3)[15:0]};
      hwrite(D_B + 4 * (i * NPE + w), D[i][w]);
    end
    // ---- kernel 1: column means ----
    for (int n = 0; n < 10; n++) p.push_back(prog1(n));
    rec_irf(8'hFF, 0, p);
    vals = '{offs(0, 1, 0, 1), rowcfg(NPE, 2)};                          rec_crf(8'hFF, 1, vals);
    vals = '{offs(0, 0, 0, 0), rowcfg(0, 2), 1, N, INV_N};               rec_crf(8'hFF, 4, vals);
    for (int q = 0; q < NPE; q++) begin
      vals = '{D_B + 4 * q};                     rec_crf(8'(1 << q), 0, vals);
      vals = '{M_B + 4 * q};                     rec_crf(8'(1 << q), 3, vals);
    end
    img.push_back(hdr(1, 1, 0, 0, 8'h00));
    run(0, SCHED1, "mean");
    for (int w = 0; w < NPE; w++) begin
      hread(M_B + 4 * w, d);
      for (int l = 0; l < 2; l++) begin
        logic [31:0] acc;
        acc = 0;
        for (int i = 0; i < N; i++) acc = ref_op(0, acc, lane(D[i][w], l), 8, 7);
        acc = ref_op(2, acc, lane(INV_N, l), 8, 7);
        chk(lane(d, l) == acc, $sformatf("M[%0d] lane %0d got %h exp %h", w, l, lane(d, l), acc));
        Mr[w][16*l +: 16] = acc[15:0];
      end
    end
    // ---- kernel 2: covariance matrix, loaded into another context region ----
    p.delete();
    for (int n = 0; n < 20; n++) p.push_back(prog2(n));
    rec_irf(8'hFF, 0, p);
    vals = '{offs(0, 1, 0, 1), rowcfg(NPE, 2)};                          rec_crf(8'hFF, 1, vals);
    vals = '{offs(0, 0, 0, 0), rowcfg(0, 2), M_B, offs(0, 1, 0, 1), rowcfg(0, 2),
             D_B, offs(0, 1, 0, 1), rowcfg(NPE, 2)};                     rec_crf(8'hFF, 4, vals);
    vals = '{offs(0, 1, 0, 1), rowcfg(0, 2), 1, N, Q, INV_N};            rec_crf(8'hFF, 13, vals);
    for (int q = 0; q < NPE; q++) begin
      vals = '{D_B + 4 * q};                     rec_crf(8'(1 << q), 0, vals);
      vals = '{M_B + 4 * q};                     rec_crf(8'(1 << q), 3, vals);
      vals = '{C_B + 4 * Q * q};                 rec_crf(8'(1 << q), 12, vals);
    end
    img.push_back(hdr(1, 1, 0, 0, 8'h00));
    run(512, SCHED2, "covariance");
    for (int w = 0; w < NPE; w++) for (int q = 0; q < Q; q++) begin
      hread(C_B + 4 * (Q * w + q), d);
      for (int l = 0; l < 2; l++) begin
        logic [31:0] acc, a, b;
        acc = 0;
        for (int i = 0; i < N; i++) begin
          a   = ref_op(1, lane(D[i][w], l), lane(Mr[w], l), 8, 7);
          b   = ref_op(1, lane(D[i][q], l), lane(Mr[q], l), 8, 7);
          acc = ref_op(0, acc, ref_op(2, a, b, 8, 7), 8, 7);
        end
        acc = ref_op(2, acc, lane(INV_N, l), 8, 7);
        chk(lane(d, l) == acc,
            $sformatf("C[%0d][%0d] lane %0d got %h exp %h", w, q, l, lane(d, l), acc));
      end
    end
    $display("binary16alt subtractions on PE_02: %0d", n_fsub);
    chk(n_stall > 0, "memory stalls");
    chk(n_fsub == 2 * Q * N, "SIMD subtractions on one PE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
