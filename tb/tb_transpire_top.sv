// tb_transpire_top: end-to-end testbench of the TRANSPIRE system at its
// default size (4x2 PEs, 4 KiB context memory, 32 KiB TCDM in 4 banks).
//
// Kernel: every PE p computes Z[p][k] = A[p] + B[p] * C[k][p] for k = 0..15,
// the multiply-add of the compilation-flow example, as SIMD on 32-bit words:
// PEs 0-3 on two binary16alt lanes, PEs 4-7 on four binary8 lanes. C[k][p]
// is addressed through the FAGU's two-dimensional index form, so the eight
// PEs hit the TCDM banks together and the array stalls. The loop runs on a
// compare and a conditional jump. Afterwards each PE stores the OPR of its
// west torus neighbour, and PE_00 computes a binary16alt divide and square
// root on its DS unit. The host loads the data and the context records
// through its ports, starts the run, competes for the TCDM while the array
// runs, and reads the results back. Expected values come from reference
// arithmetic; the run time must equal the longest PE schedule (180 cycles)
// plus the stall cycles. Each mechanism is counted and must occur.
module tb_transpire_top;
  import transpire_pkg::*;
  import transpire_asm_pkg::*;
  import fp_ref_pkg::*;

  localparam int K = 16, NPE = 8;
  localparam logic [31:0] A_B = 32'h0000, B_B = 32'h0040, NB_B = 32'h0080, DV_B = 32'h00C0,
                          C_B = 32'h0100, Z_B = 32'h1000;

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_jump = 0, n_bcast = 0, n_ds = 0, n_h16 = 0, n_b8 = 0, n_host_wait = 0;
  int n_nbr = 0, n_cjmp_f = 0, cyc = 0, t_start = 0, t_done = 0;
  logic [NPE-1:0] dbg_retire;
  assign dbg_retire = dut.u_array.retire;
  always @(posedge clk) begin
    cyc++;
    if (dut.u_array.stall) n_stall++;
    n_jump += $countones(dut.u_array.jump_taken);
    if (dut.ctx.we && $countones(dut.ctx.pe_mask) > 1) n_bcast++;
    if (dut.u_dma.done) t_start = cyc;
    if (done) t_done = cyc;
    if (dut.u_array.g_row[0].g_col[0].u_pe.retire) begin
      if (dut.u_array.g_row[0].g_col[0].u_pe.ins.op inside {OP_FDIV, OP_FSQRT}) n_ds++;
      if (dut.u_array.g_row[0].g_col[0].u_pe.ins.op == OP_CJMP &&
          dut.u_array.cr_bits == '0) n_cjmp_f++;
    end
    if (dbg_retire[1] && dut.u_array.g_row[0].g_col[1].u_pe.ins.op == OP_FMUL &&
        dut.u_array.g_row[0].g_col[1].u_pe.ins.fmt == FMT_H16) n_h16++;
    if (dbg_retire[5] && dut.u_array.g_row[1].g_col[1].u_pe.ins.op == OP_FMUL &&
        dut.u_array.g_row[1].g_col[1].u_pe.ins.fmt == FMT_B8) n_b8++;
    if (dbg_retire[2] && dut.u_array.g_row[0].g_col[2].u_pe.ins.src_a == SRC_W) n_nbr++;
    if (h_req && !h_gnt && busy) n_host_wait++;
  end

  // ---------------- host port ----------------
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

  // ---------------- context image ----------------
  logic [31:0] img [$];
  task automatic rec_crf(input logic [7:0] mask, input int idx, input logic [31:0] vals [$]);
    img.push_back(hdr(0, 1, vals.size(), idx, mask));
    foreach (vals[i]) img.push_back(vals[i]);
  endtask
  task automatic rec_irf(input logic [7:0] mask, input int idx, input logic [63:0] words [$]);
    img.push_back(hdr(0, 0, words.size(), idx, mask));
    foreach (words[i]) begin img.push_back(words[i][31:0]); img.push_back(words[i][63:32]); end
  endtask

  function automatic logic [63:0] body(input int n, input fmt_e f);
    case (n)
      0:  return ins(OP_LD,   .rd(2), .wr(1), .crf(0));
      1:  return ins(OP_LD,   .rd(3), .wr(1), .crf(3));
      2:  return ins(OP_MOV,  .rd(1), .wr(1));
      3:  return ins(OP_LD,   .rd(4), .wr(1), .crf(6), .i0(SRC_R1));
      4:  return ins(OP_FMUL, .rd(5), .wr(1), .a(SRC_R3), .b(SRC_R4), .fmt(f));
      5:  return ins(OP_FADD, .rd(5), .wr(1), .wo(1), .a(SRC_R2), .b(SRC_R5), .fmt(f));
      6:  return ins(OP_ST,   .a(SRC_R5), .crf(9), .i2(SRC_R1));
      7:  return ins(OP_ADD,  .rd(1), .wr(1), .a(SRC_R1), .b(SRC_CRF), .crf(13));
      8:  return ins(OP_SLT,  .rd(6), .wr(1), .a(SRC_R1), .b(SRC_CRF), .crf(12));
      9:  return ins(OP_CJMP, .jt(3), .jf(10));
      10: return ins(OP_ST,   .a(SRC_W), .crf(14));
      default: return ins(OP_EXIT);
    endcase
  endfunction

  logic [31:0] A [NPE], B [NPE], C [K][NPE];

  initial begin
    logic [63:0] ph [$], pb [$], tail [$];
    logic [31:0] d, e, vals [$];
    int base;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- data ----
    for (int p = 0; p < NPE; p++) begin
      if (p < 4) begin
        A[p] = {rnd_fp(8, 7, 127, 4)[15:0], rnd_fp(8, 7, 127, 4)[15:0]};
        B[p] = {rnd_fp(8, 7, 127, 4)[15:0], rnd_fp(8, 7, 127, 4)[15:0]};
      end else begin
        A[p] = {rnd_fp(5, 2, 15, 3)[7:0], rnd_fp(5, 2, 15, 3)[7:0], rnd_fp(5, 2, 15, 3)[7:0], rnd_fp(5, 2, 15, 3)[7:0]};
        B[p] = {rnd_fp(5, 2, 15, 3)[7:0], rnd_fp(5, 2, 15, 3)[7:0], rnd_fp(5, 2, 15, 3)[7:0], rnd_fp(5, 2, 15, 3)[7:0]};
      end
      hwrite(A_B + 4 * p, A[p]);
      hwrite(B_B + 4 * p, B[p]);
    end
    B[0][15] = 1'b0; hwrite(B_B, B[0]);     // positive radicand for the square root
    for (int k = 0; k < K; k++) for (int p = 0; p < NPE; p++) begin
      C[k][p] = (p < 4) ? {rnd_fp(8, 7, 127, 4)[15:0], rnd_fp(8, 7, 127, 4)[15:0]}
                        : {rnd_fp(5, 2, 15, 3)[7:0], rnd_fp(5, 2, 15, 3)[7:0], rnd_fp(5, 2, 15, 3)[7:0], rnd_fp(5, 2, 15, 3)[7:0]};
      hwrite(C_B + 4 * (k * NPE + p), C[k][p]);
    end
    // ---- context ----
    for (int n = 0; n < 12; n++) begin ph.push_back(body(n, FMT_H16)); pb.push_back(body(n, FMT_B8)); end
    tail.push_back(ins(OP_FDIV,  .rd(7), .wr(1), .a(SRC_R2), .b(SRC_R3)));
    tail.push_back(ins(OP_FSQRT, .rd(6), .wr(1), .a(SRC_R3)));
    tail.push_back(ins(OP_SLL,   .rd(6), .wr(1), .a(SRC_R6), .b(SRC_R1)));
    tail.push_back(ins(OP_OR,    .rd(7), .wr(1), .a(SRC_R7), .b(SRC_R6)));
    tail.push_back(ins(OP_ST,    .a(SRC_R7), .crf(17)));
    tail.push_back(ins(OP_EXIT));
    rec_irf(8'h0F, 0, ph);
    rec_irf(8'hF0, 0, pb);
    rec_irf(8'h01, 11, tail);
    vals = '{rowcfg(8, 2)};                              rec_crf(8'hFF, 8, vals);
    vals = '{offs(0, 0, 0, 1), rowcfg(0, 2), K, 1};      rec_crf(8'hFF, 10, vals);
    for (int p = 0; p < NPE; p++) begin
      vals = '{A_B + 4 * p};                     rec_crf(8'(1 << p), 0, vals);
      vals = '{B_B + 4 * p};                     rec_crf(8'(1 << p), 3, vals);
      vals = '{C_B, offs(0, 1, p, 1)};           rec_crf(8'(1 << p), 6, vals);
      vals = '{Z_B + 4 * K * p};                 rec_crf(8'(1 << p), 9, vals);
      vals = '{NB_B + 4 * p};                    rec_crf(8'(1 << p), 14, vals);
    end
    vals = '{DV_B};                              rec_crf(8'h01, 17, vals);
    img.push_back(hdr(1, 1, 0, 0, 8'h00));       // end of context
    base = 40;
    foreach (img[i]) begin
      @(negedge clk); ctx_we = 1; ctx_waddr = 10'(base + i); ctx_wdata = img[i];
    end
    @(negedge clk); ctx_we = 0;
    // ---- run ----
    @(negedge clk); start = 1; ctx_base = 10'(base);
    @(negedge clk); start = 0;
    chk(busy, "busy after start");
    wait (dut.u_array.busy);
    repeat (30) @(negedge clk);
    for (int n = 0; n < 4; n++) begin            // host traffic during the run
      hread(A_B + 4 * n, d);
      chk(d == A[n], "host read during run");
    end
    wait (done);
    @(posedge clk); @(negedge clk);
    chk(!busy, "busy dropped");
    chk(t_done - t_start == 181 + n_stall, $sformatf("run time %0d exp %0d", t_done - t_start, 181 + n_stall));
    // ---- results ----
    for (int p = 0; p < NPE; p++) begin
      int e_w, m_w, lanes;
      e_w = (p < 4) ? 8 : 5; m_w = (p < 4) ? 7 : 2; lanes = (p < 4) ? 2 : 4;
      for (int k = 0; k < K; k++) begin
        hread(Z_B + 4 * (K * p + k), d);
        for (int l = 0; l < lanes; l++) begin
          int w;
          logic [31:0] x;
          w = 32 / lanes;
          x = ref_op(2, (B[p] >> (w * l)) & ((1 << w) - 1), (C[k][p] >> (w * l)) & ((1 << w) - 1), e_w, m_w);
          e = ref_op(0, (A[p] >> (w * l)) & ((1 << w) - 1), x, e_w, m_w);
          chk(((d >> (w * l)) & ((1 << w) - 1)) == e,
              $sformatf("Z[%0d][%0d] lane %0d got %h exp %h", p, k, l, (d >> (w * l)) & ((1 << w) - 1), e));
        end
      end
    end
    for (int p = 0; p < NPE; p++) begin
      int w;
      logic [31:0] zl;
      w = (p / 4) * 4 + (p + 3) % 4;           // west neighbour
      hread(Z_B + 4 * (K * w + K - 1), zl);
      hread(NB_B + 4 * p, d);
      chk(d == zl, $sformatf("PE%0d west neighbour OPR", p));
    end
    hread(DV_B, d);
    e = ref_op(3, 32'(A[0][15:0]), 32'(B[0][15:0]), 8, 7);
    chk(d[15:0] == e[15:0], "PE0 divide");
    e = ref_sqrt(32'(B[0][15:0]), 8, 7);
    chk(d[31:16] == e[15:0], "PE0 square root");
    // ---- mechanisms ----
    $display("stall cycles %0d, jumps %0d, broadcasts %0d, DS ops %0d, b16alt fmul %0d, b8 fmul %0d, neighbour reads %0d, loop exits %0d, host waits %0d",
             n_stall, n_jump, n_bcast, n_ds, n_h16, n_b8, n_nbr, n_cjmp_f, n_host_wait);
    chk(n_stall > 0, "stall");
    chk(n_jump == NPE * K, "conditional jumps");
    chk(n_cjmp_f == 1, "loop exit (cjump false path)");
    chk(n_bcast > 0, "context broadcast to several PEs");
    chk(n_ds == 2, "DS divide and square root");
    chk(n_h16 == K, "binary16alt SIMD multiply");
    chk(n_b8 == K, "binary8 SIMD multiply");
    chk(n_nbr == 1, "torus neighbour read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
