// tb_conv5x5: workload testbench running a 5x5 binary8 convolution on the
// TRANSPIRE system at its default size.
//
// OUT[r][c] = sum over u, v of W[u][v] * X[r+u][c+v] for an 8 x 8 output
// from a 12 x 12 input. Every 32-bit word holds four binary8 lanes, so one
// run convolves four image tiles at once with the same (lane-replicated)
// weights. PE p computes output row p: one program, sent to all eight PEs in
// a single broadcast record, runs three nested loops (column c, kernel row u,
// kernel column v) on compares and conditional jumps. The FAGU forms the
// input address from u and the ALU-computed column c+v, the weight address
// from u and v. All eight PEs load from the same bank together, so the array
// stalls on nearly every load; the run time must equal the static schedule
// plus the counted stall cycles. Expected results accumulate in the same
// order with reference binary8 arithmetic (truncation, flush-to-zero).
module tb_conv5x5;
  import transpire_pkg::*;
  import transpire_asm_pkg::*;
  import fp_ref_pkg::*;

  localparam int NPE = 8, KS = 5, OW = 8, XW = OW + KS - 1, XH = NPE + KS - 1;
  localparam logic [31:0] X_B = 32'h0000, W_B = 32'h0400, O_B = 32'h0800;
  // static schedule of one PE: v-body 12 cycles, u-loop adds 4, c-loop adds
  // 6, plus the initial MOV and EXIT; the extra cycle is the done pulse
  localparam int SCHED = 1 + OW * (2 + KS * (1 + KS * 12 + 3) + 1 + 3) + 1 + 1;

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

  int n_stall = 0, n_fmul = 0, n_exit_c = 0, cyc = 0, t_start = 0, t_done = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.u_array.stall) n_stall++;
    if (dut.u_dma.done) t_start = cyc;
    if (done) t_done = cyc;
    if (dut.u_array.g_row[1].g_col[3].u_pe.retire &&
        dut.u_array.g_row[1].g_col[3].u_pe.ins.op == OP_FMUL &&
        dut.u_array.g_row[1].g_col[3].u_pe.ins.fmt == FMT_B8) n_fmul++;
    if (dut.u_array.g_row[0].g_col[0].u_pe.retire &&
        dut.u_array.g_row[0].g_col[0].u_pe.ins.op == OP_CJMP &&
        dut.u_array.g_row[0].g_col[0].u_pe.ins.jt == 5'd1 &&
        dut.u_array.cr_bits == '0) n_exit_c++;
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

  // R1 = c, R2 = u, R3 = v, R4 = c+v, R5 = accumulator, R6 = pixel, R7 = weight
  function automatic logic [63:0] prog(input int n);
    case (n)
      0:  return ins(OP_MOV,  .rd(1), .wr(1));
      1:  return ins(OP_MOV,  .rd(5), .wr(1));
      2:  return ins(OP_MOV,  .rd(2), .wr(1));
      3:  return ins(OP_MOV,  .rd(3), .wr(1));
      4:  return ins(OP_ADD,  .rd(4), .wr(1), .a(SRC_R1), .b(SRC_R3));
      5:  return ins(OP_LD,   .rd(6), .wr(1), .crf(0), .i0(SRC_R2), .i2(SRC_R4));
      6:  return ins(OP_LD,   .rd(7), .wr(1), .crf(3), .i0(SRC_R2), .i2(SRC_R3));
      7:  return ins(OP_FMUL, .rd(6), .wr(1), .a(SRC_R6), .b(SRC_R7), .fmt(FMT_B8));
      8:  return ins(OP_FADD, .rd(5), .wr(1), .a(SRC_R5), .b(SRC_R6), .fmt(FMT_B8));
      9:  return ins(OP_ADD,  .rd(3), .wr(1), .a(SRC_R3), .b(SRC_CRF), .crf(9));
      10: return ins(OP_SLT,  .a(SRC_R3), .b(SRC_CRF), .crf(10));
      11: return ins(OP_CJMP, .jt(4), .jf(12));
      12: return ins(OP_ADD,  .rd(2), .wr(1), .a(SRC_R2), .b(SRC_CRF), .crf(9));
      13: return ins(OP_SLT,  .a(SRC_R2), .b(SRC_CRF), .crf(10));
      14: return ins(OP_CJMP, .jt(3), .jf(15));
      15: return ins(OP_ST,   .a(SRC_R5), .crf(6), .i2(SRC_R1));
      16: return ins(OP_ADD,  .rd(1), .wr(1), .a(SRC_R1), .b(SRC_CRF), .crf(9));
      17: return ins(OP_SLT,  .a(SRC_R1), .b(SRC_CRF), .crf(11));
      18: return ins(OP_CJMP, .jt(1), .jf(19));
      default: return ins(OP_EXIT);
    endcase
  endfunction

  function automatic logic [7:0] lane(input logic [31:0] w, input int l);
    return w[8*l +: 8];
  endfunction

  logic [31:0] X [XH][XW];
  logic [7:0]  W [KS][KS];

  initial begin
    logic [63:0] p [$];
    logic [31:0] d, vals [$];
    int base;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < XH; r++) for (int c = 0; c < XW; c++) begin
      X[r][c] = {rnd_fp(5, 2, 15, 2)[7:0], rnd_fp(5, 2, 15, 2)[7:0],
                 rnd_fp(5, 2, 15, 2)[7:0], rnd_fp(5, 2, 15, 2)[7:0]};
      hwrite(X_B + 4 * (r * XW + c), X[r][c]);
    end
    for (int u = 0; u < KS; u++) for (int v = 0; v < KS; v++) begin
      W[u][v] = rnd_fp(5, 2, 14, 2)[7:0];
      hwrite(W_B + 4 * (u * KS + v), {4{W[u][v]}});
    end
    for (int n = 0; n < 20; n++) p.push_back(prog(n));
    rec_irf(8'hFF, 0, p);
    vals = '{offs(0, 1, 0, 1), rowcfg(XW, 2)};                       rec_crf(8'hFF, 1, vals);
    vals = '{W_B, offs(0, 1, 0, 1), rowcfg(KS, 2)};                  rec_crf(8'hFF, 3, vals);
    vals = '{offs(0, 1, 0, 1), rowcfg(0, 2), 1, KS, OW};             rec_crf(8'hFF, 7, vals);
    for (int q = 0; q < NPE; q++) begin
      vals = '{X_B + 4 * XW * q};                rec_crf(8'(1 << q), 0, vals);
      vals = '{O_B + 4 * OW * q};                rec_crf(8'(1 << q), 6, vals);
    end
    img.push_back(hdr(1, 1, 0, 0, 8'h00));
    base = 0;
    foreach (img[i]) begin
      @(negedge clk); ctx_we = 1; ctx_waddr = 10'(base + i); ctx_wdata = img[i];
    end
    @(negedge clk); ctx_we = 0;
    @(negedge clk); start = 1; ctx_base = 10'(base);
    @(negedge clk); start = 0;
    wait (done);
    @(posedge clk); @(negedge clk);
    chk(!busy, "busy dropped");
    chk(t_done - t_start == SCHED + n_stall,
        $sformatf("run time %0d exp %0d", t_done - t_start, SCHED + n_stall));
    for (int r = 0; r < NPE; r++) for (int c = 0; c < OW; c++) begin
      hread(O_B + 4 * (r * OW + c), d);
      for (int l = 0; l < 4; l++) begin
        logic [31:0] acc, m;
        acc = 0;
        for (int u = 0; u < KS; u++) for (int v = 0; v < KS; v++) begin
          m   = ref_op(2, 32'(lane(X[r + u][c + v], l)), 32'(W[u][v]), 5, 2);
          acc = ref_op(0, acc, m, 5, 2);
        end
        chk(lane(d, l) == acc[7:0],
            $sformatf("OUT[%0d][%0d] lane %0d got %h exp %h", r, c, l, lane(d, l), acc[7:0]));
      end
    end
    $display("cycles %0d (schedule %0d, stall cycles %0d), binary8 fmul on PE_13 %0d, column-loop exits %0d",
             t_done - t_start, SCHED, n_stall, n_fmul, n_exit_c);
    chk(n_stall > 0, "memory stalls");
    chk(n_fmul == OW * KS * KS, "SIMD multiplies on one PE");
    chk(n_exit_c == 1, "outer loop exit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
