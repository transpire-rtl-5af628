// tb_dwt: workload testbench running one level of a Haar discrete wavelet
// transform in binary8 on the TRANSPIRE system at its default size.
//
// lo[i] = (x[2i] + x[2i+1]) * 0.5 and hi[i] = (x[2i] - x[2i+1]) * 0.5 for a
// signal of 64 words; every word holds four binary8 lanes (four channels
// transformed together). PE p handles the four pairs starting at pair 4p:
// one program broadcast to all eight PEs, per-PE base addresses in the CRF,
// and FAGU strides of two words for the input and one for the outputs.
// Expected values come from reference binary8 arithmetic in the same order;
// the run time must equal the static schedule plus the counted stall cycles.
module tb_dwt;
  import transpire_pkg::*;
  import transpire_asm_pkg::*;
  import fp_ref_pkg::*;

  localparam int NPE = 8, PAIRS = 4, LEN = 2 * PAIRS * NPE;
  localparam logic [31:0] X_B = 32'h0000, LO_B = 32'h0400, HI_B = 32'h0800;
  localparam logic [31:0] HALF = 32'h3838_3838;       // 0.5 in four binary8 lanes
  // MOV, then per pair LD LD FADD FSUB FMUL FMUL (2 each) ST ST ADD SLT CJMP
  // (1 each), EXIT, and the done pulse
  localparam int SCHED = 1 + PAIRS * 17 + 1 + 1;

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
    if (dut.u_array.g_row[1].g_col[0].u_pe.retire &&
        dut.u_array.g_row[1].g_col[0].u_pe.ins.op == OP_FSUB &&
        dut.u_array.g_row[1].g_col[0].u_pe.ins.fmt == FMT_B8) n_fsub++;
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

  // R1 = pair index, R2/R3 = even/odd sample, R4 = low band, R5 = high band
  function automatic logic [63:0] prog(input int n);
    case (n)
      0:  return ins(OP_MOV,  .rd(1), .wr(1));
      1:  return ins(OP_LD,   .rd(2), .wr(1), .crf(0), .i0(SRC_R1));
      2:  return ins(OP_LD,   .rd(3), .wr(1), .crf(3), .i0(SRC_R1));
      3:  return ins(OP_FADD, .rd(4), .wr(1), .a(SRC_R2), .b(SRC_R3), .fmt(FMT_B8));
      4:  return ins(OP_FSUB, .rd(5), .wr(1), .a(SRC_R2), .b(SRC_R3), .fmt(FMT_B8));
      5:  return ins(OP_FMUL, .rd(4), .wr(1), .a(SRC_R4), .b(SRC_CRF), .crf(12), .fmt(FMT_B8));
      6:  return ins(OP_FMUL, .rd(5), .wr(1), .a(SRC_R5), .b(SRC_CRF), .crf(12), .fmt(FMT_B8));
      7:  return ins(OP_ST,   .a(SRC_R4), .crf(6), .i0(SRC_R1));
      8:  return ins(OP_ST,   .a(SRC_R5), .crf(9), .i0(SRC_R1));
      9:  return ins(OP_ADD,  .rd(1), .wr(1), .a(SRC_R1), .b(SRC_CRF), .crf(13));
      10: return ins(OP_SLT,  .a(SRC_R1), .b(SRC_CRF), .crf(14));
      11: return ins(OP_CJMP, .jt(1), .jf(12));
      default: return ins(OP_EXIT);
    endcase
  endfunction

  function automatic logic [31:0] lane(input logic [31:0] w, input int l);
    return 32'(w[8*l +: 8]);
  endfunction

  logic [31:0] X [LEN];

  initial begin
    logic [63:0] p [$];
    logic [31:0] d, e, vals [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < LEN; i++) begin
      X[i] = {rnd_fp(5, 2, 15, 3)[7:0], rnd_fp(5, 2, 15, 3)[7:0],
              rnd_fp(5, 2, 15, 3)[7:0], rnd_fp(5, 2, 15, 3)[7:0]};
      hwrite(X_B + 4 * i, X[i]);
    end
    for (int n = 0; n < 13; n++) p.push_back(prog(n));
    rec_irf(8'hFF, 0, p);
    vals = '{offs(0, 1, 0, 0), rowcfg(2, 2)};                            rec_crf(8'hFF, 1, vals);
    vals = '{offs(0, 1, 0, 0), rowcfg(2, 2)};                            rec_crf(8'hFF, 4, vals);
    vals = '{offs(0, 1, 0, 0), rowcfg(1, 2)};                            rec_crf(8'hFF, 7, vals);
    vals = '{offs(0, 1, 0, 0), rowcfg(1, 2), HALF, 1, PAIRS};            rec_crf(8'hFF, 10, vals);
    for (int q = 0; q < NPE; q++) begin
      vals = '{X_B + 4 * 2 * PAIRS * q};         rec_crf(8'(1 << q), 0, vals);
      vals = '{X_B + 4 * 2 * PAIRS * q + 4};     rec_crf(8'(1 << q), 3, vals);
      vals = '{LO_B + 4 * PAIRS * q};            rec_crf(8'(1 << q), 6, vals);
      vals = '{HI_B + 4 * PAIRS * q};            rec_crf(8'(1 << q), 9, vals);
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
    for (int i = 0; i < LEN / 2; i++) begin
      for (int b = 0; b < 2; b++) begin
        hread((b != 0 ? HI_B : LO_B) + 4 * i, d);
        for (int l = 0; l < 4; l++) begin
          e = ref_op(b, lane(X[2 * i], l), lane(X[2 * i + 1], l), 5, 2);
          e = ref_op(2, e, lane(HALF, l), 5, 2);
          chk(lane(d, l) == e, $sformatf("%s[%0d] lane %0d got %h exp %h",
                                         b != 0 ? "hi" : "lo", i, l, lane(d, l), e));
        end
      end
    end
    $display("cycles %0d (schedule %0d, stall cycles %0d), binary8 subtractions on PE_10 %0d",
             t_done - t_start, SCHED, n_stall, n_fsub);
    chk(n_fsub == PAIRS, "SIMD subtractions on one PE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
