// tb_pe: self-checking testbench of one processing element (with DS unit).
// Loads a program and constants over the context bus and runs a loop of
// four iterations: two word loads through the FAGU, a binary16alt SIMD
// multiply-add, a binary16alt divide and square root, shifts/or, two stores,
// counter increment, compare and conditional jump; then a binary8 SIMD
// multiply of two neighbour OPRs, a store, a binary32 compare of neighbour
// values and an abs written to the OPR. Results in the memory model are
// compared with reference arithmetic. Run 1 grants every request and must
// take exactly the cycle count the operation latencies add up to; run 2
// grants at random and must take that count plus the stall cycles.
module tb_pe;
  import transpire_pkg::*;
  import transpire_asm_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, stall;
  ctx_bus_t ctx;
  logic [31:0] nbr_n, nbr_s, nbr_w, nbr_e, opr;
  logic [7:0] cr_all;
  logic cr, mem_gnt, mem_rvalid, stall_req, halted, retire, jump_taken;
  logic [31:0] mem_rdata;
  tcdm_req_t mem_req;
  logic [31:0] mem [logic [31:0]];
  int checks = 0, failures = 0;
  bit rand_gnt = 0;
  int stall_cycles = 0, jumps = 0;

  pe #(.PE_ID(0), .N_PE(8), .HAS_DS(1'b1)) dut (.*);
  assign stall  = stall_req;
  assign cr_all = {7'b0, cr};
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model: random or permanent grant, response next cycle
  always_comb mem_gnt = mem_req.req && (!rand_gnt || ($urandom_range(0, 2) == 0));
  always @(posedge clk) begin
    mem_rvalid <= mem_req.req && mem_gnt;
    if (mem_req.req && mem_gnt) begin
      if (mem_req.we) begin
        logic [31:0] w;
        w = mem.exists(mem_req.addr) ? mem[mem_req.addr] : 0;
        for (int b = 0; b < 4; b++) if (mem_req.be[b]) w[8*b +: 8] = mem_req.wdata[8*b +: 8];
        mem[mem_req.addr] = w;
      end else mem_rdata <= mem.exists(mem_req.addr) ? mem[mem_req.addr] : 0;
    end
    if (stall_req) stall_cycles++;
    if (jump_taken) jumps++;
  end

  task automatic put(input bit is_crf, input int idx, input logic [63:0] d);
    @(negedge clk);
    ctx = '{we: 1, pe_mask: 8'h01, is_crf: is_crf, idx: 5'(idx), data: d};
    @(negedge clk);
    ctx = '0;
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [63:0] prog [19];
  logic [31:0] cst [20];
  logic [31:0] X [4], Y [4];

  initial begin
    int cyc, exp_cycles;
    logic [31:0] e;
    ctx = '0; nbr_n = 0; nbr_s = 0; nbr_w = 0; nbr_e = 0;
    // constants
    cst[0] = 32'h100; cst[1] = offs(0, 0, 0, 1); cst[2] = rowcfg(0, 2);
    cst[3] = 32'h200; cst[4] = offs(0, 0, 0, 1); cst[5] = rowcfg(0, 2);
    cst[6] = 32'h300; cst[7] = offs(0, 0, 0, 1); cst[8] = rowcfg(0, 2);
    cst[9] = 4; cst[10] = 1; cst[11] = 32'h3FC0_4000; cst[12] = 16;
    cst[13] = 32'h400; cst[14] = offs(0, 0, 0, 1); cst[15] = rowcfg(0, 2);
    cst[16] = 0; cst[17] = 32'h500; cst[18] = 0; cst[19] = 0;
    prog[0]  = ins(OP_MOV,  .rd(1), .wr(1));
    prog[1]  = ins(OP_LD,   .rd(2), .wr(1), .crf(0), .i2(SRC_R1));
    prog[2]  = ins(OP_LD,   .rd(3), .wr(1), .crf(3), .i2(SRC_R1));
    prog[3]  = ins(OP_FMUL, .rd(4), .wr(1), .a(SRC_R2), .b(SRC_R3), .fmt(FMT_H16));
    prog[4]  = ins(OP_FADD, .rd(4), .wr(1), .a(SRC_R4), .b(SRC_CRF), .crf(11), .fmt(FMT_H16));
    prog[5]  = ins(OP_FDIV, .rd(5), .wr(1), .a(SRC_R2), .b(SRC_R3));
    prog[6]  = ins(OP_FSQRT,.rd(6), .wr(1), .a(SRC_R2));
    prog[7]  = ins(OP_SLL,  .rd(6), .wr(1), .a(SRC_R6), .b(SRC_CRF), .crf(12));
    prog[8]  = ins(OP_OR,   .rd(5), .wr(1), .a(SRC_R5), .b(SRC_R6));
    prog[9]  = ins(OP_ST,   .a(SRC_R4), .crf(6), .i2(SRC_R1));
    prog[10] = ins(OP_ST,   .a(SRC_R5), .crf(13), .i2(SRC_R1));
    prog[11] = ins(OP_ADD,  .rd(1), .wr(1), .a(SRC_R1), .b(SRC_CRF), .crf(10));
    prog[12] = ins(OP_SLT,  .rd(7), .wr(1), .a(SRC_R1), .b(SRC_CRF), .crf(9));
    prog[13] = ins(OP_CJMP, .jt(1), .jf(14));
    prog[14] = ins(OP_FMUL, .rd(2), .wr(1), .a(SRC_N), .b(SRC_E), .fmt(FMT_B8));
    prog[15] = ins(OP_ST,   .a(SRC_R2), .crf(17), .fmt(FMT_W32));
    prog[16] = ins(OP_FLT,  .rd(3), .wr(1), .a(SRC_W), .b(SRC_S));
    prog[17] = ins(OP_FABS, .wo(1), .a(SRC_W));
    prog[18] = ins(OP_EXIT);
    // operation latencies: 1 + 4*(2+2+2+2+5+5+1+1+1+1+1+1+1) + 2+1+1+1+1
    exp_cycles = 1 + 4 * 25 + 6;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) put(1, i, {32'h0, cst[i]});
    for (int i = 0; i < 19; i++) put(0, i, prog[i]);
    for (int run = 0; run < 2; run++) begin
      rand_gnt = (run == 1);
      mem.delete();
      for (int i = 0; i < 4; i++) begin
        X[i] = {rnd_fp(8, 7, 127, 6)[15:0], rnd_fp(8, 7, 127, 6)[15:0]};
        X[i][15] = 0;
        Y[i] = {rnd_fp(8, 7, 127, 6)[15:0], rnd_fp(8, 7, 127, 6)[15:0]};
        mem[32'h100 + 4 * i] = X[i];
        mem[32'h200 + 4 * i] = Y[i];
      end
      nbr_n = {8'h38, 8'hBC, 8'h44, 8'h3D}; nbr_e = {8'h3A, 8'h3E, 8'hC1, 8'h40};
      nbr_w = $urandom & 32'h7FFF_FFFF | (run << 31); nbr_w[30:23] = 8'd120;
      nbr_s = 32'h3F80_0000;
      stall_cycles = 0; jumps = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 0;   // cycles from the first issue to the EXIT cycle
      while (!halted) begin @(negedge clk); cyc++; end
      chk(cyc == exp_cycles + stall_cycles, $sformatf("cycles %0d exp %0d + %0d stalls", cyc, exp_cycles, stall_cycles));
      chk(jumps == 4, "jumps");
      if (run == 1) chk(stall_cycles > 0, "stalls happened");
      for (int i = 0; i < 4; i++) begin
        for (int l = 0; l < 2; l++) begin
          logic [31:0] p;
          p = ref_op(2, 32'(X[i][16*l +: 16]), 32'(Y[i][16*l +: 16]), 8, 7);
          e = ref_op(0, p, 32'(cst[11][16*l +: 16]), 8, 7);
          chk(mem[32'h300 + 4 * i][16*l +: 16] == e[15:0], $sformatf("fma i=%0d l=%0d got %h exp %h", i, l, mem[32'h300 + 4*i][16*l +: 16], e[15:0]));
        end
        e = ref_op(3, 32'(X[i][15:0]), 32'(Y[i][15:0]), 8, 7);
        chk(mem[32'h400 + 4 * i][15:0] == e[15:0], $sformatf("div i=%0d", i));
        e = ref_sqrt(32'(X[i][15:0]), 8, 7);
        chk(mem[32'h400 + 4 * i][31:16] == e[15:0], $sformatf("sqrt i=%0d", i));
      end
      for (int l = 0; l < 4; l++) begin
        e = ref_op(2, 32'(nbr_n[8*l +: 8]), 32'(nbr_e[8*l +: 8]), 5, 2);
        chk(mem[32'h500][8*l +: 8] == e[7:0], $sformatf("b8 lane %0d", l));
      end
      chk(cr == (fp_to_real(nbr_w, 8, 23) < 1.0), "flt -> cr");
      chk(opr == {1'b0, nbr_w[30:0]}, "fabs -> opr");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
