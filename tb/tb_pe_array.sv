// tb_pe_array: self-checking testbench of the 4x2 PE array.
// One program is broadcast to all eight PEs and per-PE constants are sent
// with single-PE masks. Each PE puts its id+1 in its OPR, gathers the OPRs
// of its N, S, W and E torus neighbours into one word and stores it; only
// PE_11 sets its CR, and a conditional jump taken by every PE proves the
// CR broadcast; each PE then stores its OPR and the result of a binary16alt
// divide (non-zero only on the three DS tiles). All PEs store in the same
// cycles, and the memory model grants at random, so the array stalls.
module tb_pe_array;
  import transpire_pkg::*;
  import transpire_asm_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, start = 0, busy, done, stall;
  ctx_bus_t ctx;
  tcdm_req_t mem_req [N];
  logic mem_gnt [N], mem_rvalid [N];
  logic [31:0] mem_rdata [N];
  logic [N-1:0] retire, jump_taken, cr_bits;
  logic [31:0] mem [logic [31:0]];
  int checks = 0, failures = 0, stalls = 0, jumps = 0, dones = 0;

  pe_array dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always_comb for (int p = 0; p < N; p++) mem_gnt[p] = mem_req[p].req && ($urandom_range(0, 1) == 1);
  always @(posedge clk) begin
    for (int p = 0; p < N; p++) begin
      mem_rvalid[p] <= mem_req[p].req && mem_gnt[p];
      if (mem_req[p].req && mem_gnt[p]) begin
        if (mem_req[p].we) mem[mem_req[p].addr] = mem_req[p].wdata;
        else mem_rdata[p] <= mem.exists(mem_req[p].addr) ? mem[mem_req[p].addr] : 0;
      end
    end
    if (stall) stalls++;
    jumps += $countones(jump_taken);
    if (done) dones++;
  end
  task automatic put(input logic [7:0] mask, input bit is_crf, input int idx, input logic [63:0] d);
    @(negedge clk);
    ctx = '{we: 1, pe_mask: mask, is_crf: is_crf, idx: 5'(idx), data: d};
    @(negedge clk);
    ctx = '0;
  endtask
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  function automatic int id(int r, int c); return ((r + 2) % 2) * 4 + (c + 4) % 4; endfunction

  initial begin
    logic [63:0] prog [16];
    ctx = '0;
    prog[0]  = ins(OP_MOV,  .wo(1), .a(SRC_CRF), .crf(0));
    prog[1]  = ins(OP_SLL,  .rd(1), .wr(1), .a(SRC_N), .b(SRC_CRF), .crf(1));
    prog[2]  = ins(OP_SLL,  .rd(2), .wr(1), .a(SRC_S), .b(SRC_CRF), .crf(2));
    prog[3]  = ins(OP_OR,   .rd(1), .wr(1), .a(SRC_R1), .b(SRC_R2));
    prog[4]  = ins(OP_SLL,  .rd(2), .wr(1), .a(SRC_W), .b(SRC_CRF), .crf(3));
    prog[5]  = ins(OP_OR,   .rd(1), .wr(1), .a(SRC_R1), .b(SRC_R2));
    prog[6]  = ins(OP_OR,   .rd(1), .wr(1), .a(SRC_R1), .b(SRC_E));
    prog[7]  = ins(OP_ST,   .a(SRC_R1), .crf(4));
    prog[8]  = ins(OP_SEQ,  .rd(3), .wr(1), .a(SRC_CRF), .b(SRC_OPR), .crf(7));
    prog[9]  = ins(OP_NOP);
    prog[10] = ins(OP_CJMP, .jt(11), .jf(15));
    prog[11] = ins(OP_ST,   .a(SRC_OPR), .crf(8));
    prog[12] = ins(OP_FDIV, .rd(4), .wr(1), .a(SRC_CRF), .b(SRC_CRF), .crf(11));
    prog[13] = ins(OP_ST,   .a(SRC_R4), .crf(12));
    prog[14] = ins(OP_EXIT);
    prog[15] = ins(OP_EXIT);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) put(8'hFF, 0, i, prog[i]);
    // shared constants, one broadcast each
    put(8'hFF, 1, 1, 24); put(8'hFF, 1, 2, 16); put(8'hFF, 1, 3, 8);
    put(8'hFF, 1, 5, 0);  put(8'hFF, 1, 6, 0);  put(8'hFF, 1, 9, 0);  put(8'hFF, 1, 10, 0);
    put(8'hFF, 1, 11, 32'h4040);   // 3.0 binary16alt
    put(8'hFF, 1, 14, 0); put(8'hFF, 1, 15, 0);
    for (int p = 0; p < N; p++) begin
      logic [7:0] m;
      m = 8'(1 << p);
      put(m, 1, 0, p + 1);
      put(m, 1, 4, 32'h100 + 4 * p);
      put(m, 1, 7, (p == 5) ? 32'd6 : 32'd99);
      put(m, 1, 8, 32'h200 + 4 * p);
      put(m, 1, 12, 32'h300 + 4 * p);
      put(m, 1, 13, 0);
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    chk(busy, "busy after start");
    wait (done);
    @(posedge clk);
    @(negedge clk);
    chk(!busy && dones == 1, "done once, busy dropped");
    for (int r = 0; r < 2; r++) for (int c = 0; c < 4; c++) begin
      int p;
      logic [31:0] e;
      p = id(r, c);
      e = {8'(id(r - 1, c) + 1), 8'(id(r + 1, c) + 1), 8'(id(r, c - 1) + 1), 8'(id(r, c + 1) + 1)};
      chk(mem[32'h100 + 4 * p] == e, $sformatf("PE%0d neighbours %h exp %h", p, mem[32'h100 + 4 * p], e));
      chk(mem.exists(32'h200 + 4 * p) && mem[32'h200 + 4 * p] == p + 1, $sformatf("PE%0d took the cjump", p));
      chk(mem[32'h300 + 4 * p] == ((p < 3) ? 32'h3F80 : 32'h0), $sformatf("PE%0d DS result %h", p, mem[32'h300 + 4 * p]));
    end
    chk(stalls > 0, "array stalled");
    chk(jumps == N, "eight taken jumps");
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
