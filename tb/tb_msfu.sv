// tb_msfu: self-checking testbench of the mini-smallFloat unit.
// Drives random SIMD binary16alt and binary8 add/sub/mul operations, checks
// each lane against double-precision reference arithmetic one cycle after
// issue (the 2-cycle latency), checks binary32 abs and less-than in the issue
// cycle, and checks hand-written infinity/NaN/zero cases.
module tb_msfu;
  import transpire_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start;
  opcode_e op;
  fmt_e fmt;
  logic [31:0] a, b, y;
  logic lt;
  int checks = 0, failures = 0;

  msfu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: a=%h b=%h got=%h exp=%h", what, a, b, got, exp);
    end
  endtask

  // issue a 2-cycle op, return the result seen in the second cycle
  task automatic run2(input opcode_e o, input fmt_e f, input logic [31:0] x, input logic [31:0] z,
                      output logic [31:0] r);
    @(negedge clk);
    op = o; fmt = f; a = x; b = z; start = 1;
    @(negedge clk);
    start = 0; a = $urandom; b = $urandom;   // operands may change after issue
    r = y;
  endtask

  function automatic int opi(opcode_e o);
    return (o == OP_FADD) ? 0 : (o == OP_FSUB) ? 1 : 2;
  endfunction

  initial begin
    logic [31:0] x, z, r, e;
    opcode_e o;
    start = 0; op = OP_NOP; fmt = FMT_H16; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // binary16alt SIMD
    for (int n = 0; n < 6000; n++) begin
      int ec = int'($urandom_range(20, 235));
      o = opcode_e'((n % 3 == 0) ? OP_FADD : (n % 3 == 1) ? OP_FSUB : OP_FMUL);
      if (o == OP_FMUL) begin
        x = {rnd_fp(8, 7, 127, 126)[15:0], rnd_fp(8, 7, 127, 126)[15:0]};
        z = {rnd_fp(8, 7, 127, 126)[15:0], rnd_fp(8, 7, 127, 126)[15:0]};
      end else begin
        x = {rnd_fp(8, 7, ec, 10)[15:0], rnd_fp(8, 7, ec, 10)[15:0]};
        z = {rnd_fp(8, 7, ec, 10)[15:0], rnd_fp(8, 7, ec, 10)[15:0]};
      end
      if (n % 50 == 7) z[15:0] = x[15:0];          // exact cancellation / doubling
      if (n % 50 == 9) z[31:16] = 16'h0000;        // zero operand
      run2(o, FMT_H16, x, z, r);
      for (int l = 0; l < 2; l++) begin
        e = ref_op(opi(o), 32'(x[16*l +: 16]), 32'(z[16*l +: 16]), 8, 7);
        a = x; b = z;
        check(32'(r[16*l +: 16]), e, "b16alt");
      end
    end
    // binary8 SIMD, all finite operand pairs per operation
    for (int oo = 0; oo < 3; oo++) begin
      o = opcode_e'((oo == 0) ? OP_FADD : (oo == 1) ? OP_FSUB : OP_FMUL);
      for (int i = 0; i < 248; i++) begin
        for (int j = 0; j < 248; j += 4) begin
          logic [7:0] va, vb [4];
          va = 8'(((i / 124) << 7) | (i % 124));
          for (int l = 0; l < 4; l++) vb[l] = 8'((((j + l) / 124) << 7) | ((j + l) % 124));
          x = {va, va, va, va};
          z = {vb[3], vb[2], vb[1], vb[0]};
          run2(o, FMT_B8, x, z, r);
          for (int l = 0; l < 4; l++) begin
            e = ref_op(opi(o), 32'(va), 32'(vb[l]), 5, 2);
            a = x; b = z;
            check(32'(r[8*l +: 8]), e, "binary8");
          end
        end
      end
    end
    // special values, binary16alt lane 0
    run2(OP_FADD, FMT_H16, 32'h7F80, 32'hFF80, r); check(32'(r[15:0]), 32'h7FC0, "inf-inf");
    run2(OP_FMUL, FMT_H16, 32'h7F80, 32'h0000, r); check(32'(r[15:0]), 32'h7FC0, "inf*0");
    run2(OP_FADD, FMT_H16, 32'h7F80, 32'h3F80, r); check(32'(r[15:0]), 32'h7F80, "inf+1");
    run2(OP_FMUL, FMT_H16, 32'h7F00, 32'h7F00, r); check(32'(r[15:0]), 32'h7F7F, "overflow");
    run2(OP_FMUL, FMT_H16, 32'h0080, 32'h0080, r); check(32'(r[15:0]), 32'h0000, "underflow");
    run2(OP_FSUB, FMT_H16, 32'h7FC1, 32'h3F80, r); check(32'(r[15:0]), 32'h7FC0, "nan");
    run2(OP_FADD, FMT_B8,  32'h7C, 32'h3C, r);     check(32'(r[7:0]), 32'h7C, "b8 inf+1");
    // binary32 abs and less-than: combinational in the issue cycle
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      x = rnd_fp(8, 23, 127, 30); z = (n % 10 == 0) ? x : rnd_fp(8, 23, 127, 30);
      if (n % 17 == 0) begin x = 32'h8000_0000; z = 0; end
      a = x; b = z; op = OP_FLT; start = 1;
      #1;
      checks++;
      if (lt !== (fp_to_real(x, 8, 23) < fp_to_real(z, 8, 23)) || y !== {31'b0, lt}) begin
        failures++; $display("FAIL flt %h %h", x, z);
      end
      op = OP_FABS;
      #1;
      check(y, {1'b0, x[30:0]}, "fabs");
    end
    start = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
