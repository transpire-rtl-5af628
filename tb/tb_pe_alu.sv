// tb_pe_alu: self-checking testbench of the integer ALU. Random operands,
// every operation, expected values computed with SystemVerilog integer
// arithmetic on `int`/`longint` types.
module tb_pe_alu;
  import transpire_pkg::*;
  opcode_e op;
  logic [31:0] a, b, y;
  logic cond;
  int checks = 0, failures = 0;
  logic clk = 0;
  pe_alu dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    opcode_e ops [13] = '{OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL,
                          OP_SRA, OP_SLT, OP_SLTU, OP_SEQ, OP_MOV};
    longint e;
    int sa, sb;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      op = ops[n % 13];
      a = $urandom; b = (n % 7 == 0) ? a : $urandom;
      if (n % 5 == 0) b = 32'($urandom_range(0, 40));
      #1;
      sa = int'(a); sb = int'(b);
      case (op)
        OP_ADD:  e = longint'(sa) + longint'(sb);
        OP_SUB:  e = longint'(sa) - longint'(sb);
        OP_MUL:  e = longint'(sa) * longint'(sb);
        OP_AND:  e = longint'(a & b);
        OP_OR:   e = longint'(a | b);
        OP_XOR:  e = longint'(a ^ b);
        OP_SLL:  e = longint'({32'h0, a}) * (64'd1 << (b % 32));
        OP_SRL:  e = longint'({32'h0, a}) / (64'd1 << (b % 32));
        OP_SRA:  e = longint'(sa) >>> (b % 32);
        OP_SLT:  e = (sa < sb) ? 1 : 0;
        OP_SLTU: e = ({32'h0, a} < {32'h0, b}) ? 1 : 0;
        OP_SEQ:  e = (a == b) ? 1 : 0;
        default: e = longint'(a);
      endcase
      checks++;
      if (y !== e[31:0]) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, e[31:0]);
      end
      if (op inside {OP_SLT, OP_SLTU, OP_SEQ}) begin
        checks++;
        if (cond !== e[0]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
