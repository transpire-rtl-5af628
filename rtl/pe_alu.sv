// pe_alu: integer ALU of a TRANSPIRE processing element.
//
// Single-cycle, combinational. Performs the integer operations of the PE
// instruction set on 32-bit operands: add, subtract, multiply (low 32 bits),
// and, or, xor, shifts by b[4:0], signed/unsigned less-than and equality
// (result 1 or 0, also on `cond` for the condition register) and move (y = a).
// The architecture only states that each PE has an ALU for integer
// operations; the operation set is this design's own.
module pe_alu
  import transpire_pkg::*;
(
  input  opcode_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        cond
);
  always_comb begin
    cond = 1'b0;
    case (op)
      OP_SLT:  cond = $signed(a) < $signed(b);
      OP_SLTU: cond = a < b;
      OP_SEQ:  cond = a == b;
      default: cond = 1'b0;
    endcase
    case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_MUL:  y = a * b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_SLL:  y = a << b[4:0];
      OP_SRL:  y = a >> b[4:0];
      OP_SRA:  y = $unsigned($signed(a) >>> b[4:0]);
      OP_SLT, OP_SLTU, OP_SEQ: y = {31'b0, cond};
      OP_MOV:  y = a;
      default: y = '0;
    endcase
  end
endmodule
