// tb_pe_controller: self-checking testbench of the PE controller (PC, jump
// register, condition register). A reference model of the PC, halt flag and
// CR is stepped alongside random instructions, random fetch enables and
// random condition vectors from the other PEs.
module tb_pe_controller;
  import transpire_pkg::*;
  logic clk = 0, rst_n = 0, start, fetch_en, cr_we, cr_in;
  opcode_e op;
  logic [4:0] jt, jf, pc;
  logic [7:0] cr_all;
  logic halted, cr, jump_taken;
  int checks = 0, failures = 0;
  pe_controller dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [4:0] m_pc; logic m_halt, m_cr;
    opcode_e ops [6] = '{OP_NOP, OP_ADD, OP_JMP, OP_CJMP, OP_EXIT, OP_SLT};
    start = 0; fetch_en = 0; cr_we = 0; cr_in = 0; op = OP_NOP; jt = 0; jf = 0; cr_all = 0;
    m_pc = 0; m_halt = 1; m_cr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      checks++;
      if (pc !== m_pc || halted !== m_halt || cr !== m_cr) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d pc=%0d/%0d halt=%0b/%0b cr=%0b/%0b", n, pc, m_pc, halted, m_halt, cr, m_cr);
      end
      start = (m_halt && $urandom_range(0, 3) == 0);
      op = ops[$urandom_range(0, 5)];
      if (op == OP_EXIT && $urandom_range(0, 3) != 0) op = OP_NOP;
      jt = 5'($urandom_range(0, 20)); jf = 5'($urandom_range(0, 20));
      cr_all = ($urandom_range(0, 1) == 1) ? 8'(1 << $urandom_range(0, 7)) : 8'h0;
      fetch_en = !m_halt && !start && ($urandom_range(0, 2) != 0);
      cr_we = (op == OP_SLT); cr_in = $urandom_range(0, 1);
      #1;
      checks++;
      if (jump_taken !== (fetch_en && (op == OP_JMP || op == OP_CJMP))) failures++;
      if (start) begin
        m_pc = 0; m_halt = 0; m_cr = 0;
      end else if (fetch_en) begin
        if (cr_we) m_cr = cr_in;
        if (op == OP_EXIT) m_halt = 1;
        else if (op == OP_JMP) m_pc = jt;
        else if (op == OP_CJMP) m_pc = (cr_all != 0) ? jt : jf;
        else m_pc = m_pc + 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
