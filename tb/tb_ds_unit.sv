// tb_ds_unit: self-checking testbench of the binary16alt divide/square-root
// unit. Issues random divisions and square roots, holds `adv` low for a
// random number of cycles in between to imitate array stalls, and compares
// the result presented in the fifth advancing cycle with double-precision
// reference values truncated to binary16alt. Also checks special cases.
module tb_ds_unit;
  import fp_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start, adv, is_sqrt;
  logic [15:0] a, b, y;
  int checks = 0, failures = 0;

  ds_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // returns the value of y in the 5th advancing cycle of the operation
  task automatic run(input logic sq, input logic [15:0] x, input logic [15:0] z, input bit stalls,
                     output logic [15:0] r);
    @(negedge clk);
    is_sqrt = sq; a = x; b = z; start = 1; adv = 1;
    for (int c = 2; c <= 5; c++) begin
      @(negedge clk);
      start = 0; a = 16'($urandom); b = 16'($urandom);
      if (stalls) while ($urandom_range(0, 2) == 0) begin adv = 0; @(negedge clk); end
      adv = 1;
    end
    r = y;
  endtask

  task automatic check(input logic [15:0] got, input logic [31:0] exp, input string what,
                       input logic [15:0] x, input logic [15:0] z);
    checks++;
    if (32'(got) !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: a=%h b=%h got=%h exp=%h", what, x, z, got, exp);
    end
  endtask

  initial begin
    logic [15:0] x, z, r;
    start = 0; adv = 0; is_sqrt = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      x = rnd_fp(8, 7, 127, 126)[15:0];
      z = rnd_fp(8, 7, 127, 126)[15:0];
      if (n % 40 == 3) z = x;
      run(1'b0, x, z, n % 4 == 0, r);
      check(r, ref_op(3, 32'(x), 32'(z), 8, 7), "div", x, z);
      x[15] = 1'b0;
      run(1'b1, x, 16'h0, n % 4 == 1, r);
      check(r, ref_sqrt(32'(x), 8, 7), "sqrt", x, 16'h0);
    end
    // special cases
    run(1'b0, 16'h3F80, 16'h0000, 0, r); check(r, 32'h7F80, "1/0", 16'h3F80, 0);
    run(1'b0, 16'h0000, 16'h0000, 0, r); check(r, 32'h7FC0, "0/0", 0, 0);
    run(1'b0, 16'hBF80, 16'h7F80, 0, r); check(r, 32'h8000, "-1/inf", 16'hBF80, 16'h7F80);
    run(1'b1, 16'hBF80, 16'h0000, 0, r); check(r, 32'h7FC0, "sqrt(-1)", 16'hBF80, 0);
    run(1'b1, 16'h4080, 16'h0000, 0, r); check(r, 32'h4000, "sqrt(4)", 16'h4080, 0);
    run(1'b1, 16'h7F80, 16'h0000, 0, r); check(r, 32'h7F80, "sqrt(inf)", 16'h7F80, 0);
    run(1'b0, 16'h7F00, 16'h0080, 0, r); check(r, 32'h7F7F, "overflow", 16'h7F00, 16'h0080);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
