// tb_pe_fagu: self-checking testbench of the address generator. Random
// descriptors and indices; the expected address is computed with 64-bit
// integer arithmetic from the formula base + (((i+A)(j+B))ROW + (k+C)(l+D)) << SH.
module tb_pe_fagu;
  logic [31:0] base, offs, rowcfg, i, j, k, l, addr;
  int checks = 0, failures = 0;
  logic clk = 0;
  pe_fagu dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    longint e, A, B, C, D;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      base = $urandom; offs = $urandom; rowcfg = $urandom;
      i = $urandom_range(0, 300); j = $urandom_range(0, 300);
      k = $urandom_range(0, 300); l = $urandom_range(0, 300);
      #1;
      A = longint'($signed(offs[7:0]));   B = longint'($signed(offs[15:8]));
      C = longint'($signed(offs[23:16])); D = longint'($signed(offs[31:24]));
      e = longint'(base) + ((((longint'(i) + A) * (longint'(j) + B)) * longint'(rowcfg[15:0])
          + (longint'(k) + C) * (longint'(l) + D)) * (64'sd1 <<< rowcfg[17:16]));
      checks++;
      if (addr !== e[31:0]) begin
        failures++;
        if (failures < 10) $display("FAIL got %h exp %h", addr, e[31:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
