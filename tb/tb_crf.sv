// tb_crf: self-checking testbench of the constant register file. Random
// writes against a reference array; the three read ports (idx, idx+1,
// idx+2) are checked for every idx, including ones running past the end.
module tb_crf;
  logic clk = 0, rst_n = 0, we;
  logic [4:0] waddr, idx;
  logic [31:0] wdata;
  logic [31:0] rdata [3];
  logic [31:0] model [40];
  int checks = 0, failures = 0;
  crf dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; waddr = 0; wdata = 0; idx = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1; waddr = 5'($urandom_range(0, 23)); wdata = $urandom;
      if (waddr < 20) model[waddr] = wdata;
      @(negedge clk);
      we = 0;
      for (int r = 0; r < 32; r++) begin
        idx = 5'(r); #1;
        for (int p = 0; p < 3; p++) begin
          checks++;
          if (rdata[p] !== model[r + p]) begin
            failures++;
            if (failures < 10) $display("FAIL idx %0d port %0d got %h exp %h", r, p, rdata[p], model[r + p]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
