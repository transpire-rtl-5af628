// tb_rrf: self-checking testbench of the regular register file. Random
// writes against a reference array; all six read ports read random
// registers every cycle.
module tb_rrf;
  logic clk = 0, rst_n = 0, we;
  logic [2:0] waddr;
  logic [31:0] wdata;
  logic [2:0] raddr [6];
  logic [31:0] rdata [6];
  logic [31:0] model [8];
  int checks = 0, failures = 0;
  rrf dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; waddr = 0; wdata = 0;
    foreach (raddr[i]) raddr[i] = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 6; p++) raddr[p] = 3'($urandom);
      #1;
      for (int p = 0; p < 6; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d reg %0d got %h exp %h", p, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      we = ($urandom_range(0, 1) == 1); waddr = 3'($urandom); wdata = $urandom;
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
