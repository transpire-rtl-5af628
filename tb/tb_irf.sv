// tb_irf: self-checking testbench of the instruction register file. Random
// writes (including out-of-range addresses, which must be ignored) against a
// reference array; every address is read back after each write.
module tb_irf;
  logic clk = 0, rst_n = 0, we;
  logic [4:0] waddr, raddr;
  logic [63:0] wdata, rdata;
  logic [63:0] model [32];
  int checks = 0, failures = 0;
  irf dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      we = 1; waddr = 5'($urandom_range(0, 24)); wdata = {$urandom, $urandom};
      if (waddr < 21) model[waddr] = wdata;
      @(negedge clk);
      we = 0;
      for (int r = 0; r < 32; r++) begin
        raddr = 5'(r); #1;
        checks++;
        if (rdata !== model[r]) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d got %h exp %h", r, rdata, model[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
