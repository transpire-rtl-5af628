// tb_context_memory: self-checking testbench of the context memory. Fills it
// through the write port, then reads random words through the read port and
// checks them one cycle later, also with simultaneous writes.
module tb_context_memory;
  logic clk = 0, we, re;
  logic [9:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;
  context_memory dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); we = 1; waddr = 10'(a); wdata = $urandom; model[a] = wdata;
    end
    for (int n = 0; n < 10000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); waddr = 10'($urandom); wdata = $urandom;
      re = 1; raddr = 10'($urandom);
      if (waddr == raddr) we = 0;
      begin
        automatic logic [31:0] e = model[raddr];
        if (we) model[waddr] = wdata;
        @(negedge clk);
        we = 0; re = 0;
        checks++;
        if (rdata !== e) begin
          failures++;
          if (failures < 10) $display("FAIL got %h exp %h", rdata, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
