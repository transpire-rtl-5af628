// tb_tcdm_bank: self-checking testbench of a TCDM bank. Random byte-enabled
// writes and reads against a reference array; read data is checked in the
// cycle after the request. Uses a reduced depth.
module tb_tcdm_bank;
  logic clk = 0, req, we;
  logic [3:0] be;
  logic [7:0] addr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [256];
  int checks = 0, failures = 0;
  tcdm_bank #(.WORDS(256)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    req = 0; we = 0; be = 0; addr = 0; wdata = 0;
    for (int a = 0; a < 256; a++) begin      // initialise
      @(negedge clk); req = 1; we = 1; be = 4'hF; addr = 8'(a); wdata = $urandom; model[a] = wdata;
    end
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      req = ($urandom_range(0, 4) != 0); we = $urandom_range(0, 1); be = 4'($urandom);
      addr = 8'($urandom); wdata = $urandom;
      if (req && we) for (int b = 0; b < 4; b++) if (be[b]) model[addr][8*b +: 8] = wdata[8*b +: 8];
      if (req && !we) begin
        automatic logic [31:0] e = model[addr];
        @(negedge clk);
        req = 0;
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
