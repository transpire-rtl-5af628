// tb_pe_is: self-checking testbench of the Instruction Synchronizer.
// Feeds random latencies of 1, 2 and 5 cycles with random stall cycles and
// checks that fetch enable comes exactly in the last advancing cycle of
// each operation and that `first` marks the issue cycle.
module tb_pe_is;
  logic clk = 0, rst_n = 0, clear, adv;
  logic [2:0] lat;
  logic first, fetch_en;
  int checks = 0, failures = 0;
  pe_is dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int l, k;
    clear = 0; adv = 0; lat = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      case ($urandom_range(0, 2)) 0: l = 1; 1: l = 2; default: l = 5; endcase
      k = 0;
      while (k < l) begin
        @(negedge clk);
        lat = 3'(l);
        adv = ($urandom_range(0, 3) != 0);
        #1;
        checks++;
        if (first !== (k == 0) || fetch_en !== (adv && k == l - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL lat=%0d k=%0d adv=%0b first=%0b fe=%0b", l, k, adv, first, fetch_en);
        end
        if (adv) k++;
      end
    end
    // clear restarts the count
    @(negedge clk); lat = 5; adv = 1;
    @(negedge clk); clear = 1; adv = 0;
    @(negedge clk); clear = 0; #1;
    checks++; if (!first) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
