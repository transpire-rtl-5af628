// tb_dma_controller: self-checking testbench of the context DMA. Writes a
// random set of IRF and CRF records (random PE masks, start indices and
// counts, one empty record) into a context memory, runs the DMA and checks
// every context-bus write against the list expected from the records, and
// that done pulses once at the end.
module tb_dma_controller;
  import transpire_pkg::*;
  logic clk = 0, rst_n = 0, start, re, busy, done;
  logic [9:0] base, raddr;
  logic [31:0] rdata;
  ctx_bus_t ctx;
  logic cm_we = 0;
  logic [9:0] cm_waddr = 0;
  logic [31:0] cm_wdata = 0;
  ctx_bus_t expq [$];
  int checks = 0, failures = 0, dones = 0;

  context_memory u_cm (.clk, .we(cm_we), .waddr(cm_waddr), .wdata(cm_wdata), .re, .raddr, .rdata);
  dma_controller dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); cm_we = 1; cm_waddr = 10'(a); cm_wdata = d;
    @(negedge clk); cm_we = 0;
  endtask
  always @(posedge clk) if (rst_n) begin
    if (done) dones++;
    if (ctx.we) begin
      ctx_bus_t e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected write"); end
      else begin
        e = expq.pop_front();
        if (ctx !== e) begin
          failures++;
          if (failures < 10) $display("FAIL ctx %h exp %h", ctx, e);
        end
      end
    end
  end
  initial begin
    int a;
    start = 0; base = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      a = 100 + run * 7;
      base = 10'(a);
      for (int r = 0; r < 6; r++) begin
        logic crf; logic [4:0] cnt, idx; logic [7:0] mask; logic last;
        crf = $urandom_range(0, 1); cnt = (r == 2) ? 5'd0 : 5'($urandom_range(1, 20));
        idx = 5'($urandom_range(0, 20)); mask = 8'($urandom); last = (r == 5);
        wr(a, {last, 12'h0, crf, cnt, idx, mask}); a++;
        for (int k = 0; k < cnt; k++) begin
          ctx_bus_t e;
          logic [31:0] lo, hi;
          lo = $urandom; hi = $urandom;
          wr(a, lo); a++;
          if (!crf) begin wr(a, hi); a++; end
          e.we = 1; e.pe_mask = mask; e.is_crf = crf; e.idx = 5'(idx + k);
          e.data = crf ? {32'h0, lo} : {hi, lo};
          expq.push_back(e);
        end
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      checks++; if (!busy) failures++;
      wait (done);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (expq.size() != 0 || dones != run + 1 || busy) begin
        failures++; $display("FAIL end of run %0d: %0d writes missing", run, expq.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
