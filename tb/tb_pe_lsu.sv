// tb_pe_lsu: self-checking testbench of the load-store unit.
// A small memory model grants requests at random and answers one cycle
// after the grant; the rest of the array stalls at random (adv low). Checks
// that each instruction issues exactly one granted request, with the right
// byte enables and replicated store data, that stall_req is raised while the
// request waits, and that loads return the right zero-extended data when
// they retire, even after stalls.
module tb_pe_lsu;
  import transpire_pkg::*;
  logic clk = 0, rst_n = 0, mem_start, adv, is_store, gnt, rvalid, stall_req;
  fmt_e size;
  logic [31:0] addr, wdata, rdata, ld_data;
  tcdm_req_t req;
  logic [31:0] mem [64];
  int checks = 0, failures = 0, grants = 0;
  pe_lsu dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // memory model
  always @(posedge clk) begin
    rvalid <= req.req && gnt;
    if (req.req && gnt) begin
      grants++;
      if (req.we) begin
        for (int b = 0; b < 4; b++) if (req.be[b]) mem[req.addr[7:2]][8*b +: 8] <= req.wdata[8*b +: 8];
      end else rdata <= mem[req.addr[7:2]];
    end
  end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    logic [31:0] model [64];
    logic [31:0] e;
    int g0;
    mem_start = 0; adv = 0; is_store = 0; gnt = 0; size = FMT_W32; addr = 0; wdata = 0;
    for (int i = 0; i < 64; i++) begin mem[i] = $urandom; model[i] = mem[i]; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      is_store = $urandom_range(0, 1);
      size = fmt_e'($urandom_range(0, 2));
      addr = {24'h0, 8'($urandom)};
      if (size == FMT_W32) addr[1:0] = 0;
      if (size == FMT_H16) addr[0] = 0;
      wdata = $urandom;
      g0 = grants;
      // first cycle, repeated while the array stalls
      do begin
        mem_start = 1;
        gnt = ($urandom_range(0, 2) != 0);
        #1;
        if (req.req) begin
          chk(stall_req == !gnt, "stall_req");
          if (size == FMT_W32) chk(req.be == 4'hF && req.wdata == wdata, "word be/data");
          if (size == FMT_H16) chk(req.be == (addr[1] ? 4'hC : 4'h3) && req.wdata == {2{wdata[15:0]}}, "half be/data");
          if (size == FMT_B8)  chk(req.be == (4'b1 << addr[1:0]) && req.wdata == {4{wdata[7:0]}}, "byte be/data");
        end
        adv = !stall_req && ($urandom_range(0, 3) != 0);
        @(negedge clk);
      end while (!adv || grants == g0);
      mem_start = 0; gnt = 0; adv = 0;
      chk(grants == g0 + 1, "one grant per access");
      if (is_store) begin
        for (int b = 0; b < 4; b++)
          if (size == FMT_W32 || (size == FMT_H16 && b / 2 == addr[1]) || (size == FMT_B8 && b == addr[1:0]))
            model[addr[7:2]][8*b +: 8] = (size == FMT_W32) ? wdata[8*b +: 8]
                                       : (size == FMT_H16) ? wdata[8*(b%2) +: 8] : wdata[7:0];
      end else begin
        // second cycle of a load, may be stalled too
        while ($urandom_range(0, 2) == 0) @(negedge clk);
        #1;
        e = model[addr[7:2]];
        if (size == FMT_H16) e = {16'h0, addr[1] ? e[31:16] : e[15:0]};
        if (size == FMT_B8)  e = {24'h0, e[8*addr[1:0] +: 8]};
        chk(ld_data == e, $sformatf("load data %h exp %h n=%0d addr=%h size=%0d mem=%h", ld_data, e, n, addr, size, mem[addr[7:2]]));
        adv = 1;
        @(negedge clk);
        adv = 0;
      end
    end
    for (int i = 0; i < 64; i++) chk(mem[i] == model[i], "final memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
