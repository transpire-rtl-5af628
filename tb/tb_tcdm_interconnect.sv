// tb_tcdm_interconnect: self-checking testbench of the TCDM bank
// interconnect with four bank memories behind it. Nine masters issue random
// reads and writes and hold each request until granted. Checks: at most one
// grant per bank per cycle, grants only to requesting masters, no master
// waits longer than N_MASTERS cycles (round-robin fairness), and read data
// returned one cycle after the grant matches a reference memory.
module tb_tcdm_interconnect;
  import transpire_pkg::*;
  localparam int NM = 9, NB = 4, RW = 6;
  logic clk = 0, rst_n = 0;
  tcdm_req_t m_req [NM];
  logic m_gnt [NM], m_rvalid [NM];
  logic [31:0] m_rdata [NM];
  logic b_req [NB], b_we [NB];
  logic [3:0] b_be [NB];
  logic [RW-1:0] b_addr [NB];
  logic [31:0] b_wdata [NB], b_rdata [NB];
  logic [31:0] model [NB << RW];
  logic [31:0] exp_q [NM];
  logic        pend_q [NM];
  int wait_c [NM];
  logic g_s [NM];
  int checks = 0, failures = 0, conflicts = 0;

  tcdm_interconnect #(.N_MASTERS(NM), .N_BANKS(NB), .ROW_W(RW)) dut (.*);
  for (genvar b = 0; b < NB; b++) begin : g_b
    tcdm_bank #(.WORDS(1 << RW)) u_bank (.clk, .req(b_req[b]), .we(b_we[b]), .be(b_be[b]),
      .addr(b_addr[b]), .wdata(b_wdata[b]), .rdata(b_rdata[b]));
  end
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    foreach (m_req[m]) begin m_req[m] = '0; pend_q[m] = 0; wait_c[m] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // initialise memory through master 0
    for (int w = 0; w < (NB << RW); w++) begin
      @(negedge clk);
      m_req[0] = '{req: 1, we: 1, be: 4'hF, addr: 32'(w) << 2, wdata: $urandom};
      model[w] = m_req[0].wdata;
    end
    @(negedge clk); m_req[0] = '0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      // check responses of last cycle's grants
      for (int m = 0; m < NM; m++) if (pend_q[m]) begin
        chk(m_rvalid[m] == 1'b1, "rvalid");
        chk(m_rdata[m] == exp_q[m], $sformatf("rdata m%0d %h exp %h", m, m_rdata[m], exp_q[m]));
        pend_q[m] = 0;
      end
      for (int m = 0; m < NM; m++) if (!m_req[m].req && $urandom_range(0, 1) == 1) begin
        m_req[m].req = 1; m_req[m].we = ($urandom_range(0, 3) == 0); m_req[m].be = 4'hF;
        m_req[m].addr = 32'($urandom_range(0, (NB << RW) - 1)) << 2; m_req[m].wdata = $urandom;
      end
      #1;
      begin
        int per_bank [NB];
        int nreq [NB];
        foreach (per_bank[b]) begin per_bank[b] = 0; nreq[b] = 0; end
        for (int m = 0; m < NM; m++) begin
          if (m_req[m].req) nreq[m_req[m].addr[3:2]]++;
          g_s[m] = m_gnt[m];
          if (m_gnt[m]) begin
            chk(m_req[m].req, "grant without request");
            per_bank[m_req[m].addr[3:2]]++;
          end
        end
        foreach (per_bank[b]) begin
          chk(per_bank[b] == (nreq[b] > 0 ? 1 : 0), "one grant per requested bank");
          if (nreq[b] > 1) conflicts++;
        end
      end
      @(posedge clk);
      #1;
      for (int m = 0; m < NM; m++) if (m_req[m].req) begin
        if (g_s[m]) begin
          if (m_req[m].we) model[m_req[m].addr[31:2]] = m_req[m].wdata;
          else begin exp_q[m] = model[m_req[m].addr[31:2]]; pend_q[m] = 1; end
          m_req[m].req = 0; wait_c[m] = 0;
        end else begin
          wait_c[m]++;
          chk(wait_c[m] < NM, "starvation");
        end
      end
    end
    chk(conflicts > 100, "bank conflicts exercised");
    $display("conflicts=%0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
