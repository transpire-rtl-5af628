// tcdm_interconnect: connects N_MASTERS requesters (the eight PE load-store
// units and the host) to N_BANKS word-interleaved TCDM banks.
//
// The bank of a request is its word address modulo N_BANKS (byte address
// bits [3:2] for four banks); the row inside the bank is the rest of the
// word address. Each bank grants at most one request per cycle, chosen
// round-robin starting after the last master it served, so conflicting
// masters all get through within N_MASTERS cycles. A grant is given in the
// request cycle (combinational); `rvalid` and the routed `rdata` follow one
// cycle later, for reads and writes alike. This single-stage crossbar stands
// in for the low-latency logarithmic interconnect of the architecture,
// whose inside is not given; arbitration policy and address mapping are
// this design's own.
module tcdm_interconnect
  import transpire_pkg::*;
#(
  parameter int unsigned N_MASTERS = 9,
  parameter int unsigned N_BANKS   = 4,
  parameter int unsigned ROW_W     = 11,
  parameter int unsigned BANK_W    = $clog2(N_BANKS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  tcdm_req_t         m_req    [N_MASTERS],
  output logic              m_gnt    [N_MASTERS],
  output logic              m_rvalid [N_MASTERS],
  output logic [31:0]       m_rdata  [N_MASTERS],
  output logic              b_req    [N_BANKS],
  output logic              b_we     [N_BANKS],
  output logic [3:0]        b_be     [N_BANKS],
  output logic [ROW_W-1:0]  b_addr   [N_BANKS],
  output logic [31:0]       b_wdata  [N_BANKS],
  input  logic [31:0]       b_rdata  [N_BANKS]
);
  localparam int unsigned MW = $clog2(N_MASTERS);

  logic [MW-1:0]     rr_q  [N_BANKS];     // next master with top priority
  logic [MW-1:0]     win   [N_BANKS];
  logic              hit   [N_BANKS];
  logic [BANK_W-1:0] bank_of [N_MASTERS];
  logic [BANK_W-1:0] bsel_q  [N_MASTERS];

  always_comb begin
    for (int m = 0; m < int'(N_MASTERS); m++)
      bank_of[m] = m_req[m].addr[2 +: BANK_W];
    for (int b = 0; b < int'(N_BANKS); b++) begin
      hit[b] = 1'b0;
      win[b] = '0;
      for (int k = 0; k < int'(N_MASTERS); k++) begin
        int m;
        m = (int'(rr_q[b]) + k) % int'(N_MASTERS);
        if (!hit[b] && m_req[m].req && int'(bank_of[m]) == b) begin
          hit[b] = 1'b1;
          win[b] = MW'(m);
        end
      end
      b_req[b]   = hit[b];
      b_we[b]    = m_req[win[b]].we;
      b_be[b]    = m_req[win[b]].be;
      b_addr[b]  = m_req[win[b]].addr[2 + BANK_W +: ROW_W];
      b_wdata[b] = m_req[win[b]].wdata;
    end
    for (int m = 0; m < int'(N_MASTERS); m++)
      m_gnt[m] = m_req[m].req && hit[bank_of[m]] && (int'(win[bank_of[m]]) == m);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < int'(N_BANKS); b++) rr_q[b] <= '0;
      for (int m = 0; m < int'(N_MASTERS); m++) begin
        m_rvalid[m] <= 1'b0;
        bsel_q[m]   <= '0;
      end
    end else begin
      for (int b = 0; b < int'(N_BANKS); b++)
        if (hit[b]) rr_q[b] <= (int'(win[b]) == int'(N_MASTERS) - 1) ? '0 : win[b] + 1'b1;
      for (int m = 0; m < int'(N_MASTERS); m++) begin
        m_rvalid[m] <= m_gnt[m];
        if (m_gnt[m]) bsel_q[m] <= bank_of[m];
      end
    end
  end

  always_comb
    for (int m = 0; m < int'(N_MASTERS); m++) m_rdata[m] = b_rdata[bsel_q[m]];
endmodule
