// transpire_top: the TRANSPIRE integrated system.
//
// TRANSPIRE is a coarse-grain reconfigurable array for ultra-low-power
// end nodes that runs both integer and transprecision floating-point kernels
// (binary16alt and binary8, in SIMD). The system holds the 4 x 2 array of
// processing elements, the DMA controller, the 4 KiB context memory and the
// 32 KiB TCDM in four banks behind a single-cycle bank interconnect. The
// host processor that shares the TCDM is not part of this RTL: its TCDM
// port (`h_*`), its write port into the context memory (`ctx_*`) and the
// start/done handshake are the top-level ports.
// Operation: the host writes the context records and the data, then pulses
// `start` with `ctx_base`. The DMA broadcasts the records into the PEs'
// IRF/CRF, the array then starts at PC 0, and `done` pulses when all PEs
// have executed EXIT; `busy` is high from start to done. The host port is
// master N_PE of the interconnect and may be used at any time; while the
// array runs it competes with the PEs for the banks.
// The array's observation outputs (global stall, per-PE retire and jump,
// CR bits) are left unconnected here; they serve testbenches and any
// performance counters a host system may add.
module transpire_top
  import transpire_pkg::*;
#(
  parameter int unsigned N_ROWS     = 2,
  parameter int unsigned N_COLS     = 4,
  parameter int unsigned CTX_WORDS  = 1024,
  parameter int unsigned N_BANKS    = 4,
  parameter int unsigned BANK_WORDS = 2048,
  parameter int unsigned CTX_AW     = $clog2(CTX_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // context memory write port (host side)
  input  logic              ctx_we,
  input  logic [CTX_AW-1:0] ctx_waddr,
  input  logic [31:0]       ctx_wdata,
  // kernel control
  input  logic              start,
  input  logic [CTX_AW-1:0] ctx_base,
  output logic              busy,
  output logic              done,
  // host TCDM port
  input  logic              h_req,
  input  logic              h_we,
  input  logic [3:0]        h_be,
  input  logic [31:0]       h_addr,
  input  logic [31:0]       h_wdata,
  output logic              h_gnt,
  output logic              h_rvalid,
  output logic [31:0]       h_rdata
);
  localparam int unsigned N_PE  = N_ROWS * N_COLS;
  localparam int unsigned N_M   = N_PE + 1;
  localparam int unsigned ROW_W = $clog2(BANK_WORDS);

  // ---------------- context path ----------------
  logic              cm_re;
  logic [CTX_AW-1:0] cm_raddr;
  logic [31:0]       cm_rdata;
  ctx_bus_t          ctx;
  logic              dma_busy, dma_done;

  context_memory #(.WORDS(CTX_WORDS)) u_ctx_mem (
    .clk, .we(ctx_we), .waddr(ctx_waddr), .wdata(ctx_wdata),
    .re(cm_re), .raddr(cm_raddr), .rdata(cm_rdata)
  );

  dma_controller #(.AW(CTX_AW)) u_dma (
    .clk, .rst_n, .start(start && !busy), .base(ctx_base),
    .re(cm_re), .raddr(cm_raddr), .rdata(cm_rdata), .ctx, .busy(dma_busy), .done(dma_done)
  );

  // ---------------- array ----------------
  tcdm_req_t   m_req    [N_M];
  logic        m_gnt    [N_M];
  logic        m_rvalid [N_M];
  logic [31:0] m_rdata  [N_M];
  tcdm_req_t   pe_req    [N_PE];
  logic        pe_gnt    [N_PE];
  logic        pe_rvalid [N_PE];
  logic [31:0] pe_rdata  [N_PE];
  logic        arr_busy, arr_done;

  pe_array #(.N_ROWS(N_ROWS), .N_COLS(N_COLS)) u_array (
    .clk, .rst_n, .start(dma_done), .ctx,
    .mem_req(pe_req), .mem_gnt(pe_gnt), .mem_rvalid(pe_rvalid), .mem_rdata(pe_rdata),
    .busy(arr_busy), .done(arr_done),
    .stall(), .retire(), .jump_taken(), .cr_bits()
  );

  always_comb begin
    for (int i = 0; i < int'(N_PE); i++) begin
      m_req[i]     = pe_req[i];
      pe_gnt[i]    = m_gnt[i];
      pe_rvalid[i] = m_rvalid[i];
      pe_rdata[i]  = m_rdata[i];
    end
    m_req[N_PE] = '{req: h_req, we: h_we, be: h_be, addr: h_addr, wdata: h_wdata};
    h_gnt    = m_gnt[N_PE];
    h_rvalid = m_rvalid[N_PE];
    h_rdata  = m_rdata[N_PE];
  end

  // ---------------- TCDM ----------------
  logic             b_req   [N_BANKS];
  logic             b_we    [N_BANKS];
  logic [3:0]       b_be    [N_BANKS];
  logic [ROW_W-1:0] b_addr  [N_BANKS];
  logic [31:0]      b_wdata [N_BANKS];
  logic [31:0]      b_rdata [N_BANKS];

  tcdm_interconnect #(.N_MASTERS(N_M), .N_BANKS(N_BANKS), .ROW_W(ROW_W)) u_xbar (
    .clk, .rst_n, .m_req, .m_gnt, .m_rvalid, .m_rdata,
    .b_req, .b_we, .b_be, .b_addr, .b_wdata, .b_rdata
  );

  for (genvar b = 0; b < int'(N_BANKS); b++) begin : g_bank
    tcdm_bank #(.WORDS(BANK_WORDS)) u_bank (
      .clk, .req(b_req[b]), .we(b_we[b]), .be(b_be[b]), .addr(b_addr[b]),
      .wdata(b_wdata[b]), .rdata(b_rdata[b])
    );
  end

  assign busy = dma_busy || dma_done || arr_busy;
  assign done = arr_done;
endmodule
