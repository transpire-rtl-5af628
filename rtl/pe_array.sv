// pe_array: the N_ROWS x N_COLS array of processing elements (4 x 2 tiles).
//
// Tiles are numbered row-major (PE_rc has id r*N_COLS+c); the first N_DS of
// them (PE_00, PE_01, PE_02) carry a divide/square-root unit, the others an
// ALU and mSFU only. Each PE reads the OutPut Registers of its north, south,
// west and east neighbours over a mesh-torus network (edges wrap around).
// The context bus is broadcast to all tiles; the condition bits of all CRs
// are collected and sent back to every PE for conditional jumps.
// Execution: `start` launches all PEs at PC 0 in lock-step. The array stalls
// as a whole while any LSU waits for a TCDM grant, so the compiler's static
// schedule stays valid. `done` pulses once every PE has executed EXIT.
// The global stall and the start/done protocol are this design's own.
module pe_array
  import transpire_pkg::*;
#(
  parameter int unsigned N_ROWS = 2,
  parameter int unsigned N_COLS = 4,
  parameter int unsigned N_DS   = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  ctx_bus_t    ctx,
  output tcdm_req_t   mem_req    [N_ROWS*N_COLS],
  input  logic        mem_gnt    [N_ROWS*N_COLS],
  input  logic        mem_rvalid [N_ROWS*N_COLS],
  input  logic [31:0] mem_rdata  [N_ROWS*N_COLS],
  output logic        busy,
  output logic        done,
  // activity, for observation
  output logic        stall,
  output logic [N_ROWS*N_COLS-1:0] retire,
  output logic [N_ROWS*N_COLS-1:0] jump_taken,
  output logic [N_ROWS*N_COLS-1:0] cr_bits
);
  localparam int unsigned N = N_ROWS * N_COLS;

  logic [31:0]  opr [N];
  logic [N-1:0] stall_req, halted;

  assign stall = |stall_req;

  for (genvar r = 0; r < N_ROWS; r++) begin : g_row
    for (genvar c = 0; c < N_COLS; c++) begin : g_col
      localparam int unsigned ID = r * N_COLS + c;
      localparam int unsigned IN = ((r + N_ROWS - 1) % N_ROWS) * N_COLS + c;
      localparam int unsigned IS = ((r + 1) % N_ROWS) * N_COLS + c;
      localparam int unsigned IW = r * N_COLS + (c + N_COLS - 1) % N_COLS;
      localparam int unsigned IE = r * N_COLS + (c + 1) % N_COLS;
      pe #(.PE_ID(ID), .N_PE(N), .HAS_DS(ID < N_DS)) u_pe (
        .clk, .rst_n, .start, .stall, .ctx,
        .nbr_n(opr[IN]), .nbr_s(opr[IS]), .nbr_w(opr[IW]), .nbr_e(opr[IE]),
        .opr(opr[ID]), .cr_all(cr_bits), .cr(cr_bits[ID]),
        .mem_req(mem_req[ID]), .mem_gnt(mem_gnt[ID]), .mem_rvalid(mem_rvalid[ID]),
        .mem_rdata(mem_rdata[ID]), .stall_req(stall_req[ID]),
        .halted(halted[ID]), .retire(retire[ID]), .jump_taken(jump_taken[ID])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  busy <= 1'b0;
    else if (start)              busy <= 1'b1;
    else if (busy && &halted)    busy <= 1'b0;
  end
  assign done = busy && !start && &halted;
endmodule
