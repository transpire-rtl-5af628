// pe: one processing element (tile) of the TRANSPIRE array.
//
// A PE runs its own statically scheduled program from its Instruction
// Register File (IRF). The Controller keeps the PC; the Instruction
// Synchronizer (IS) holds each instruction for its latency (1 cycle for ALU,
// compare, abs, jumps and stores; 2 for binary16alt/binary8 add/sub/mul and
// loads; 5 for divide and square root) and then raises fetch enable. The
// result is written at the end of the last cycle into the Regular Register
// File (RRF) and/or the OutPut Register (OPR), which the four torus
// neighbours read. Operands come from the RRF, the own OPR, a neighbour's
// OPR, the Constant Register File (CRF) or zero. Loads and stores get their
// address from the FAGU and go to the TCDM through the LSU; a request that is
// not granted stalls the whole array (`stall` is the OR of all `stall_req`).
// Compare results go to the 1-bit CR, broadcast to all PEs; conditional
// jumps test the OR of all CR bits (`cr_all`).
// HAS_DS adds the divide/square-root unit (the first three tiles carry it);
// on a tile without it FDIV/FSQRT produce 0.
// The IRF and CRF are filled from the context bus when this PE's bit in the
// bus's PE mask is set. Instruction encoding, operand selectors and the
// stall protocol are this design's own; the block structure follows the
// architecture.
module pe
  import transpire_pkg::*;
#(
  parameter int unsigned PE_ID  = 0,
  parameter int unsigned N_PE   = 8,
  parameter bit          HAS_DS = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            stall,
  input  ctx_bus_t        ctx,
  input  logic [31:0]     nbr_n,
  input  logic [31:0]     nbr_s,
  input  logic [31:0]     nbr_w,
  input  logic [31:0]     nbr_e,
  output logic [31:0]     opr,
  input  logic [N_PE-1:0] cr_all,
  output logic            cr,
  output tcdm_req_t       mem_req,
  input  logic            mem_gnt,
  input  logic            mem_rvalid,
  input  logic [31:0]     mem_rdata,
  output logic            stall_req,
  output logic            halted,
  output logic            retire,      // an instruction retires this cycle
  output logic            jump_taken
);
  // ---------------- fetch ----------------
  logic [PC_W-1:0] pc;
  logic [63:0]     iword;
  instr_t          ins;
  logic            adv, first, fetch_en;

  irf #(.DEPTH(IRF_DEPTH)) u_irf (
    .clk, .rst_n,
    .we(ctx.we && !ctx.is_crf && ctx.pe_mask[PE_ID]), .waddr(ctx.idx), .wdata(ctx.data),
    .raddr(pc), .rdata(iword)
  );
  assign ins = instr_t'(iword);
  assign adv = !halted && !stall;

  pe_is u_is (.clk, .rst_n, .clear(start), .adv, .lat(op_latency(ins.op)), .first, .fetch_en);

  // ---------------- operands ----------------
  logic [31:0] crf_rd [3];
  logic [2:0]  rrf_ra [6];
  logic [31:0] rrf_rd [6];
  logic [31:0] res;
  logic        rrf_we;

  crf #(.DEPTH(CRF_DEPTH), .WIDTH(DATA_W)) u_crf (
    .clk, .rst_n,
    .we(ctx.we && ctx.is_crf && ctx.pe_mask[PE_ID]), .waddr(ctx.idx), .wdata(ctx.data[31:0]),
    .idx(ins.crf), .rdata(crf_rd)
  );

  always_comb begin
    rrf_ra[0] = ins.src_a[2:0];
    rrf_ra[1] = ins.src_b[2:0];
    rrf_ra[2] = ins.ix0[2:0];
    rrf_ra[3] = ins.ix1[2:0];
    rrf_ra[4] = ins.ix2[2:0];
    rrf_ra[5] = ins.ix3[2:0];
  end

  rrf #(.DEPTH(RRF_DEPTH), .WIDTH(DATA_W)) u_rrf (.clk, .rst_n, .we(rrf_we), .waddr(ins.rd), .wdata(res), .raddr(rrf_ra), .rdata(rrf_rd));

  function automatic logic [31:0] sel(src_e s, logic [31:0] r);
    case (s)
      SRC_OPR:  return opr;
      SRC_N:    return nbr_n;
      SRC_S:    return nbr_s;
      SRC_W:    return nbr_w;
      SRC_E:    return nbr_e;
      SRC_CRF:  return crf_rd[0];
      SRC_ZERO, SRC_ZERO2: return '0;
      default:  return r;        // RRF[0..7]
    endcase
  endfunction

  logic [31:0] opa, opb, ix [4];
  always_comb begin
    opa   = sel(ins.src_a, rrf_rd[0]);
    opb   = sel(ins.src_b, rrf_rd[1]);
    ix[0] = sel(ins.ix0, rrf_rd[2]);
    ix[1] = sel(ins.ix1, rrf_rd[3]);
    ix[2] = sel(ins.ix2, rrf_rd[4]);
    ix[3] = sel(ins.ix3, rrf_rd[5]);
  end

  // ---------------- execution units ----------------
  logic [31:0] alu_y, sfu_y, ds_y32, ld_data, addr;
  logic        alu_c, sfu_lt;

  pe_alu u_alu (.op(ins.op), .a(opa), .b(opb), .y(alu_y), .cond(alu_c));

  msfu u_msfu (.clk, .rst_n, .start(adv && first), .op(ins.op), .fmt(ins.fmt),
               .a(opa), .b(opb), .y(sfu_y), .lt(sfu_lt));

  if (HAS_DS) begin : g_ds
    logic [15:0] ds_y;
    ds_unit u_ds (.clk, .rst_n,
                  .start(adv && first && (ins.op == OP_FDIV || ins.op == OP_FSQRT)),
                  .adv, .is_sqrt(ins.op == OP_FSQRT), .a(opa[15:0]), .b(opb[15:0]), .y(ds_y));
    assign ds_y32 = {16'h0, ds_y};
  end else begin : g_no_ds
    assign ds_y32 = '0;
  end

  pe_fagu u_fagu (.base(crf_rd[0]), .offs(crf_rd[1]), .rowcfg(crf_rd[2]),
                  .i(ix[0]), .j(ix[1]), .k(ix[2]), .l(ix[3]), .addr);

  pe_lsu u_lsu (.clk, .rst_n,
                .mem_start(!halted && first && (ins.op == OP_LD || ins.op == OP_ST)),
                .adv, .is_store(ins.op == OP_ST), .size(ins.fmt), .addr, .wdata(opa),
                .req(mem_req), .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata),
                .stall_req, .ld_data);

  // ---------------- result and write-back ----------------
  logic has_res, is_cmp;
  always_comb begin
    has_res = 1'b1;
    case (ins.op)
      OP_FADD, OP_FSUB, OP_FMUL, OP_FABS, OP_FLT: res = sfu_y;
      OP_FDIV, OP_FSQRT:                          res = ds_y32;
      OP_LD:                                      res = ld_data;
      OP_NOP, OP_EXIT, OP_JMP, OP_CJMP, OP_ST: begin res = alu_y; has_res = 1'b0; end
      default:                                    res = alu_y;
    endcase
    is_cmp = ins.op inside {OP_SLT, OP_SLTU, OP_SEQ, OP_FLT};
    rrf_we = fetch_en && has_res && ins.wr_rrf;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  opr <= '0;
    else if (fetch_en && has_res && ins.wr_opr)  opr <= res;
  end

  pe_controller #(.N_PE(N_PE)) u_ctrl (
    .clk, .rst_n, .start, .fetch_en, .op(ins.op), .jt(ins.jt), .jf(ins.jf),
    .cr_all, .cr_we(is_cmp), .cr_in((ins.op == OP_FLT) ? sfu_lt : alu_c),
    .pc, .halted, .cr, .jump_taken
  );

  assign retire = fetch_en;
endmodule
