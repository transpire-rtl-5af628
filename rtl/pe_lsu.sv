// pe_lsu: Load-Store Unit of a processing element.
//
// Turns a load or store, with the address from the FAGU, into one TCDM
// request. `mem_start` is high during the first cycle of a LD/ST instruction;
// the request stays up until the interconnect grants it. While it waits,
// `stall_req` is high and the whole array stalls, keeping the static
// schedule of all PEs aligned. A request granted while the array is stalled
// by another PE is remembered (`served`) and not repeated. Read data comes
// one cycle after the grant and is also kept in a buffer, so a load can
// retire in a later cycle if the array is stalled then.
// Sizes: word, half (addr[1] selects the half) and byte (addr[1:0]); loads
// zero-extend, stores replicate the data and set byte enables.
// The request/grant protocol and sizes are this design's own choices.
module pe_lsu
  import transpire_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mem_start,
  input  logic        adv,
  input  logic        is_store,
  input  fmt_e        size,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output tcdm_req_t   req,
  input  logic        gnt,
  input  logic        rvalid,
  input  logic [31:0] rdata,
  output logic        stall_req,
  output logic [31:0] ld_data
);
  logic        served;
  logic [1:0]  off_q;
  fmt_e        size_q;
  logic [31:0] buf_q;
  logic [31:0] raw;

  always_comb begin
    req.req   = mem_start && !served;
    req.we    = is_store;
    req.addr  = {addr[31:2], 2'b00};
    case (size)
      FMT_H16: begin req.wdata = {2{wdata[15:0]}}; req.be = addr[1] ? 4'b1100 : 4'b0011; end
      FMT_B8:  begin req.wdata = {4{wdata[7:0]}};  req.be = 4'b0001 << addr[1:0]; end
      default: begin req.wdata = wdata;            req.be = 4'b1111; end
    endcase
    stall_req = req.req && !gnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      served <= 1'b0; off_q <= '0; size_q <= FMT_W32; buf_q <= '0;
    end else begin
      served <= adv ? 1'b0 : (served || (req.req && gnt));
      if (req.req && gnt) begin
        off_q  <= addr[1:0];
        size_q <= size;
      end
      if (rvalid) buf_q <= rdata;
    end
  end

  always_comb begin
    raw = rvalid ? rdata : buf_q;
    case (size_q)
      FMT_H16: ld_data = {16'h0, off_q[1] ? raw[31:16] : raw[15:0]};
      FMT_B8:  ld_data = {24'h0, raw[8*off_q +: 8]};
      default: ld_data = raw;
    endcase
  end
endmodule
