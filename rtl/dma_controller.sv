// dma_controller: moves a kernel's configuration from the context memory
// into the PEs' instruction and constant register files.
//
// Starting at word `base`, it reads records of the form
//   header: bit 31 last record, bit 18 CRF (1) or IRF (0),
//           bits 17:13 entry count, bits 12:8 first register index,
//           bits 7:0 PE mask (bit n selects PE n)
//   then `count` entries: one word per CRF constant, two words (low, high)
//   per 64-bit IRF instruction,
// and broadcasts each entry once on the context bus with the PE mask, so a
// program or constant shared by several PEs is sent only once. A record with
// the last bit set ends the transfer: `done` pulses and `busy` drops.
// Timing: one context-memory word every two cycles (read, then use); the
// bus write is registered. The record format is this design's own; the
// architecture states only that the DMA sends the configuration data stored
// in the context memory to the PEs over a broadcast bus.
module dma_controller
  import transpire_pkg::*;
#(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  output logic          re,
  output logic [AW-1:0] raddr,
  input  logic [31:0]   rdata,
  output ctx_bus_t      ctx,
  output logic          busy,
  output logic          done
);
  typedef enum logic [2:0] {S_IDLE, S_HDR_RD, S_HDR, S_DAT_RD, S_DAT, S_DONE} state_e;
  state_e        st;
  logic [AW-1:0] ptr;
  logic          last_q, crf_q, half_q;
  logic [4:0]    cnt_q, idx_q;
  logic [7:0]    mask_q;
  logic [31:0]   lo_q;

  assign re    = (st == S_HDR_RD) || (st == S_DAT_RD);
  assign raddr = ptr;
  assign busy  = (st != S_IDLE);
  assign done  = (st == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ptr <= '0; last_q <= 1'b0; crf_q <= 1'b0; half_q <= 1'b0;
      cnt_q <= '0; idx_q <= '0; mask_q <= '0; lo_q <= '0; ctx <= '0;
    end else begin
      ctx.we <= 1'b0;
      case (st)
        S_IDLE:   if (start) begin ptr <= base; st <= S_HDR_RD; end
        S_HDR_RD: begin ptr <= ptr + 1'b1; st <= S_HDR; end
        S_HDR: begin
          last_q <= rdata[31];
          crf_q  <= rdata[18];
          cnt_q  <= rdata[17:13];
          idx_q  <= rdata[12:8];
          mask_q <= rdata[7:0];
          half_q <= 1'b0;
          if (rdata[17:13] != '0) st <= S_DAT_RD;
          else                    st <= rdata[31] ? S_DONE : S_HDR_RD;
        end
        S_DAT_RD: begin ptr <= ptr + 1'b1; st <= S_DAT; end
        S_DAT: begin
          if (!crf_q && !half_q) begin
            lo_q   <= rdata;
            half_q <= 1'b1;
            st     <= S_DAT_RD;
          end else begin
            ctx.we      <= 1'b1;
            ctx.pe_mask <= mask_q;
            ctx.is_crf  <= crf_q;
            ctx.idx     <= idx_q;
            ctx.data    <= crf_q ? {32'h0, rdata} : {rdata, lo_q};
            half_q      <= 1'b0;
            idx_q       <= idx_q + 1'b1;
            cnt_q       <= cnt_q - 1'b1;
            if (cnt_q == 5'd1) st <= last_q ? S_DONE : S_HDR_RD;
            else               st <= S_DAT_RD;
          end
        end
        default: st <= S_IDLE;   // S_DONE
      endcase
    end
  end
endmodule
