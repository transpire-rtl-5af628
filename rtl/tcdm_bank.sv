// tcdm_bank: one bank of the Tightly Coupled Data Memory.
//
// WORDS x 32-bit single-port memory (2048 words = 8 KiB; four banks make the
// 32 KiB TCDM). A write stores the bytes selected by `be`; a read returns the
// word on `rdata` in the cycle after the request (synchronous read, as an
// SRAM macro behaves). Contents are not reset.
module tcdm_bank #(
  parameter int unsigned WORDS = 2048,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          req,
  input  logic          we,
  input  logic [3:0]    be,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (req) begin
      if (we) begin
        for (int b = 0; b < 4; b++)
          if (be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
      end else begin
        rdata <= mem[addr];
      end
    end
  end
endmodule
