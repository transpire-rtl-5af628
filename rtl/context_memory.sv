// context_memory: holds the configuration data (instructions and constants
// of every PE) of a kernel before it is sent to the array.
//
// WORDS x 32 bits (1024 words = 4 KiB, the architecture's size). The host
// writes it through a write port; the DMA controller reads it through a
// read port with one cycle of latency (`rdata` is valid the cycle after
// `re`). Simple dual port memory; contents are not reset.
module context_memory #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
