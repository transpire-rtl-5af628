// crf: Constant Register File of a processing element.
//
// DEPTH x WIDTH constants (20 x 32 bits, the architecture's size) written
// from the context bus before execution. Three combinational read ports read
// the entries at idx, idx+1 and idx+2: the first is the instruction's
// constant operand and base address, the other two carry the address
// generator's offsets and row length (a layout of this design's own).
// Addresses beyond DEPTH read as zero. Contents reset to zero.
module crf #(
  parameter int unsigned DEPTH = 20,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    idx,
  output logic [WIDTH-1:0] rdata [3]
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (we && (int'(waddr) < int'(DEPTH))) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int p = 0; p < 3; p++) begin
      int a;
      a = int'(idx) + p;
      rdata[p] = (a < int'(DEPTH)) ? mem[a] : '0;
    end
  end
endmodule
