// irf: Instruction Register File of a processing element.
//
// DEPTH x WIDTH words (21 x 64 bits, the architecture's size) written one
// word per cycle from the context bus while the context is loaded, and read
// combinationally at the program counter. An address at or beyond DEPTH
// reads as all zeros, which decodes as NOP. Contents reset to zero.
module irf #(
  parameter int unsigned DEPTH = 21,
  parameter int unsigned WIDTH = 64,
  parameter int unsigned AW    = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (we && (int'(waddr) < int'(DEPTH))) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = (int'(raddr) < int'(DEPTH)) ? mem[raddr] : '0;
endmodule
