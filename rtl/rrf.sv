// rrf: Regular Register File of a processing element.
//
// DEPTH x WIDTH temporaries (8 x 32 bits; the architecture gives the file as
// "32x8-bits", read here as eight 32-bit registers since every register has
// to hold a full 32-bit SIMD word). NRD combinational read ports (two
// operands and four address-generator indices in the PE) and one synchronous
// write port. Reset to zero.
module rrf #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NRD   = 6,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr [NRD],
  output logic [WIDTH-1:0] rdata [NRD]
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb
    for (int p = 0; p < int'(NRD); p++) rdata[p] = mem[raddr[p]];
endmodule
