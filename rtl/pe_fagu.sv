// pe_fagu: Flexible Address Generation Unit of a processing element.
//
// Computes the byte address of an array element written in the global-index
// form Variable[(i+A)*(j+B)][(k+C)*(l+D)] used by the compilation flow:
//   addr = base + ( ((i+A)*(j+B)) * ROW + (k+C)*(l+D) ) << SH
// i, j, k, l are loop variables taken from registers by the load/store
// instruction; base, the signed 8-bit offsets A..D, the row length ROW and
// the element-size shift SH come from three consecutive CRF entries named by
// the instruction (base | {D,C,B,A} | {SH[17:16], ROW[15:0]}), a descriptor
// layout of this design's own. A dimension that is not used takes a zero
// index with offset 1. Combinational, 32-bit wrap-around arithmetic.
module pe_fagu (
  input  logic [31:0] base,
  input  logic [31:0] offs,
  input  logic [31:0] rowcfg,
  input  logic [31:0] i,
  input  logic [31:0] j,
  input  logic [31:0] k,
  input  logic [31:0] l,
  output logic [31:0] addr
);
  logic [31:0] oa, ob, oc, od, row, idx;
  always_comb begin
    oa  = {{24{offs[7]}},  offs[7:0]};
    ob  = {{24{offs[15]}}, offs[15:8]};
    oc  = {{24{offs[23]}}, offs[23:16]};
    od  = {{24{offs[31]}}, offs[31:24]};
    row = {16'h0, rowcfg[15:0]};
    idx = ((i + oa) * (j + ob)) * row + (k + oc) * (l + od);
    addr = base + (idx << rowcfg[17:16]);
  end
endmodule
