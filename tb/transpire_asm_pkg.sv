// transpire_asm_pkg: helpers for writing PE programs in the testbenches.
// `ins` packs one 64-bit instruction from named fields (unused fields
// default to zero / the zero operand); `hdr` packs a context-record header
// for the DMA controller (last, CRF/IRF, count, first index, PE mask).
package transpire_asm_pkg;
  import transpire_pkg::*;

  function automatic logic [63:0] ins(
      input opcode_e op, input int rd = 0, input bit wr = 0, input bit wo = 0,
      input src_e a = SRC_ZERO, input src_e b = SRC_ZERO, input int crf = 0,
      input int jt = 0, input int jf = 0, input fmt_e fmt = FMT_W32,
      input src_e i0 = SRC_ZERO, input src_e i1 = SRC_ZERO,
      input src_e i2 = SRC_ZERO, input src_e i3 = SRC_ZERO);
    instr_t t;
    t.op = op; t.wr_rrf = wr; t.rd = 3'(rd); t.wr_opr = wo;
    t.src_a = a; t.src_b = b; t.crf = 5'(crf); t.jt = PC_W'(jt); t.jf = PC_W'(jf);
    t.fmt = fmt; t.ix0 = i0; t.ix1 = i1; t.ix2 = i2; t.ix3 = i3; t.rsv = '0;
    return 64'(t);
  endfunction

  function automatic logic [31:0] hdr(input bit last, input bit is_crf, input int cnt,
                                      input int idx, input logic [7:0] mask);
    return {last, 12'h0, is_crf, 5'(cnt), 5'(idx), mask};
  endfunction

  // FAGU descriptor words: offsets {D,C,B,A} and {shift, row}
  function automatic logic [31:0] offs(input int A, input int B, input int C, input int D);
    return {8'(D), 8'(C), 8'(B), 8'(A)};
  endfunction
  function automatic logic [31:0] rowcfg(input int row, input int sh);
    return {14'h0, 2'(sh), 16'(row)};
  endfunction
endpackage
