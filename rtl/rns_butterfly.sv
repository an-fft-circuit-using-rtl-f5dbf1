// rns_butterfly: modulo-M radix-2 decimation-in-frequency butterfly.
//
// Computes X = A + B and Y = (A - B) * W on complex residues, where W is the
// twiddle factor as a residue. It consists of exactly ten modular arithmetic
// circuits, as the document counts them: four add/subtract circuits form the
// complex sum and difference, four multipliers and one subtract and one add
// form the complex product (A-B)*W. Each circuit is a mod_alu, so a nested
// modulus is computed in nested RNS. The ordering (twiddle after the
// difference, decimation in frequency) is this design's choice.
// Purely combinational; the enclosing stage registers the result.
module rns_butterfly
  import nrns_pkg::*;
#(
  parameter int M = 13
) (
  input  cres_t a,
  input  cres_t b,
  input  cres_t w,
  output cres_t x,             // a + b
  output cres_t y              // (a - b) * w
);
  res_t dr, di, p_rr, p_ii, p_ri, p_ir;

  mod_alu #(.M(M), .OP(OP_ADD)) u_xr (.a(a.re), .b(b.re), .y(x.re));
  mod_alu #(.M(M), .OP(OP_ADD)) u_xi (.a(a.im), .b(b.im), .y(x.im));
  mod_alu #(.M(M), .OP(OP_SUB)) u_dr (.a(a.re), .b(b.re), .y(dr));
  mod_alu #(.M(M), .OP(OP_SUB)) u_di (.a(a.im), .b(b.im), .y(di));
  mod_alu #(.M(M), .OP(OP_MUL)) u_rr (.a(dr),   .b(w.re), .y(p_rr));
  mod_alu #(.M(M), .OP(OP_MUL)) u_ii (.a(di),   .b(w.im), .y(p_ii));
  mod_alu #(.M(M), .OP(OP_MUL)) u_ri (.a(dr),   .b(w.im), .y(p_ri));
  mod_alu #(.M(M), .OP(OP_MUL)) u_ir (.a(di),   .b(w.re), .y(p_ir));
  mod_alu #(.M(M), .OP(OP_SUB)) u_yr (.a(p_rr), .b(p_ii), .y(y.re));
  mod_alu #(.M(M), .OP(OP_ADD)) u_yi (.a(p_ri), .b(p_ir), .y(y.im));
endmodule
