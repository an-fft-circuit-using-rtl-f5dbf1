// rns2rns: RNS2RNS converter that extends the moduli set by one modulus.
//
// Given the residues of a value for MODS[0..NIN-1] it produces the residue of
// the same value for the next modulus MODS[NIN], which is all a converter
// g(m1..mL) = (m1..mL, mL+1) needs to add, since the old residues pass through
// unchanged. As in the document it is decomposed into an RNS-to-binary
// converter (rns2bin) followed by a binary-to-RNS converter (bin2rns), whose
// output is in nested form when the new modulus is nested (Bin2NRNS). The value
// is read as signed, centred on zero. Combinational.
module rns2rns
  import nrns_pkg::*;
#(
  parameter int        NIN  = 2,
  parameter mod_list_t MODS = '{5, 7, 9, 11, 13, 16, 0, 0}
) (
  input  res_t res [NIN],
  output res_t ext               // residue for MODS[NIN]
);
  logic signed [47:0] xb;

  rns2bin #(.NIN(NIN), .MODS(MODS)) u_r2b (.res(res), .x(xb));
  bin2rns #(.M(MODS[NIN]), .W(48))  u_b2r (.x(xb), .r(ext));
endmodule
