// mod_alu: one modulo-M arithmetic circuit in whichever form the modulus uses.
//
// Instantiates nrns_mod_op when nrns_pkg decides that modulus M is cheaper in
// nested RNS, and rns_mod_op otherwise. Operands and result are residue fields
// in the channel's encoding. Combinational.
module mod_alu
  import nrns_pkg::*;
#(
  parameter int      M  = 13,
  parameter mod_op_e OP = OP_ADD
) (
  input  res_t a,
  input  res_t b,
  output res_t y
);
  if (is_nested(M)) begin : g_nested
    nrns_mod_op #(.M(M), .OP(OP)) u_op (.a(a), .b(b), .y(y));
  end else begin : g_plain
    rns_mod_op #(.M(M), .OP(OP)) u_op (.a(a), .b(b), .y(y));
  end
endmodule
