// nrns_mod_op: modulo-M arithmetic circuit realised in nested RNS.
//
// The operands are nested digit tuples of residues below M (see nrns_pkg). The
// operation is done digit by digit on small prime moduli, each a small
// rns_mod_op, which is what makes the nested realisation cheaper in LUTs than
// one k-bit modular table. Because the inner primes cover M*M, the digit-wise
// result represents the exact sum, biased difference (a - b + M) or product;
// nrns_reduce then takes it modulo M. Per the document the inner dynamic range
// must cover M*M; the bias M for subtraction is this design's choice.
// Combinational.
module nrns_mod_op
  import nrns_pkg::*;
#(
  parameter int      M  = 13,
  parameter mod_op_e OP = OP_MUL
) (
  input  res_t a,
  input  res_t b,
  output res_t y
);
  localparam int MASK = inner_mask(M);

  res_t raw;

  for (genvar p = 0; p < NPRIME; p++) begin : g_dig
    if (MASK[p]) begin : g_on
      res_t dy;
      rns_mod_op #(.M(prime_at(p)), .OP(OP), .OFFSET(M % prime_at(p))) u_op (
        .a(res_t'(a[DIG_W*p +: DIG_W])),
        .b(res_t'(b[DIG_W*p +: DIG_W])),
        .y(dy)
      );
      assign raw[DIG_W*p +: DIG_W] = dy[DIG_W-1:0];
    end else begin : g_off
      assign raw[DIG_W*p +: DIG_W] = '0;
    end
  end

  nrns_reduce #(.M(M)) u_red (.d(raw), .y(y));
endmodule
