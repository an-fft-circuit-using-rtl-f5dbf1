// rns_mod_op: one modular arithmetic circuit of a residue channel.
//
// Computes y = (a + b) mod M, (a - b + OFFSET) mod M or (a * b) mod M, chosen by
// the parameter OP. Operands are residues below M held in the low bits of a
// residue field; the result is likewise below M. This is the basic "2k inputs,
// k outputs" table of the residue FFT (k = ceil(log2 M)); it is written as
// arithmetic and left to synthesis to map into LUTs. OFFSET is used by the
// nested realisation, whose digit circuits subtract with the outer modulus as a
// bias so that the difference stays non-negative; for a plain channel it is 0.
// Purely combinational, no clock.
module rns_mod_op
  import nrns_pkg::*;
#(
  parameter int      M      = 7,
  parameter mod_op_e OP     = OP_ADD,
  parameter int      OFFSET = 0
) (
  input  res_t a,
  input  res_t b,
  output res_t y
);
  localparam int K = (ceil_log2(M) < 1) ? 1 : ceil_log2(M);

  logic [K-1:0]   av, bv;
  logic [2*K:0]   t;           // wide enough for a product or a biased sum
  logic [K-1:0]   r;

  assign av = a[K-1:0];
  assign bv = b[K-1:0];

  always_comb begin
    unique case (OP)
      OP_ADD:  t = (2*K+1)'(av) + (2*K+1)'(bv);
      OP_SUB:  t = (2*K+1)'(av) + (2*K+1)'(M) + (2*K+1)'(OFFSET % M) - (2*K+1)'(bv);
      default: t = (2*K+1)'(av) * (2*K+1)'(bv);
    endcase
    r = K'(t % (2*K+1)'(M));
  end

  assign y = res_t'(r);
endmodule
