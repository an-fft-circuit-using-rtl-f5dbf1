// bin2rns: binary to residue converter for one modulus (Bin2RNS / Bin2NRNS).
//
// Maps a W-bit two's-complement integer to its residue modulo M, in [0, M),
// encoded in the modulus' field format: the residue itself for a plain modulus,
// or its digits modulo the inner primes for a nested one (Bin2NRNS). The
// document realises this as a ROM (one block RAM per modulus at the input); it
// is written here as arithmetic, which a synthesis tool can turn into the same
// table. Treating the input as signed is this design's choice. Combinational.
module bin2rns
  import nrns_pkg::*;
#(
  parameter int M = 13,
  parameter int W = 8
) (
  input  logic signed [W-1:0] x,
  output res_t                r
);
  localparam int MASK = field_mask(M);

  longint v;

  always_comb begin
    v = longint'(x) % longint'(M);
    if (v < 0) v = v + M;
    r = '0;
    if (MASK != 0) begin
      for (int p = 0; p < NPRIME; p++)
        if (MASK[p]) r[DIG_W*p +: DIG_W] = DIG_W'(v % longint'(prime_at(p)));
    end else begin
      r = res_t'(v);
    end
  end
endmodule
