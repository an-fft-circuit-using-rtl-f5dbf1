// nrns_reduce: brings a nested-RNS digit tuple back to a residue modulo M.
//
// A nested channel of outer modulus M keeps its value as digits modulo small
// primes whose product P is at least M*M, so one product of two residues is
// represented exactly. After each arithmetic step the tuple stands for some
// integer 0 <= v < P. This block converts the tuple to binary by the Chinese
// remainder theorem, v = (sum d_p * (P/p) * inv_p) mod P, reduces v modulo M and
// re-encodes the result as digits. This follows the worked addition example of
// the document (convert the inner tuple to binary, take it modulo the outer
// modulus); the CRT form of the conversion is this design's choice.
// Combinational.
module nrns_reduce
  import nrns_pkg::*;
#(
  parameter int M = 13
) (
  input  res_t d,              // digits of v, 0 <= v < P
  output res_t y               // digits of v mod M
);
  localparam int MASK = inner_mask(M);

  typedef longint wgt_t [NPRIME];

  function automatic wgt_t weights();
    wgt_t t;
    for (int p = 0; p < NPRIME; p++) t[p] = digit_weight(MASK, p);
    return t;
  endfunction

  localparam longint P   = mask_range(MASK);
  localparam wgt_t   WGT = weights();

  logic [47:0] sum;
  int          v, vm;

  always_comb begin
    sum = '0;
    for (int p = 0; p < NPRIME; p++)
      if (MASK[p]) sum = sum + 48'(d[DIG_W*p +: DIG_W]) * 48'(WGT[p]);
    v  = int'(sum % 48'(P));
    vm = v % M;
    y  = '0;
    for (int p = 0; p < NPRIME; p++)
      if (MASK[p]) y[DIG_W*p +: DIG_W] = DIG_W'(vm % prime_at(p));
  end
endmodule
