// twiddle_rom: twiddle factors of one FFT stage as residues of one modulus.
//
// Stage STAGE of an N-point radix-2 decimation-in-frequency FFT multiplies its
// k-th difference (0 <= k < N/2^(STAGE+1)) by W = exp(-2*pi*i*k*2^STAGE/N).
// The factor is quantised to integers with TW_W-bit two's-complement parts,
// re = round(S*cos(t)), im = round(-S*sin(t)), S = 2^(TW_W-1)-1, and each part is
// stored as its residue modulo M in the modulus' field encoding (plain or
// nested). The 18-bit default follows the twiddle width the document uses; the
// rounding rule is this design's choice. The table is computed at elaboration,
// one constant per entry (t = 2*pi*k*2^STAGE/N); the read is combinational.
module twiddle_rom
  import nrns_pkg::*;
#(
  parameter int N     = 1024,
  parameter int STAGE = 0,
  parameter int M     = 13,
  parameter int TW_W  = 18
) (
  input  logic [((N >> (STAGE + 1)) > 1 ? $clog2(N >> (STAGE + 1)) : 1)-1:0] k,
  output cres_t                                                              w
);
  localparam int D    = N >> (STAGE + 1);
  localparam int MASK = field_mask(M);

  function automatic longint quant(real v);
    real s = real'((64'd1 << (TW_W - 1)) - 1) * v;
    return (s >= 0.0) ? longint'($floor(s + 0.5)) : -longint'($floor(-s + 0.5));
  endfunction

  function automatic int resid(longint v);
    longint r = v % longint'(M);
    if (r < 0) r = r + longint'(M);
    return int'(r);
  endfunction

  // entry i, part 0: real, part 1: imaginary
  function automatic res_t entry(int i, int part);
    real ang = 2.0 * 3.14159265358979323846 * real'(i * (1 << STAGE)) / real'(N);
    return encode(MASK, resid(quant(part == 0 ? $cos(ang) : -$sin(ang))));
  endfunction

  res_t tbl_re [D];
  res_t tbl_im [D];

  // one constant per entry, so the table is built in time linear in D
  for (genvar i = 0; i < D; i++) begin : g_ent
    localparam res_t RE = entry(i, 0);
    localparam res_t IM = entry(i, 1);
    assign tbl_re[i] = RE;
    assign tbl_im[i] = IM;
  end

  assign w.re = tbl_re[k];
  assign w.im = tbl_im[k];
endmodule
