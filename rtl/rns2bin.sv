// rns2bin: residue to binary converter (RNS2Bin) for the first NIN moduli.
//
// Takes one residue field per modulus of MODS[0..NIN-1], plain or nested, and
// returns the integer they represent in the centred range, the residues at
// or above (Mr+1)/2 standing for negative values, with
// Mr the product of those moduli. A nested field is first turned into its
// residue by the inner Chinese remainder theorem (its digits stand for a value
// below the outer modulus). The outer conversion is also the Chinese remainder
// theorem: X = (sum r_i * (Mr/m_i) * inv_i) mod Mr. The document decomposes the
// converter into decision-diagram tables; that is an implementation of the same
// function, and the CRT form here is this design's choice, as is the centred
// (signed) reading of the result. Combinational.
module rns2bin
  import nrns_pkg::*;
#(
  parameter int        NIN  = 2,
  parameter mod_list_t MODS = '{5, 7, 9, 11, 13, 16, 0, 0}
) (
  input  res_t                res [NIN],
  output logic signed [47:0]  x
);
  typedef longint wvec_t [NIN];
  typedef longint dvec_t [NIN*NPRIME];
  typedef int     ivec_t [NIN];

  function automatic longint range_of();
    longint pr = 1;
    for (int i = 0; i < NIN; i++) pr = pr * MODS[i];
    return pr;
  endfunction

  localparam longint MR = range_of();

  // outer CRT weights (MR/m_i) * ((MR/m_i)^-1 mod m_i)
  function automatic wvec_t outer_weights();
    wvec_t t;
    for (int i = 0; i < NIN; i++) begin
      longint q = MR / MODS[i];
      t[i] = 0;
      for (int v = 1; v < MODS[i]; v++)
        if ((q * v) % MODS[i] == 1) t[i] = q * v;
    end
    return t;
  endfunction

  function automatic ivec_t masks();
    ivec_t t;
    for (int i = 0; i < NIN; i++) t[i] = field_mask(MODS[i]);
    return t;
  endfunction

  localparam ivec_t FMASK = masks();

  function automatic dvec_t inner_weights();
    dvec_t t;
    for (int i = 0; i < NIN; i++)
      for (int p = 0; p < NPRIME; p++) t[i*NPRIME+p] = digit_weight(FMASK[i], p);
    return t;
  endfunction

  function automatic wvec_t inner_ranges();
    wvec_t t;
    for (int i = 0; i < NIN; i++) t[i] = mask_range(FMASK[i]);
    return t;
  endfunction

  localparam wvec_t OW = outer_weights();
  localparam dvec_t IW = inner_weights();
  localparam wvec_t IR = inner_ranges();

  logic [47:0] acc, ds, ri;

  always_comb begin
    acc = '0;
    for (int i = 0; i < NIN; i++) begin
      if (FMASK[i] != 0) begin
        ds = '0;
        for (int p = 0; p < NPRIME; p++)
          ds = ds + 48'(res[i][DIG_W*p +: DIG_W]) * 48'(IW[i*NPRIME+p]);
        ri = (ds % 48'(IR[i])) % 48'(MODS[i]);
      end else begin
        ds = '0;
        ri = 48'(res[i]) % 48'(MODS[i]);
      end
      acc = (acc + ri * 48'(OW[i])) % 48'(MR);
    end
    if (acc >= 48'((MR + 1) / 2)) x = $signed(acc) - 48'(MR);
    else                    x = $signed(acc);
  end
endmodule
