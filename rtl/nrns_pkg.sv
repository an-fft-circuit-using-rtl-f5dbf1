// nrns_pkg: shared types and elaboration-time functions of the nested-RNS FFT.
//
// Every modulus channel carries one residue in a fixed RES_W-bit field (res_t).
// A plain channel holds the residue itself in the low bits. A nested channel
// (nested RNS, NRNS) holds one 4-bit digit per entry of the inner prime list
// PRIMES, digit p in bits [4p +: 4]; digits of primes not selected for that
// modulus are kept at zero.
//
// Which moduli are nested, and with which inner primes, is computed here from
// the LUT-count model of the design: a k-bit modular circuit with 2k inputs costs
// ceil(k*2^(2k)/L_FPGA) LUTs (L_FPGA = 64 bits per 6-input LUT). For modulus m
// the cheapest subset of PRIMES whose product is at least m*m is chosen, and the
// modulus is nested only when that subset is cheaper than the plain circuit
// (gain G > 1). Inner moduli drawn from primes only, and the m*m dynamic-range
// rule, follow the document; the candidate list {2,3,5,7,11,13} is this
// design's choice.
package nrns_pkg;

  localparam int RES_W  = 24;        // width of one residue field
  localparam int NPRIME = 6;         // number of inner-prime candidates
  localparam int DIG_W  = 4;         // width of one inner digit
  localparam int MAXL   = 8;         // largest number of outer moduli
  localparam int L_FPGA = 64;        // bits of one FPGA LUT (6 inputs)

  typedef logic [RES_W-1:0] res_t;

  typedef struct packed {
    res_t re;
    res_t im;
  } cres_t;                          // complex residue

  typedef int mod_list_t [MAXL];

  typedef enum logic [1:0] {OP_ADD = 2'd0, OP_SUB = 2'd1, OP_MUL = 2'd2} mod_op_e;

  function automatic int prime_at(int p);
    case (p)
      0: return 2;
      1: return 3;
      2: return 5;
      3: return 7;
      4: return 11;
      default: return 13;
    endcase
  endfunction

  function automatic int ceil_log2(longint v);
    int k = 0;
    while ((64'd1 << k) < v) k++;
    return k;
  endfunction

  // LUT count of a modular circuit with 2k inputs and k outputs
  function automatic int lut_cost(int m);
    int k = ceil_log2(longint'(m));
    return ((k << (2 * k)) + L_FPGA - 1) / L_FPGA;
  endfunction

  // cheapest inner prime subset (bit p selects prime_at(p)) covering m*m
  function automatic int inner_mask(int m);
    int best = 0;
    int best_cost = 32'h7fff_ffff;
    for (int s = 1; s < (1 << NPRIME); s++) begin
      longint prod = 1;
      int c = 0;
      for (int p = 0; p < NPRIME; p++)
        if (s[p]) begin
          prod = prod * prime_at(p);
          c = c + lut_cost(prime_at(p));
        end
      if (prod >= longint'(m) * m && c < best_cost) begin
        best = s;
        best_cost = c;
      end
    end
    return best;
  endfunction

  function automatic int nested_cost(int m);
    int s = inner_mask(m);
    int c = 0;
    for (int p = 0; p < NPRIME; p++)
      if (s[p]) c = c + lut_cost(prime_at(p));
    return c;
  endfunction

  // a modulus is realised in nested RNS when that needs fewer LUTs
  function automatic bit is_nested(int m);
    return inner_mask(m) != 0 && nested_cost(m) < lut_cost(m);
  endfunction

  // residue of a signed value, in [0, m)
  function automatic int smod(longint v, int m);
    longint r = v % longint'(m);
    if (r < 0) r = r + longint'(m);
    return int'(r);
  endfunction

  // digit mask of modulus m's field: inner primes if nested, 0 if plain
  function automatic int field_mask(int m);
    return is_nested(m) ? inner_mask(m) : 0;
  endfunction

  // field encoding of a value 0 <= v < m, given the modulus' field_mask
  function automatic res_t encode(int mask, int v);
    res_t f = '0;
    if (mask != 0) begin
      for (int p = 0; p < NPRIME; p++)
        if (mask[p]) f[DIG_W*p +: DIG_W] = DIG_W'(v % prime_at(p));
    end else begin
      f = res_t'(v);
    end
    return f;
  endfunction

  // product of the inner primes selected by mask
  function automatic longint mask_range(int mask);
    longint pr = 1;
    for (int p = 0; p < NPRIME; p++) if (mask[p]) pr = pr * prime_at(p);
    return pr;
  endfunction

  // CRT weight (R/p) * ((R/p)^-1 mod p) of inner digit p, R = mask_range(mask)
  function automatic longint digit_weight(int mask, int p);
    longint q = mask_range(mask) / prime_at(p);
    longint inv = 0;
    for (int i = 1; i < prime_at(p); i++)
      if ((q * i) % prime_at(p) == 1) inv = longint'(i);
    return mask[p] ? q * inv : 0;
  endfunction

  // bits of a field as stored in memory: ceil(log2 m) for a plain modulus,
  // the sum of ceil(log2 p) over the inner primes for a nested one
  function automatic int field_bits(int m);
    int mask = field_mask(m);
    int b = 0;
    if (mask == 0) return ceil_log2(longint'(m));
    for (int p = 0; p < NPRIME; p++)
      if (mask[p]) b = b + ceil_log2(longint'(prime_at(p)));
    return b;
  endfunction

  // bits of inner digit p in memory, and its offset within a compact field
  function automatic int digit_bits(int p);
    return ceil_log2(longint'(prime_at(p)));
  endfunction

  function automatic int digit_off(int mask, int p);
    int o = 0;
    for (int q = 0; q < p; q++) if (mask[q]) o = o + digit_bits(q);
    return o;
  endfunction

  // number of moduli (a prefix of the list) whose product reaches 2^bits
  function automatic int moduli_for_bits(mod_list_t mods, int l, int bits);
    longint prod = 1;
    for (int i = 0; i < l; i++) begin
      prod = prod * mods[i];
      if (prod >= (64'd1 << bits)) return i + 1;
    end
    return l;
  endfunction

  // moduli active in stage s: signed range of IN_W + s + 1 bits at its output,
  // all moduli in the last stage
  function automatic int active_moduli(mod_list_t mods, int l, int in_w, int s, int stages);
    if (s >= stages - 1) return l;
    return moduli_for_bits(mods, l, in_w + s + 1);
  endfunction

endpackage
