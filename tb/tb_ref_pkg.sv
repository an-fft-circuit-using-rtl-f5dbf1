// tb_ref_pkg: reference arithmetic for the testbenches of the residue FFT.
//
// Written independently of the RTL datapath: modular inverses by the extended
// Euclidean algorithm, residue-to-integer conversion by Garner's mixed-radix
// method, and decoding of a nested field by search. Only the field layout
// (which inner primes a modulus uses) is taken from nrns_pkg, because it is
// the definition of the encoding rather than a computation under test.
package tb_ref_pkg;
  import nrns_pkg::*;

  function automatic longint pmod(longint v, longint m);
    longint r = v % m;
    return (r < 0) ? r + m : r;
  endfunction

  function automatic longint inv_mod(longint a, longint m);
    longint t = 0, nt = 1, r = m, nr = pmod(a, m), q, tmp;
    while (nr != 0) begin
      q = r / nr;
      tmp = t - q * nt; t = nt; nt = tmp;
      tmp = r - q * nr; r = nr; nr = tmp;
    end
    return pmod(t, m);
  endfunction

  // value 0 <= v < m stored in a field of modulus m
  function automatic int decode(int m, res_t f);
    int mask = field_mask(m);
    if (mask == 0) return int'(f);
    for (int v = 0; v < m; v++) begin
      bit ok = 1;
      for (int p = 0; p < NPRIME; p++)
        if (mask[p] && int'(f[4*p +: 4]) != v % prime_at(p)) ok = 0;
      if (ok) return v;
    end
    return -1;                 // not a valid field
  endfunction

  // field of modulus m holding v mod m (v any integer)
  function automatic res_t enc(int m, longint v);
    int r = int'(pmod(v, m));
    int mask = field_mask(m);
    res_t f = '0;
    if (mask == 0) return res_t'(r);
    for (int p = 0; p < NPRIME; p++)
      if (mask[p]) f[4*p +: 4] = 4'(r % prime_at(p));
    return f;
  endfunction

  // Garner: signed integer, centred on zero, with residues r[i] modulo mods[i], i < n
  function automatic longint garner(mod_list_t mods, int n, longint r [MAXL]);
    longint x = 0, prod = 1, d;
    for (int i = 0; i < n; i++) begin
      d = pmod((r[i] - pmod(x, mods[i])) * inv_mod(pmod(prod, mods[i]), mods[i]), mods[i]);
      x = x + d * prod;
      prod = prod * mods[i];
    end
    if (x >= (prod + 1) / 2) x = x - prod;
    return x;
  endfunction

  function automatic longint twq(int tw_w, real v);
    real s = real'((64'd1 << (tw_w - 1)) - 1) * v;
    return (s >= 0.0) ? longint'($floor(s + 0.5)) : -longint'($floor(-s + 0.5));
  endfunction

  // quantised twiddle exp(-2 pi i e / n): part 0 real, part 1 imaginary
  function automatic longint twiddle(int n, int e, int tw_w, int part);
    real ang = 2.0 * 3.14159265358979323846 * real'(e) / real'(n);
    return (part == 0) ? twq(tw_w, $cos(ang)) : twq(tw_w, -$sin(ang));
  endfunction

  // moduli used by stage s of the FFT: the shortest prefix of mods whose product
  // covers a signed (in_w+s+1)-bit value; all of them in the last stage
  function automatic int ref_active(mod_list_t mods, int l, int in_w, int s, int stages);
    longint prod = 1;
    if (s == stages - 1) return l;
    for (int i = 0; i < l; i++) begin
      prod = prod * mods[i];
      if (prod >= (64'd1 << (in_w + s + 1))) return i + 1;
    end
    return l;
  endfunction

  // staged residue FFT of one frame. x holds re/im of n samples (re at 2j,
  // im at 2j+1). On return y[(i*n + t)*2 + part] is the residue modulo mods[i]
  // of output t (array order, i.e. bin bit-reversed). New moduli are derived
  // before each stage from the moduli already present, as the circuit does.
  function automatic void ref_fft(int n, int in_w, int tw_w, mod_list_t mods, int l,
                                  const ref longint x[], ref longint y[]);
    int stages = 0;
    int act, prev;
    longint r [MAXL];
    while ((1 << stages) < n) stages++;
    y = new[l * n * 2];
    foreach (y[q]) y[q] = 0;
    prev = ref_active(mods, l, in_w, 0, stages);
    for (int i = 0; i < prev; i++)
      for (int j = 0; j < n; j++)
        for (int part = 0; part < 2; part++)
          y[(i*n + j)*2 + part] = pmod(x[2*j + part], mods[i]);
    for (int s = 0; s < stages; s++) begin
      int d = n >> (s + 1);
      act = ref_active(mods, l, in_w, s, stages);
      for (int i = prev; i < act; i++)
        for (int j = 0; j < n; j++)
          for (int part = 0; part < 2; part++) begin
            for (int q = 0; q < MAXL; q++) r[q] = (q < i) ? y[(q*n + j)*2 + part] : 0;
            y[(i*n + j)*2 + part] = pmod(garner(mods, i, r), mods[i]);
          end
      prev = act;
      for (int b = 0; b < n; b += 2 * d)
        for (int k = 0; k < d; k++)
          for (int i = 0; i < act; i++) begin
            longint m = mods[i];
            int j0 = (i*n + b + k) * 2, j1 = (i*n + b + k + d) * 2;
            longint ar = y[j0], ai = y[j0+1], br = y[j1], bi = y[j1+1];
            longint wr = pmod(twiddle(n, k << s, tw_w, 0), m);
            longint wi = pmod(twiddle(n, k << s, tw_w, 1), m);
            longint dr = pmod(ar - br, m), di = pmod(ai - bi, m);
            y[j0]   = pmod(ar + br, m);
            y[j0+1] = pmod(ai + bi, m);
            y[j1]   = pmod(dr * wr - di * wi, m);
            y[j1+1] = pmod(dr * wi + di * wr, m);
          end
    end
  endfunction
endpackage
