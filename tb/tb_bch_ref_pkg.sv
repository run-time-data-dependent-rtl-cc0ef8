// tb_bch_ref_pkg -- reference arithmetic for the BCH testbenches.
//
// Written independently of the RTL: field products use exp/log tables, the
// generator polynomial is the product of (x + alpha^e) over every exponent e
// of the cyclotomic cosets of 1..2t (found by doubling modulo 2^m-1), and the
// parity is a plain polynomial long division. Bit vectors hold polynomials
// with bit i = coefficient of x^i; codewords are handled as degree vectors
// (cw[p] = coefficient of x^p), the storage order being degree l-1 first.
package tb_bch_ref_pkg;

  int unsigned rm;            // field degree in use
  int unsigned rn;            // 2^m - 1
  int unsigned exp_t [8192];
  int unsigned log_t [4096];

  function automatic void ref_init(input int unsigned m);
    int unsigned prim, x;
    case (m)
      4: prim = 'h13;   5: prim = 'h25;   6: prim = 'h43;   7: prim = 'h89;
      8: prim = 'h11d;  9: prim = 'h211;  10: prim = 'h409; 11: prim = 'h805;
      default: prim = 'h1053;
    endcase
    rm = m;
    rn = (1 << m) - 1;
    x = 1;
    for (int unsigned i = 0; i < 2 * rn; i++) begin
      exp_t[i] = x;
      if (i < rn) log_t[x] = i;
      x = x << 1;
      if (x & (1 << m)) x = x ^ prim;
    end
  endfunction

  function automatic int unsigned ref_mul(input int unsigned a, input int unsigned b);
    if (a == 0 || b == 0) return 0;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic int unsigned ref_alpha(input longint e);
    longint r;
    r = e % longint'(rn);
    if (r < 0) r += rn;
    return exp_t[r];
  endfunction

  // generator polynomial of the t-error-correcting code; returns its degree
  function automatic int unsigned ref_genpoly(input int unsigned t, output bit [4095:0] g);
    bit in_set [4096];
    int unsigned p [4096];
    int unsigned deg, x;
    for (int unsigned i = 0; i < 4096; i++) begin in_set[i] = 0; p[i] = 0; end
    for (int unsigned j = 1; j <= 2 * t; j++) begin
      x = j % rn;
      for (int unsigned k = 0; k < rm; k++) begin
        in_set[x] = 1;
        x = (2 * x) % rn;
      end
    end
    p[0] = 1;
    deg = 0;
    for (int unsigned e = 0; e < rn; e++) if (in_set[e]) begin
      // p <- p * (x + alpha^e)
      for (int i = int'(deg) + 1; i >= 0; i--)
        p[i] = ((i > 0) ? p[i-1] : 0) ^ ref_mul(p[i], exp_t[e]);
      deg++;
    end
    g = '0;
    for (int unsigned i = 0; i <= deg; i++) g[i] = p[i][0];
    return deg;
  endfunction

  // systematic codeword as degree vector: data[K-1] at degree l-1
  function automatic bit [4095:0] ref_encode(input bit [4095:0] data, input int unsigned k,
                                             input bit [4095:0] g, input int unsigned r);
    bit [4095:0] rem, cw;
    rem = '0;
    for (int unsigned i = 0; i < k; i++) rem[r + i] = data[i];
    for (int i = int'(k + r) - 1; i >= int'(r); i--)
      if (rem[i]) rem = rem ^ (g << (i - int'(r)));
    cw = '0;
    for (int unsigned i = 0; i < k; i++) cw[r + i] = data[i];
    for (int unsigned i = 0; i < r; i++) cw[i] = rem[i];
    return cw;
  endfunction

  // evaluate a binary polynomial (degree vector, length l) at alpha^j
  function automatic int unsigned ref_eval(input bit [4095:0] w, input int unsigned l,
                                           input int unsigned j);
    int unsigned s;
    s = 0;
    for (int unsigned p = 0; p < l; p++)
      if (w[p]) s = s ^ ref_alpha(longint'(j) * longint'(p));
    return s;
  endfunction

  // number of parity bits by the coset rule, counted independently
  function automatic int unsigned ref_rlen(input int unsigned t);
    bit [4095:0] g;
    return ref_genpoly(t, g);
  endfunction

endpackage
