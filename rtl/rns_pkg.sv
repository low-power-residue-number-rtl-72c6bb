// rns_pkg -- constants and constant functions shared by the RNS FIR filter.
//
// The filter works in the residue number system with the three-moduli set
// {2^n-1, 2^n, 2^n+1}, n being the parameter N of every module. Channel
// numbers are fixed here: channel 0 is 2^n-1, channel 1 is 2^n and
// channel 2 is 2^n+1. All residues travel on N+1 bit buses, so the 2^n+1
// channel (whose largest residue is 2^n) fits and the three channels share
// one port shape. The dynamic range is M = (2^n-1) * 2^n * (2^n+1).
//
// The functions below are only evaluated at elaboration time: they give
// the moduli, widths and the Chinese-remainder weights
// W_i = |M_i * |M_i^-1|_m_i|_M with M_i = M / m_i, from which the
// reverse-conversion tables are filled. The moduli set follows the
// reference design; channel numbering and bus widths are this design's
// choice. N is limited to 2..12 so all table arithmetic fits in 64 bits.
package rns_pkg;

  localparam int unsigned NUM_CH = 3;

  // Modulus of channel ch for a moduli set built on 2^n.
  function automatic longint unsigned modulus(int unsigned n, int unsigned ch);
    longint unsigned p;
    p = longint'(1) << n;
    case (ch)
      0:       return p - 1;
      1:       return p;
      default: return p + 1;
    endcase
  endfunction

  // Dynamic range M = product of the three moduli.
  function automatic longint unsigned dyn_range(int unsigned n);
    return modulus(n, 0) * modulus(n, 1) * modulus(n, 2);
  endfunction

  // Number of bits needed to hold 0 .. v-1.
  function automatic int unsigned bits_for(longint unsigned v);
    int unsigned b;
    b = 1;
    while ((longint'(1) << b) < v) b++;
    return b;
  endfunction

  // Width of a value modulo M (also the signed width of the filter output).
  function automatic int unsigned range_w(int unsigned n);
    return bits_for(dyn_range(n));
  endfunction

  // Multiplicative inverse of a modulo m (a and m coprime), extended Euclid.
  function automatic longint unsigned mod_inverse(longint unsigned a, longint unsigned m);
    longint r0, r1, t0, t1, q, tmp;
    r0 = longint'(m);
    r1 = longint'(a % m);
    t0 = 0;
    t1 = 1;
    while (r1 != 0) begin
      q   = r0 / r1;
      tmp = r0 - q * r1; r0 = r1; r1 = tmp;
      tmp = t0 - q * t1; t0 = t1; t1 = tmp;
    end
    if (t0 < 0) t0 = t0 + longint'(m);
    return longint'(unsigned'(t0));
  endfunction

  // CRT weight of channel ch: |M_i * |M_i^-1|_m_i|_M.
  function automatic longint unsigned crt_weight(int unsigned n, int unsigned ch);
    longint unsigned big_m, mi, inv;
    big_m = dyn_range(n);
    mi    = big_m / modulus(n, ch);
    inv   = mod_inverse(mi % modulus(n, ch), modulus(n, ch));
    return (mi * inv) % big_m;
  endfunction

endpackage
