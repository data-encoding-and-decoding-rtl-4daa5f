// tb_ref_pkg: reference models for the testbenches, written from the
// coupling-cost definition rather than from the RTL's pair flags.
// A word is held in a 256-bit vector and w gives the number of lines used.
// cost(y, z): coupling cost of the transition y -> z, summed over the w-1
// adjacent line pairs: 1 for a pair where one line switches, 2 where both
// switch in opposite directions, 0 otherwise.
package tb_ref_pkg;
  typedef logic [255:0] word_t;

  function automatic word_t odd_m(int w);
    word_t m = '0;
    for (int i = 1; i < w; i += 2) m[i] = 1'b1;
    return m;
  endfunction

  function automatic word_t even_m(int w);
    word_t m = '0;
    for (int i = 0; i < w; i += 2) m[i] = 1'b1;
    return m;
  endfunction

  function automatic word_t full_m(int w);
    return odd_m(w) | even_m(w);
  endfunction

  function automatic int cost(word_t y, word_t z, int w);
    int c = 0;
    for (int i = 0; i + 1 < w; i++) begin
      bit a = y[i] != z[i];
      bit b = y[i+1] != z[i+1];
      if (a != b) c += 1;
      else if (a && b && z[i] != z[i+1]) c += 2;
    end
    return c;
  endfunction

  function automatic int rises(word_t y, word_t z, int w);
    int c = 0;
    for (int i = 0; i < w; i++) if (!y[i] && z[i]) c++;
    return c;
  endfunction

  // Scheme I: odd inversion if it lowers the cost.
  function automatic word_t enc1(word_t x, word_t y, int w);
    word_t xo = x ^ odd_m(w);
    return (cost(y, xo, w) < cost(y, x, w)) ? xo : x;
  endfunction

  function automatic word_t dec1(word_t z, int w);
    return z[w-1] ? z ^ odd_m(w) : z;
  endfunction

  // Scheme II decoder: an inverted word was fully inverted exactly when
  // odd-inverting it again would lower its cost against the previous word.
  function automatic word_t dec2(word_t z, word_t r, int w);
    if (!z[w-1]) return z;
    if (cost(r, z ^ odd_m(w), w) < cost(r, z, w)) return z ^ full_m(w);
    return z ^ odd_m(w);
  endfunction

  // Scheme II encoder: largest strictly positive saving, odd kept on a tie,
  // full only if dec2 returns x.
  function automatic word_t enc2(word_t x, word_t y, int w);
    int c0 = cost(y, x, w);
    word_t zo = x ^ odd_m(w), zf = x ^ full_m(w);
    int so = c0 - cost(y, zo, w), sf = c0 - cost(y, zf, w);
    bit fok = dec2(zf, y, w) == x;
    if (fok && sf > 0 && sf > so) return zf;
    if (so > 0) return zo;
    return x;
  endfunction

  // Scheme III: best of none, odd, even, full (earlier wins ties).
  function automatic word_t enc3(word_t x, word_t y, int w);
    word_t c[4];
    int best = cost(y, x, w), k = 0;
    c[0] = x; c[1] = x ^ odd_m(w); c[2] = x ^ even_m(w); c[3] = x ^ full_m(w);
    for (int i = 1; i < 4; i++)
      if (cost(y, c[i], w) < best) begin best = cost(y, c[i], w); k = i; end
    return c[k];
  endfunction

  function automatic word_t dec3(word_t z, int w);
    word_t x = z;
    if (z[w-1]) x ^= odd_m(w);
    if (z[w-2]) x ^= even_m(w);
    return x;
  endfunction

  function automatic word_t gray(word_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic word_t rand_word(int w);
    word_t v = '0;
    for (int i = 0; i < w; i += 32) v[i +: 32] = $urandom;
    for (int i = w; i < 256; i++) v[i] = 1'b0;
    return v;
  endfunction
endpackage
