// gda_pkg -- word lengths and the elaboration-time arithmetic of the
// group distributed arithmetic (GDA) DCT.
//
// For a prime length N with primitive root g, the DCT
//   Y(0) = sum y(n)
//   Y(k) = (2 T(k) + x(0)) cos(pi k / 2N),        k = 1..N-1
//   x(N-1) = y(N-1),  x(n) = y(n) - x(n+1)
//   T(k) = sum_{n=1..N-1} x(n) cos(pi n k / N)
// splits into two cyclic convolutions of length M = (N-1)/2 over the
// coefficients c_j = cos(2 pi g^j / N), j = 0..M-1:
//   D_i = x(a_i) + x(b_i)   (even half)   or   x(a_i) - x(b_i)   (odd half)
//   O_l = sum_i D_i c_{(i+l) mod M},   l = 0..M-1
// where {a_i, b_i} = {g^i mod N, N - (g^i mod N)} with a_i the even member,
// and O_l is T(2 k') (even half) or T(2 k' - N) (odd half), k' = +-g^l
// taken in 1..M (even) or M+1..N-1 (odd). For N = 7, g = 3 this is
//   A = {x6+x1, x4+x3, x2+x5},  c = {cos 2a, cos 6a, cos 4a},  a = pi/7,
//   outputs T(2), T(6), T(4) and, from the differences, T(5), T(1), T(3).
//
// In each DA cycle the MSBs of the M words form a vector X with bit M-1-i
// taken from D_i. The vectors fall into rotation groups (necklaces). Each
// group is stored once, as the M partial products of its seed (the smallest
// member); a member equal to the seed rotated left by r reads the seed's row
// and rotates it so that output l takes word (l - r) mod M. Groups are
// numbered in increasing seed order, all-zeros and all-ones last, which for
// N = 7 gives the published seeds, group addresses and rotating factors.
//
// The reformulation, the grouping and the 16-bit word and coefficient
// lengths are the published ones; the functions that derive the tables for
// any N, the fixed-point formats and the input width are this design's.
package gda_pkg;

  localparam int L  = 16;  // DA word length (bits of each D_i)
  localparam int CW = 16;  // group ROM word width
  localparam int KW = 16;  // width of the cos(pi k / 2N) constants
  localparam int KF = 15;  // their fraction bits (all lie in (0, 1))

  localparam real PI = 3.14159265358979323846;

  // ---------------------------------------------------------------- widths
  // sample width that keeps every D_i inside L bits: |x(n)| <= (N-n) 2^(IW-1)
  function automatic int sample_width(input int n, input int l);
    return l - 1 - $clog2(n);
  endfunction

  // width of x(n)
  function automatic int x_width(input int n, input int iw);
    return iw + $clog2(n);
  endfunction

  // width of an integer Y(k): |Y(k)| <= N 2^(IW-1)
  function automatic int out_width(input int n, input int iw);
    return iw + $clog2(n) + 1;
  endfunction

  // ------------------------------------------------------- number theory
  function automatic int pow_mod(input int g, input int e, input int n);
    int p;
    p = 1;
    for (int i = 0; i < e; i++) p = (p * g) % n;
    return p;
  endfunction

  // smallest primitive root of the prime n (0 if there is none)
  function automatic int prim_root(input int n);
    for (int g = 2; g < n; g++) begin
      int p, ord;
      p = g % n;
      ord = 1;
      while (p != 1 && ord < n) begin
        p = (p * g) % n;
        ord++;
      end
      if (ord == n - 1) return g;
    end
    return (n == 3) ? 2 : 0;
  endfunction

  // class representative g^i mod n
  function automatic int class_rep(input int n, input int i);
    return pow_mod(prim_root(n), i, n);
  endfunction

  // the pair of sample indices merged into D_i: first the even member
  function automatic int pair_a(input int n, input int i);
    int r;
    r = class_rep(n, i);
    return (r % 2 == 0) ? r : n - r;
  endfunction

  function automatic int pair_b(input int n, input int i);
    return n - pair_a(n, i);
  endfunction

  // transform index produced by output l of the even (odd = 0) or odd
  // (odd = 1) half
  function automatic int out_k(input int n, input int l, input bit odd);
    int r, m;
    m = (n - 1) / 2;
    r = class_rep(n, l);
    if (!odd) begin
      if (r > m) r = n - r;
      return 2 * r;
    end else begin
      if (r <= m) r = n - r;
      return 2 * r - n;
    end
  endfunction

  // ------------------------------------------------------ fixed point
  function automatic longint round_real(input real v);
    return longint'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // c_j = cos(2 pi g^j / N) with cf fraction bits
  function automatic longint coef_q(input int n, input int j, input int cf);
    return round_real($cos(2.0 * PI * real'(class_rep(n, j)) / real'(n)) * real'(longint'(1) << cf));
  endfunction

  // cos(pi k / 2N) with KF fraction bits
  function automatic longint post_cos(input int n, input int k);
    return round_real($cos(PI * real'(k) / (2.0 * real'(n))) * real'(longint'(1) << KF));
  endfunction

  // fraction bits for the group ROM: as many as CW allows once the largest
  // sum of coefficients fits (14 for N = 7: the largest sum is -1.12)
  function automatic int rom_frac(input int n, input int cw);
    int  m, ib;
    real best;
    m = (n - 1) / 2;
    best = 0.0;
    for (int s = 0; s < (1 << m); s++) begin
      real sum;
      sum = 0.0;
      for (int j = 0; j < m; j++)
        if (s[j]) sum += $cos(2.0 * PI * real'(class_rep(n, j)) / real'(n));
      if (sum < 0.0) sum = -sum;
      if (sum > best) best = sum;
    end
    ib = 0;
    while (real'(longint'(1) << ib) <= best) ib++;
    return cw - 1 - ib;
  endfunction

  // ------------------------------------------------ rotation groups
  // rotate the m-bit vector v left by r
  function automatic int rotl(input int v, input int r, input int m);
    int x;
    x = v;
    for (int i = 0; i < r; i++) x = ((x << 1) | (x >> (m - 1))) & ((1 << m) - 1);
    return x;
  endfunction

  // seed of v's group: its smallest rotation
  function automatic int seed_of(input int v, input int m);
    int s;
    s = v;
    for (int r = 1; r < m; r++) if (rotl(v, r, m) < s) s = rotl(v, r, m);
    return s;
  endfunction

  // rotating factor: smallest r with rotl(seed, r) = v
  function automatic int rot_of(input int v, input int m);
    int s;
    s = seed_of(v, m);
    for (int r = 0; r < m; r++) if (rotl(s, r, m) == v) return r;
    return 0;
  endfunction

  // number of groups
  function automatic int num_groups(input int m);
    int c;
    c = 0;
    for (int v = 0; v < (1 << m); v++) if (seed_of(v, m) == v) c++;
    return c;
  endfunction

  // group address of v: seeds in increasing order, all-zeros and
  // all-ones last
  function automatic int group_of(input int v, input int m);
    int s, g;
    s = seed_of(v, m);
    if (s == 0) return num_groups(m) - 2;
    if (s == (1 << m) - 1) return num_groups(m) - 1;
    g = 0;
    for (int t = 1; t < s; t++) if (seed_of(t, m) == t) g++;
    return g;
  endfunction

  // seed of group g
  function automatic int seed_of_group(input int g, input int m);
    for (int v = 0; v < (1 << m); v++)
      if (seed_of(v, m) == v && group_of(v, m) == g) return v;
    return 0;
  endfunction

  // ROM word l of group g: partial product of the seed for output l
  function automatic longint rom_word(input int n, input int g, input int l, input int cf);
    int m, s;
    longint w;
    m = (n - 1) / 2;
    s = seed_of_group(g, m);
    w = 0;
    for (int i = 0; i < m; i++)
      if (s[m - 1 - i]) w += coef_q(n, (i + l) % m, cf);
    return w;
  endfunction

endpackage
