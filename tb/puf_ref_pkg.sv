// puf_ref_pkg: reference models used by the testbenches.
//
// Independent re-statements, in plain procedural code, of the delay model and of each
// PUF construction: a delay is 100 + (hash(seed, 4*stage + path) mod 32) for a switch
// input and 4 + (hash(seed ^ 0x5A5A0000, 2*idx + alt) mod 4) for a ring-oscillator
// gate; an arbiter outputs 1 when the top edge arrives strictly first. Challenge bit
// c[0] steers the first stage. Vectors are passed as 128-bit values with an explicit
// length.
//
// These models are written from the published structural descriptions, independently of the
// RTL; the hash and seeding scheme mirror this design's delay model.
package puf_ref_pkg;

  typedef logic [127:0] vec_t;

  function automatic logic [31:0] mix(logic [31:0] seed, logic [31:0] idx);
    logic [31:0] a, b, h;
    a = seed * 32'd2654435761;          // 0x9E3779B1
    b = (idx + 32'd2135587861) * 32'd2246822519;  // 0x7F4A7C15, 0x85EBCA77
    h = a ^ b;
    h ^= {15'd0, h[31:15]};
    h *= 32'd739982445;                 // 0x2C1B3C6D
    h ^= {12'd0, h[31:12]};
    h *= 32'd695872825;                 // 0x297A2D39
    h ^= {15'd0, h[31:15]};
    return h;
  endfunction

  function automatic int sw_d(logic [31:0] seed, int stage, int path);
    logic [31:0] h = mix(seed, 32'(stage * 4 + path));
    return 100 + int'(h % 32);
  endfunction

  function automatic int ro_d(logic [31:0] seed, int idx, int alt);
    logic [31:0] h = mix(seed ^ 32'h5A5A0000, 32'(idx * 2 + alt));
    return 4 + int'(h % 4);
  endfunction

  function automatic logic [31:0] kid(logic [31:0] seed, int i);
    return seed * 37 + 32'(i) + 1;
  endfunction

  // delay chain: arrival times of the top and bottom edges after n stages
  function automatic void chain(logic [31:0] seed, int n, vec_t c, output int t, output int b);
    int nt, nb;
    t = 0; b = 0;
    for (int i = 1; i <= n; i++) begin
      if (c[i-1]) begin nt = b + sw_d(seed, i, 1); nb = t + sw_d(seed, i, 3); end
      else        begin nt = t + sw_d(seed, i, 0); nb = b + sw_d(seed, i, 2); end
      t = nt; b = nb;
    end
  endfunction

  function automatic bit apuf(logic [31:0] seed, int n, vec_t c);
    int t, b;
    chain(seed, n, c, t, b);
    return t < b;
  endfunction

  function automatic bit xor_apuf(logic [31:0] seed, int n, int k, vec_t c);
    bit r = 0;
    for (int i = 0; i < k; i++) r ^= apuf(kid(seed, i), n, c);
    return r;
  endfunction

  // feed-forward APUF with loops p[j] -> q[j] (1-based stages)
  function automatic bit ff_apuf(logic [31:0] seed, int n, vec_t c, int p[], int q[]);
    int t = 0, b = 0, nt, nb;
    bit arb[];
    bit ci;
    arb = new[p.size()];
    for (int i = 1; i <= n; i++) begin
      ci = c[i-1];
      foreach (q[j]) if (q[j] == i) ci = arb[j];
      if (ci) begin nt = b + sw_d(seed, i, 1); nb = t + sw_d(seed, i, 3); end
      else    begin nt = t + sw_d(seed, i, 0); nb = b + sw_d(seed, i, 2); end
      t = nt; b = nb;
      foreach (p[j]) if (p[j] == i) arb[j] = (t < b);
    end
    return t < b;
  endfunction

  function automatic logic [31:0] dapuf(logic [31:0] seed, int n, int k, int m, vec_t c);
    int t[], b[];
    bit a[$];
    int xc;
    logic [31:0] r = 0;
    t = new[k]; b = new[k];
    for (int i = 0; i < k; i++) chain(kid(seed, i), n, c, t[i], b[i]);
    for (int i = 0; i < k; i++) for (int j = i + 1; j < k; j++) a.push_back(t[i] < t[j]);
    for (int i = 0; i < k; i++) for (int j = i + 1; j < k; j++) a.push_back(b[i] < b[j]);
    xc = (k * (k - 1) + m - 1) / m;
    foreach (a[g]) r[g / xc] ^= a[g];
    return r;
  endfunction

  function automatic int ro_half(logic [31:0] seed, int m);
    int h = 0;
    for (int i = 0; i < m; i++) h += ro_d(seed, i, 0);
    return h;
  endfunction

  function automatic int cro_half(logic [31:0] seed, int m, vec_t s);
    int h = ro_d(seed, 0, 0);
    for (int i = 1; i < m; i++) h += ro_d(seed, i, s[i-1] ? 1 : 0);
    return h;
  endfunction

  // rising edges of a ring that starts low and toggles every h cycles, within w cycles
  function automatic int ro_count(int h, int w);
    return ((w / h) + 1) / 2;
  endfunction

  // RO PUF: returns the expected response (sure is kept for callers that want a margin)
  function automatic bit ropuf(logic [31:0] seed, int n, int m, int w, vec_t c, output bit sure,
                               input bit conf = 0);
    int nb = 1 << n;
    int sel = int'(c[15:0]) & (nb - 1);
    int hy, hz, cy, cz;
    hy = conf ? cro_half(kid(seed, sel), m, c) : ro_half(kid(seed, sel), m);
    hz = conf ? cro_half(kid(seed, nb + sel), m, c) : ro_half(kid(seed, nb + sel), m);
    cy = ro_count(hy, w);
    cz = ro_count(hz, w);
    sure = 1;  // the count model is exact for the ring model used here
    return cy > cz;
  endfunction

  function automatic vec_t rot(vec_t c, int n, int k);
    vec_t s = 0;
    for (int i = 0; i < n; i++) s[(i + k) % n] = c[i];
    return s;
  endfunction

  function automatic vec_t lfsr(vec_t c, int n, vec_t g);
    bit fb = 0;
    vec_t s;
    for (int i = 0; i < n; i++) fb ^= g[i] & c[i];
    s = c >> 1;
    s[n-1] = fb;
    return s;
  endfunction

  function automatic bit bent(vec_t y, int k);
    bit r = 0;
    for (int i = 0; i + 1 < k; i += 2) r ^= y[i] & y[i+1];
    return r;
  endfunction

  function automatic bit spuf(logic [31:0] seed, int n, vec_t c);
    vec_t cs = 0;
    for (int i = 0; i < n; i++) cs[i] = c[(i + n / 2) % n];
    return apuf(kid(seed, 0), n, c) ^ apuf(kid(seed, 1), n, cs);
  endfunction

  // Pico-PUF: the latch b = !a1 | (a2 & b) starts at 1 and ends at 0 only when a1 rises
  // strictly before a2.
  function automatic int pico_d(logic [31:0] seed, int k);
    logic [31:0] h = mix(seed ^ 32'h3C3C0000, 32'(k));
    return 4 + int'(h % 16);
  endfunction

  function automatic bit pico(logic [31:0] seed);
    return !(pico_d(seed, 0) < pico_d(seed, 1));
  endfunction

  function automatic vec_t rand_vec();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

endpackage
