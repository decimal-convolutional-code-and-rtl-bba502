// dcc_ref_pkg: reference models used by the test benches of the decimal
// convolutional code. They are written from the code's definition, not from
// the RTL: the encoder works from an explicit list of past input bits and the
// reference decoder runs one 2^(K1-1)-state trellis for the whole frame, with
// the oldest generator tap switched off from the break stage on (a plain
// four-way choice at the break stage, no merge trick).
package dcc_ref_pkg;

  typedef struct {
    int          k1;
    int          l;
    int          bs;
    int          rep;
    int          q;
    logic [31:0] g0;
    logic [31:0] g1;
  } cfg_t;

  function automatic int nd(cfg_t c);    return c.l - (c.k1 - 2); endfunction
  function automatic int nsym(cfg_t c);  return c.l + c.rep / 2;  endfunction

  // Code bits {c0, c1} of stage t (1-based) given all input bits u[1..t].
  function automatic logic [1:0] stage_code(cfg_t c, int t, logic u []);
    int k;
    logic b0, b1;
    k  = (t >= c.bs) ? c.k1 - 1 : c.k1;   // taps in use
    b0 = 0; b1 = 0;
    for (int i = 0; i < k; i++) begin      // i = age of the input bit
      logic ub;
      ub = (t - i >= 1) ? u[t-i] : 1'b0;
      b0 ^= ub & c.g0[c.k1-1-i];
      b1 ^= ub & c.g1[c.k1-1-i];
    end
    return {b0, b1};
  endfunction

  // Full stage input u[1..L] from the data bits (tail stages are 0).
  function automatic void frame_inputs(cfg_t c, logic data [], ref logic u []);
    u = new[c.l + 1];
    u[0] = 0;
    for (int t = 1; t <= c.l; t++) u[t] = (t <= nd(c)) ? data[t-1] : 1'b0;
  endfunction

  // The latent bit: input of stage BS-(K1-1), 0 if that lies before the frame.
  function automatic logic latent_of(cfg_t c, logic u []);
    int t;
    t = c.bs - (c.k1 - 1);
    return (t >= 1) ? u[t] : 1'b0;
  endfunction

  // Symbols of one frame, in transmission order.
  function automatic void encode(cfg_t c, logic data [], ref logic [1:0] sym []);
    logic u [];
    int j;
    frame_inputs(c, data, u);
    sym = new[nsym(c)];
    j = 0;
    for (int t = 1; t <= c.l; t++) begin
      if (t == c.bs)
        for (int r = 0; r < c.rep / 2; r++) begin
          sym[j] = {2{latent_of(c, u)}};
          j++;
        end
      sym[j] = stage_code(c, t, u);
      j++;
    end
  endfunction

  function automatic int bm(cfg_t c, logic [1:0] s, int r0, int r1);
    int qm;
    qm = (1 << c.q) - 1;
    return (s[1] ? qm - r0 : r0) + (s[0] ? qm - r1 : r1);
  endfunction

  // Index of the symbol carrying stage t.
  function automatic int sym_index(cfg_t c, int t);
    return (t >= c.bs) ? t - 1 + c.rep / 2 : t - 1;
  endfunction

  // Soft distance between the code of data and the received frame.
  function automatic int distance(cfg_t c, logic data [], int r0 [], int r1 []);
    logic u [];
    int d;
    frame_inputs(c, data, u);
    d = 0;
    for (int t = 1; t <= c.l; t++)
      d += bm(c, stage_code(c, t, u), r0[sym_index(c, t)], r1[sym_index(c, t)]);
    return d;
  endfunction

  // Smallest distance over all terminated frames; with fix_latent = 1 only frames
  // whose latent bit equals fval are allowed.
  function automatic int ml_distance(cfg_t c, int r0 [], int r1 [], bit fix_latent, logic fval);
    int m1, ns;
    int pm [], nx [];
    m1 = c.k1 - 1;
    ns = 1 << m1;
    pm = new[ns];
    nx = new[ns];
    foreach (pm[s]) pm[s] = (s == 0) ? 0 : 1 << 28;
    for (int t = 1; t <= c.l; t++) begin
      foreach (nx[s]) nx[s] = 1 << 29;
      for (int s = 0; s < ns; s++) begin
        // state s: bit m1-1 = u[t-1] ... bit 0 = u[t-m1]
        if (t == c.bs && fix_latent && (s[0] != fval)) continue;
        for (int b = 0; b < 2; b++) begin
          logic [31:0] vec;
          logic [1:0] cs;
          int n, k;
          if (t > nd(c) && b == 1) continue;
          vec = (32'(b) << m1) | 32'(s);
          if (t >= c.bs) cs = {^(vec & c.g0 & ~32'd1), ^(vec & c.g1 & ~32'd1)};
          else           cs = {^(vec & c.g0), ^(vec & c.g1)};
          n = int'(vec >> 1);
          k = pm[s] + bm(c, cs, r0[sym_index(c, t)], r1[sym_index(c, t)]);
          if (k < nx[n]) nx[n] = k;
        end
      end
      pm = nx;
    end
    // terminated: the newest K1-2 inputs are zero; the oldest register bit
    // (u[L-K1+2], a data bit) may be anything.
    return (pm[0] < pm[1]) ? pm[0] : pm[1];
  endfunction

endpackage
