// Reference models shared by the receiver testbenches.
//
// The scrambling code reference runs the two m-sequence recursions on plain
// bit arrays (not shift registers) and forms the Q code from the sequence
// definition; the OVSF reference walks the code tree (C[2k] = (C[k], C[k]),
// C[2k+1] = (C[k], -C[k])) instead of using the closed form of the
// generator.  Values are +1/-1 integers or sign bits (1 = -1).
package rake_tb_pkg;

  bit xs[];
  bit ys[];

  // x(i+25) = x(i+3)+x(i), y(i+25) = y(i+3)+y(i+2)+y(i+1)+y(i);
  // x(0..23)=0, x(24)=1, y(0..23)=1, y(24)=0 (code number 0)
  function automatic void build_pn(int n);
    xs = new[n + 25];
    ys = new[n + 25];
    for (int i = 0; i < 25; i++) begin
      xs[i] = (i == 24);
      ys[i] = (i != 24);
    end
    for (int i = 0; i < n; i++) begin
      xs[i+25] = xs[i+3] ^ xs[i];
      ys[i+25] = ys[i+3] ^ ys[i+2] ^ ys[i+1] ^ ys[i];
    end
  endfunction

  function automatic bit pn_i(int k);
    return xs[k] ^ ys[k];
  endfunction

  function automatic bit pn_q(int k);
    return xs[k+4] ^ xs[k+7] ^ xs[k+18] ^ ys[k+4] ^ ys[k+6] ^ ys[k+17];
  endfunction

  function automatic logic [24:0] x_at(int k);
    logic [24:0] s;
    for (int b = 0; b < 25; b++) s[b] = xs[k+b];
    return s;
  endfunction

  function automatic logic [24:0] y_at(int k);
    logic [24:0] s;
    for (int b = 0; b < 25; b++) s[b] = ys[k+b];
    return s;
  endfunction

  // sign bit of chip i of OVSF code k with spreading factor 2**n
  function automatic bit ovsf_ref(int n, int k, int i);
    bit s = 0;
    for (int lvl = n; lvl > 0; lvl--) begin
      int half = 1 << (lvl - 1);
      if (((k & 1) != 0) && (i >= half)) s = ~s;
      k = k >> 1;
      i = i % half;
    end
    return s;
  endfunction

  // +-1 from a sign bit
  function automatic int pm(bit s);
    return s ? -1 : 1;
  endfunction

  // ---------------------------------------------------------------------
  // Transmitter and multipath channel.
  // Chip j of the data channel is d(m) * o(j) * (a(j) + j*b(j)) with m = j/SF,
  // d(m) a pseudo-random QPSK symbol (+-1 +- j), o the OVSF code and a, b the
  // scrambling code.  It reaches the receiver over each path p at sample times
  // 4*j - CH_OFF + delay_p .. +3 with gain path_amp[p]; a pseudo-random
  // +-1 noise term is added to each component, and the sum is saturated to
  // 4 bits.  CH_OFF = 508 lines chip 0 up with the first read burst of the
  // SRAM receiver.
  localparam int CH_OFF = 508;
  int path_d[$];
  int path_amp[$];
  int ch_sf_log2 = 4;
  int ch_code = 5;
  bit ch_noise = 1;

  function automatic int hash(int v);
    int unsigned h = v * 32'h9E3779B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EBCA77;
    h = h ^ (h >> 13);
    return int'(h & 32'h7fffffff);
  endfunction

  function automatic void code_val(int j, output int ci, output int cq);
    int o = pm(ovsf_ref(ch_sf_log2, ch_code, j % (1 << ch_sf_log2)));
    ci = o * pm(pn_i(j));
    cq = o * pm(pn_q(j));
  endfunction

  function automatic void tx_chip(int j, output int re, output int im);
    int ci, cq, di, dq, m;
    if (j < 0) begin
      re = 0; im = 0;
      return;
    end
    m  = j >> ch_sf_log2;
    di = (hash(2 * m) % 2 != 0) ? -1 : 1;
    dq = (hash(2 * m + 1) % 2 != 0) ? -1 : 1;
    code_val(j, ci, cq);
    re = di * ci - dq * cq;
    im = di * cq + dq * ci;
  endfunction

  function automatic int sat4(int v);
    return (v > 7) ? 7 : (v < -8) ? -8 : v;
  endfunction

  function automatic void rx_sample(int t, output int re, output int im);
    int tr, ti, j;
    re = 0; im = 0;
    foreach (path_d[p]) begin
      int num = t + CH_OFF - path_d[p];
      j = (num < 0) ? -1 : num / 4;
      tx_chip(j, tr, ti);
      re += path_amp[p] * tr;
      im += path_amp[p] * ti;
    end
    if (ch_noise) begin
      re += hash(3 * t + 7) % 3 - 1;
      im += hash(3 * t + 8) % 3 - 1;
    end
    re = sat4(re);
    im = sat4(im);
  endfunction

  function automatic logic [7:0] rx_word(int t);
    int re, im;
    rx_sample(t, re, im);
    return {4'(re), 4'(im)};
  endfunction

  // despread sum of symbol m for a finger on delay d: sum over the symbol's
  // chips j of r(4j - CH_OFF + d) * conj(c(j))
  function automatic void expect_sym(int d, int m, output int ei, output int eq);
    int sf = 1 << ch_sf_log2;
    ei = 0; eq = 0;
    for (int j = m * sf; j < (m + 1) * sf; j++) begin
      int ri, rq, ci, cq;
      rx_sample(4 * j - CH_OFF + d, ri, rq);
      code_val(j, ci, cq);
      ei += ri * ci + rq * cq;
      eq += rq * ci - ri * cq;
    end
  endfunction

endpackage
