// acape_ref_pkg: reference models for the ACAPE-FID testbenches.
//
// Written independently of the RTL: the polar transform is the generator
// matrix rule x_i = XOR of u_j over all j whose bits cover i; the frozen set
// uses the known reliability orders of 4-, 8- and 16-bit polar blocks (they
// coincide with the 5G NR sequence restricted to N <= 16); GF(16) arithmetic
// uses exponent/log tables built from x^4 + x + 1; the RS parity comes from
// polynomial long division; the convolutional encoder is a plain shift
// register with generators 7 and 5 (octal).
package acape_ref_pkg;

  localparam int NMAX = 16;

  function automatic int ref_n(input int code);
    return (code == 0) ? 4 : (code == 1) ? 8 : 16;
  endfunction

  function automatic int ref_blk_code(input int k, input int minf);
    if (k + minf <= 4) return 0;
    if (k + minf <= 8) return 1;
    return 2;
  endfunction

  // reliability order, least reliable first
  function automatic int rel_order(input int n, input int idx);
    int o4 [4]   = '{0, 1, 2, 3};
    int o8 [8]   = '{0, 1, 2, 4, 3, 5, 6, 7};
    int o16 [16] = '{0, 1, 2, 4, 8, 3, 5, 6, 9, 10, 12, 7, 11, 13, 14, 15};
    if (n == 4) return o4[idx];
    if (n == 8) return o8[idx];
    return o16[idx];
  endfunction

  function automatic logic [NMAX-1:0] ref_mask(input int k, input int n);
    logic [NMAX-1:0] m;
    m = '0;
    for (int i = n - k; i < n; i++) m[rel_order(n, i)] = 1'b1;
    return m;
  endfunction

  function automatic logic [NMAX-1:0] ref_polar(input logic [NMAX-1:0] u);
    logic [NMAX-1:0] x;
    for (int i = 0; i < NMAX; i++) begin
      x[i] = 1'b0;
      for (int j = 0; j < NMAX; j++)
        if ((i & j) == i) x[i] ^= u[j];
    end
    return x;
  endfunction

  // place K info bits (bit 0 first) in ascending info positions
  function automatic logic [NMAX-1:0] ref_scatter(input logic [NMAX-1:0] u, input logic [NMAX-1:0] mask);
    logic [NMAX-1:0] r;
    int m;
    r = '0; m = 0;
    for (int i = 0; i < NMAX; i++) if (mask[i]) begin r[i] = u[m]; m++; end
    return r;
  endfunction

  // ---- GF(16) with tables ----
  function automatic int gf_exp(input int e);
    int v;
    v = 1;
    for (int i = 0; i < e % 15; i++) begin
      v = v << 1;
      if (v & 16) v = v ^ 19;   // x^4 = x + 1
    end
    return v;
  endfunction

  function automatic int gf_log(input int a);
    for (int e = 0; e < 15; e++) if (gf_exp(e) == a) return e;
    return -1;
  endfunction

  function automatic int gmul(input int a, input int b);
    if (a == 0 || b == 0) return 0;
    return gf_exp((gf_log(a) + gf_log(b)) % 15);
  endfunction

  function automatic int gdiv(input int a, input int b);
    if (a == 0) return 0;
    return gf_exp((gf_log(a) - gf_log(b) + 15) % 15);
  endfunction

  // r(a^j) for a codeword of n symbols (cw[i] = coefficient of x^i)
  function automatic int ref_eval(input int cw [12], input int n, input int j);
    int acc;
    acc = 0;
    for (int i = 0; i < n; i++) acc ^= gmul(cw[i], gf_exp(i * j));
    return acc;
  endfunction

  // systematic RS: cw[4..4+k-1] = msg, cw[0..3] = x^4 m(x) mod g(x)
  function automatic void ref_rs_encode(input int msg [8], input int k, output int cw [12]);
    int g [5];
    int rem [12];
    int coef;
    // g(x) = prod (x + a^i), i = 1..4
    g = '{1, 0, 0, 0, 0};
    for (int r = 1; r <= 4; r++) begin
      int ng [5];
      for (int i = 0; i < 5; i++)
        ng[i] = gmul(g[i], gf_exp(r)) ^ ((i > 0) ? g[i-1] : 0);
      g = ng;
    end
    for (int i = 0; i < 12; i++) rem[i] = 0;
    for (int i = 0; i < k; i++) rem[i + 4] = msg[i];
    for (int d = k + 3; d >= 4; d--) begin
      coef = rem[d];
      if (coef != 0)
        for (int i = 0; i <= 4; i++) rem[d - 4 + i] ^= gmul(coef, g[i]);
    end
    for (int i = 0; i < 12; i++) cw[i] = 0;
    for (int i = 0; i < 4; i++) cw[i] = rem[i];
    for (int i = 0; i < k; i++) cw[i + 4] = msg[i];
  endfunction

  // rate-1/2 convolutional code, generators 7 and 5, zero start state
  function automatic void ref_conv(input logic bits [64], input int len, output logic [1:0] out [64]);
    logic [2:0] sr;
    sr = '0;
    for (int i = 0; i < 64; i++) out[i] = '0;
    for (int i = 0; i < len; i++) begin
      sr = {sr[1:0], bits[i]};       // sr[0] newest
      out[i][0] = sr[0] ^ sr[1] ^ sr[2];
      out[i][1] = sr[0] ^ sr[2];
    end
  endfunction

  // full transmitter reference: returns number of coded pairs
  function automatic int ref_tx(input logic [NMAX-1:0] u1, input logic [NMAX-1:0] u2,
                                input int k, input int minf,
                                output logic [1:0] out [64], output int code);
    logic [NMAX-1:0] m, xa, xb;
    logic bits [64];
    int n, ks, msg [8], cw [12];
    code = ref_blk_code(k, minf);
    n  = ref_n(code);
    m  = ref_mask(k, n);
    xa = ref_polar(ref_scatter(u1, m));
    xb = ref_polar(ref_scatter(u2, m));
    ks = n / 2;
    for (int s = 0; s < 8; s++) begin
      msg[s] = 0;
      for (int b = 0; b < 4; b++) begin
        int p;
        p = 4 * s + b;
        if (p < n)          msg[s] |= int'(xa[p]) << b;
        else if (p < 2 * n) msg[s] |= int'(xb[p - n]) << b;
      end
    end
    ref_rs_encode(msg, ks, cw);
    for (int i = 0; i < 64; i++) bits[i] = 1'b0;
    for (int s = 0; s < ks + 4; s++)
      for (int b = 0; b < 4; b++) bits[4 * s + b] = cw[s][b];
    ref_conv(bits, 4 * (ks + 4) + 2, out);
    return 4 * (ks + 4) + 2;
  endfunction

endpackage
