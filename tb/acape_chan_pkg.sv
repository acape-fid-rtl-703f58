// acape_chan_pkg: channel model and expected-message helper for the
// receiver testbenches. A coded bit b becomes the LLR (b ? -A : A) plus
// noise, the sum of two uniform variables in [-S, S] (a rough bell shape),
// saturated to the 6-bit LLR range.
package acape_chan_pkg;
  import acape_ref_pkg::*;

  function automatic int chan_llr(input logic b, input int amp, input int spread);
    int v;
    v = b ? -amp : amp;
    if (spread > 0)
      v += int'($urandom % (2 * spread + 1)) - spread + int'($urandom % (2 * spread + 1)) - spread;
    if (v > 31) v = 31;
    if (v < -31) v = -31;
    return v;
  endfunction

  // message bits 0..2N-1 of a frame: polar block of stream 1, then stream 2
  function automatic logic [31:0] ref_msg_bits(input logic [15:0] u1, input logic [15:0] u2,
                                               input int k, input int code);
    logic [15:0] m, xa, xb;
    logic [31:0] r;
    int n;
    n  = ref_n(code);
    m  = ref_mask(k, n);
    xa = ref_polar(ref_scatter(u1, m));
    xb = ref_polar(ref_scatter(u2, m));
    r  = '0;
    for (int i = 0; i < n; i++) begin
      r[i]     = xa[i];
      r[i + n] = xb[i];
    end
    return r;
  endfunction
endpackage
