// rs_encoder: systematic shortened Reed-Solomon encoder over GF(16).
//
// The codeword is a multiple of the generator polynomial
//   g(x) = (x + a^1)(x + a^2)(x + a^3)(x + a^4),   a a root of x^4 + x + 1,
// as in the document's c(x) = g(x) * m(x). It is formed systematically:
// c(x) = x^4 m(x) + (x^4 m(x) mod g(x)), so the message symbols stay
// readable and only the 4 parity symbols are computed. Shortening to
// k_sym <= 8 message symbols means the top symbols of the RS(15,11) code are
// zero and are not sent. The field, the generator roots, the systematic form
// and the sizes are this design's choices.
//
// A division LFSR takes one message symbol per cycle, highest degree first.
// Interface: pulse start with msg and k_sym valid (they must stay stable until
// done); done pulses k_sym cycles after the clock edge that samples start, and cw then holds the codeword,
// cw[0..3] parity and cw[4+s] = msg[s].
module rs_encoder
  import acape_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  sym_t            msg [RS_KMAX],
  input  logic [3:0]      k_sym,           // message symbols, 1..RS_KMAX
  output logic            done,
  output sym_t            cw  [RS_NMAX]
);

  // generator coefficients g[0..3] (g[4] = 1)
  function automatic sym_t gen_coef(input int idx);
    sym_t g [RS_NPAR+1];
    for (int i = 0; i <= RS_NPAR; i++) g[i] = (i == 0) ? 4'd1 : 4'd0;
    for (int r = 1; r <= RS_NPAR; r++) begin
      // multiply g by (x + a^r)
      for (int i = RS_NPAR; i >= 0; i--)
        g[i] = gf_mul(g[i], gf_pow_alpha(r)) ^ ((i > 0) ? g[i-1] : 4'd0);
    end
    return g[idx];
  endfunction

  sym_t       par [RS_NPAR];
  logic       busy;
  logic [3:0] idx;     // symbol being shifted in
  sym_t       fb;

  assign fb = msg[idx[2:0]] ^ par[RS_NPAR-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      idx  <= '0;
      done <= 1'b0;
      for (int i = 0; i < RS_NPAR; i++) par[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        idx  <= k_sym - 4'd1;
        for (int i = 0; i < RS_NPAR; i++) par[i] <= '0;
      end else if (busy) begin
        for (int i = RS_NPAR-1; i > 0; i--)
          par[i] <= par[i-1] ^ gf_mul(fb, gen_coef(i));
        par[0] <= gf_mul(fb, gen_coef(0));
        if (idx == 4'd0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          idx <= idx - 4'd1;
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < RS_NMAX; i++)
      cw[i] = (i < RS_NPAR) ? par[i] : ((i - RS_NPAR < int'(k_sym)) ? msg[i-RS_NPAR] : 4'd0);
  end

endmodule
