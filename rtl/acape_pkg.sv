// acape_pkg: constants, types and GF(2^4) / polar helper functions shared by
// the ACAPE-FID transmitter and receiver.
//
// Frame geometry. Each of the two information streams is polar coded into a
// block of N bits, N in {4, 8, 16} chosen per frame (NMAX = 16). The two polar
// blocks (2N bits) are packed into 4-bit Reed-Solomon symbols (N/2 symbols),
// protected by a shortened RS(15,11) code over GF(16) with 2T = 4 parity
// symbols, and the resulting codeword bits plus two zero tail bits go through
// the rate-1/2, constraint-length-3 convolutional encoder.
//
// The document fixes none of these sizes; they are this design's choices.
// The field polynomial is x^4 + x + 1 and the RS generator has the roots
// alpha^1 .. alpha^4. Polar reliability follows the polarization-weight rule
// PW(i) = sum_j bit_j(i) * 2^(j/4), evaluated in 16.16 fixed point.
package acape_pkg;

  localparam int NMAX      = 16;              // largest polar block per stream
  localparam int LOG_NMAX  = 4;
  localparam int SYM_W     = 4;               // RS symbol width (GF(16))
  localparam int RS_T      = 2;               // correctable symbol errors
  localparam int RS_NPAR   = 2 * RS_T;        // parity symbols
  localparam int RS_KMAX   = 2 * NMAX / SYM_W; // message symbols at N = NMAX
  localparam int RS_NMAX   = RS_KMAX + RS_NPAR; // codeword symbols at N = NMAX
  localparam int CW_BITS   = RS_NMAX * SYM_W;  // codeword bits at N = NMAX
  localparam int TAIL      = 2;               // encoder memory (FF1, FF2)
  localparam int LMAX      = CW_BITS + TAIL;  // trellis steps at N = NMAX
  localparam int LLR_W     = 6;               // channel / output LLR width
  localparam int MET_W     = 16;              // path metric width

  typedef logic [SYM_W-1:0]        sym_t;
  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic signed [MET_W-1:0] met_t;

  // Block length code: 0 -> N=4, 1 -> N=8, 2 -> N=16.
  typedef enum logic [1:0] {BLK_N4 = 2'd0, BLK_N8 = 2'd1, BLK_N16 = 2'd2} blk_len_e;

  function automatic int blk_n(input blk_len_e b);
    case (b)
      BLK_N4:  return 4;
      BLK_N8:  return 8;
      default: return 16;
    endcase
  endfunction

  // --- GF(16), x^4 + x + 1 -------------------------------------------------
  function automatic sym_t gf_mul(input sym_t a, input sym_t b);
    logic [SYM_W-1:0] acc;
    logic [SYM_W-1:0] sh;
    acc = '0;
    sh  = a;
    for (int i = 0; i < SYM_W; i++) begin
      if (b[i]) acc ^= sh;
      sh = {sh[SYM_W-2:0], 1'b0} ^ (sh[SYM_W-1] ? 4'b0011 : 4'b0000);
    end
    return acc;
  endfunction

  // alpha^e for any non-negative e
  function automatic sym_t gf_pow_alpha(input int e);
    sym_t r;
    r = 4'd1;
    for (int i = 0; i < (e % 15); i++) r = gf_mul(r, 4'd2);
    return r;
  endfunction

  // multiplicative inverse by search (0 maps to 0)
  function automatic sym_t gf_inv(input sym_t a);
    sym_t r;
    r = '0;
    for (int c = 1; c < 16; c++)
      if (gf_mul(a, sym_t'(c)) == 4'd1) r = sym_t'(c);
    return r;
  endfunction

  // --- polar reliability ----------------------------------------------------
  // Polarization weight of index i in 16.16 fixed point: 2^(j/4) is
  // 2^(j>>2) times one of 1, 2^0.25, 2^0.5, 2^0.75.
  function automatic int unsigned polar_pw(input int i);
    int unsigned frac [4];
    int unsigned w;
    frac[0] = 65536; frac[1] = 77936; frac[2] = 92682; frac[3] = 110218;
    w = 0;
    for (int j = 0; j < LOG_NMAX; j++)
      if (((i >> j) & 1) != 0) w += frac[j & 3] << (j >> 2);
    return w;
  endfunction

  // Rank of index i among indices 0..n-1 by reliability (0 = least reliable).
  function automatic int polar_rank(input int i, input int n);
    int r;
    r = 0;
    for (int j = 0; j < NMAX; j++)
      if (j < n && j != i)
        if (polar_pw(j) < polar_pw(i) || (polar_pw(j) == polar_pw(i) && j < i)) r++;
    return r;
  endfunction

  // Arikan transform x = u * F^{(x)n} over NMAX bits (F = [1 0; 1 1]).
  // F^{(x)n} is its own inverse over GF(2), so the same function undoes it.
  // Bits at index >= N stay zero when the input is zero there.
  function automatic logic [NMAX-1:0] polar_transform(input logic [NMAX-1:0] u);
    logic [NMAX-1:0] v;
    v = u;
    for (int s = 0; s < LOG_NMAX; s++)
      for (int i = 0; i < NMAX; i++)
        if (((i >> s) & 1) == 0) v[i] = v[i] ^ v[i + (1 << s)];
    return v;
  endfunction

endpackage
