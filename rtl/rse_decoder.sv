// rse_decoder: Reed-Solomon decoder with the Euclidean algorithm (RSE).
//
// Decodes the shortened RS code of rs_encoder (GF(16), 4 parity symbols,
// corrects up to 2 symbol errors) in three sequential phases:
//   1. Syndromes S_j = r(a^j), j = 1..4, by Horner's rule, one received
//      symbol per cycle, highest degree first (n_sym cycles).
//   2. Key equation by Euclid's algorithm (Sugiyama form): starting from
//      A = x^4, B = S(x), the remainder sequence A mod B is built one
//      quotient term per cycle, with the same operations on the companion
//      polynomials, until deg B < 2. Then B is the error evaluator Omega(x)
//      and the companion of B the error locator Lambda(x).
//   3. Chien search and Forney's formula, one position per cycle: position j
//      is in error when Lambda(a^-j) = 0, and its error value is
//      Omega(a^-j) / Lambda'(a^-j). The symbol is corrected in place.
// The word is flagged uncorrectable (fail) and left as received when the
// number of roots found differs from deg Lambda, deg Lambda is 0 or above 2,
// deg Omega >= deg Lambda, Lambda(0) = 0, or Lambda' vanishes at a root.
//
// Syndromes from the generator polynomial, error location by the Euclidean
// algorithm (gcd(a,b) = gcd(b, a mod b)) and correction follow the document;
// the code parameters and the one-term-per-cycle schedule are this design's
// choices.
//
// Interface: pulse start with r and n_sym (codeword symbols, 5..12) valid and
// stable until done. done pulses at the end; corr, err_detected (nonzero
// syndrome), fail, n_err and err_mask (corrected positions) then hold.
// Timing: 2*n_sym + at most 20 cycles.
module rse_decoder
  import acape_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  sym_t               r    [RS_NMAX],
  input  logic [3:0]         n_sym,
  output logic               done,
  output sym_t               corr [RS_NMAX],
  output logic               err_detected,
  output logic               fail,
  output logic [2:0]         n_err,
  output logic [RS_NMAX-1:0] err_mask
);

  localparam int P = RS_NPAR + 1;   // polynomial coefficients kept
  localparam sym_t ALPHA_INV = 4'b1001;  // a^-1 = a^14 for x^4 + x + 1

  typedef enum logic [2:0] {S_IDLE, S_SYND, S_EUCLID, S_CHIEN, S_DONE} state_e;
  state_e state;

  sym_t       synd [RS_NPAR];
  sym_t       pa [P], pb [P], ta [P], tb [P];
  logic [3:0] pos;
  logic [4:0] guard;
  sym_t       xinv;         // a^-pos
  logic [2:0] roots;
  logic       bad_root;     // a root where Lambda' vanishes

  function automatic int deg(input sym_t p [P]);
    int d;
    d = -1;
    for (int i = 0; i < P; i++) if (p[i] != '0) d = i;
    return d;
  endfunction

  function automatic sym_t peval(input sym_t p [P], input sym_t x);
    sym_t acc;
    acc = '0;
    for (int i = P-1; i >= 0; i--) acc = gf_mul(acc, x) ^ p[i];
    return acc;
  endfunction

  // --- one Euclid step (combinational) -----------------------------------
  sym_t pa_n [P], pb_n [P], ta_n [P], tb_n [P];
  logic euclid_end;
  always_comb begin
    int   da, db, sh;
    sym_t q;
    pa_n = pa; pb_n = pb; ta_n = ta; tb_n = tb;
    da = deg(pa);
    db = deg(pb);
    euclid_end = (db < RS_T);
    q  = '0;
    sh = 0;
    if (!euclid_end) begin
      if (da >= db) begin
        q  = gf_mul(pa[da], gf_inv(pb[db]));
        sh = da - db;
        for (int i = 0; i < P; i++)
          if (i >= sh) begin
            pa_n[i] = pa[i] ^ gf_mul(q, pb[i-sh]);
            ta_n[i] = ta[i] ^ gf_mul(q, tb[i-sh]);
          end
      end else begin
        pa_n = pb; pb_n = pa; ta_n = tb; tb_n = ta;
      end
    end
  end

  // --- Chien / Forney at position pos (combinational) --------------------
  sym_t lam_x, om_x, dlam_x, err_val;
  always_comb begin
    sym_t dl [P];
    for (int i = 0; i < P; i++) dl[i] = '0;
    // formal derivative in characteristic 2: odd terms only
    for (int i = 1; i < P; i += 2) dl[i-1] = tb[i];
    lam_x   = peval(tb, xinv);
    om_x    = peval(pb, xinv);
    dlam_x  = peval(dl, xinv);
    err_val = gf_mul(om_x, gf_inv(dlam_x));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done <= 1'b0; err_detected <= 1'b0; fail <= 1'b0;
      n_err <= '0; err_mask <= '0; pos <= '0; guard <= '0;
      xinv <= 4'd1; roots <= '0; bad_root <= 1'b0;
      for (int i = 0; i < RS_NPAR; i++) synd[i] <= '0;
      for (int i = 0; i < P; i++) begin
        pa[i] <= '0; pb[i] <= '0; ta[i] <= '0; tb[i] <= '0;
      end
      for (int i = 0; i < RS_NMAX; i++) corr[i] <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          for (int i = 0; i < RS_NPAR; i++) synd[i] <= '0;
          for (int i = 0; i < RS_NMAX; i++) corr[i] <= r[i];
          pos      <= n_sym - 4'd1;
          err_mask <= '0;
          fail     <= 1'b0;
          n_err    <= '0;
          state    <= S_SYND;
        end
        S_SYND: begin
          for (int j = 0; j < RS_NPAR; j++)
            synd[j] <= gf_mul(synd[j], gf_pow_alpha(j + 1)) ^ r[pos];
          if (pos == 4'd0) state <= S_EUCLID;
          else             pos   <= pos - 4'd1;
          // Euclid start values: A = x^4, B = S(x), TA = 0, TB = 1
          for (int i = 0; i < P; i++) begin
            pa[i] <= (i == RS_NPAR) ? 4'd1 : 4'd0;
            ta[i] <= '0;
            tb[i] <= (i == 0) ? 4'd1 : 4'd0;
          end
          guard <= '0;
        end
        S_EUCLID: begin
          if (guard == 5'd0) begin
            // load B = S(x) once syndromes are final
            for (int i = 0; i < P; i++) pb[i] <= (i < RS_NPAR) ? synd[i] : 4'd0;
            err_detected <= (synd[0] | synd[1] | synd[2] | synd[3]) != '0;
            guard <= 5'd1;
            if ((synd[0] | synd[1] | synd[2] | synd[3]) == '0) state <= S_DONE;
          end else if (euclid_end || guard == 5'd20) begin
            pos   <= '0;
            xinv  <= 4'd1;
            roots <= '0;
            bad_root <= 1'b0;
            state <= S_CHIEN;
          end else begin
            pa <= pa_n; pb <= pb_n; ta <= ta_n; tb <= tb_n;
            guard <= guard + 5'd1;
          end
        end
        S_CHIEN: begin
          if (lam_x == '0) begin
            if (dlam_x == '0) bad_root <= 1'b1;
            corr[pos]     <= r[pos] ^ err_val;
            err_mask[pos] <= 1'b1;
            roots         <= roots + 3'd1;
          end
          xinv <= gf_mul(xinv, ALPHA_INV);
          if (pos == n_sym - 4'd1) begin
            state <= S_DONE;
            if (int'(roots) + ((lam_x == '0) ? 1 : 0) != deg(tb) || deg(tb) > RS_T ||
                deg(tb) < 1 || deg(pb) >= deg(tb) || tb[0] == '0 || bad_root ||
                (lam_x == '0 && dlam_x == '0)) begin
              fail <= 1'b1;
            end
            n_err <= roots + ((lam_x == '0) ? 3'd1 : 3'd0);
          end else begin
            pos <= pos + 4'd1;
          end
        end
        S_DONE: begin
          if (fail) begin
            for (int i = 0; i < RS_NMAX; i++) corr[i] <= r[i];
            err_mask <= '0;
          end
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
