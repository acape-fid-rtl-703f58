// turbo_decoder: flexible iterative decoder (soft decoding <-> RSE exchange).
//
// Received channel LLR pairs of one frame are buffered. Each iteration runs
// the SISO decoder (siso_decoder) over the whole trellis, slices its
// a-posteriori LLRs into hard codeword bits and hands the GF(16) symbols to
// the Reed-Solomon Euclid decoder (rse_decoder). When RSE reports a clean or
// corrected word, or the iteration budget max_iter is used up, the message
// symbols are released. A word only counts as clean or corrected when, in
// addition, undoing the polarization of both polar blocks gives 0 at every
// frozen position (info_mask): the frozen bits act as a second detector that
// catches most RSE miscorrections. When the word is not accepted, the next
// iteration feeds information back to the SISO decoder: the least reliable
// codeword bit of the first pass that has not been tried yet gets a strong
// a-priori LLR against its first-pass decision, and the SISO decoder re-runs
// with it, so the bit and its trellis neighbours are decoded again under the
// opposite hypothesis before RSE checks the result.
//
// The document describes RSE-based detection and localisation, soft
// decoding with iterative exchange, and a run-time adjustable iteration
// count. The form of the exchange (one test hypothesis per iteration on the
// least reliable bit) is this design's choice. The document's drawing of two
// constituent SISO decoders joined by an interleaver is not built: the
// transmitter has a single convolutional encoder and no interleaver, so there
// is no second constituent code to decode.
//
// Interface: LLR pairs arrive on in_valid/in_llr with in_first on the first
// pair of a frame; blk_len, info_mask, punct and max_iter (1..7) are sampled
// with in_first. With punct = 1 the frame was sent at rate 2/3: the second
// LLR of every odd step is ignored and stored as 0 (depuncturing), whatever
// arrives in its place.
// Decoding starts once 4*(N/2+4)+2 pairs are in. out_valid pulses with
// msg_bits (2N message bits, stream 1 in bits 0..N-1), the frame's
// out_blk_len and out_mask, ok (RSE success and frozen bits 0),
// err_detected, n_err (symbols corrected) and iters (iterations run).
// Timing per iteration: 2L+1 SISO cycles, 2*n_sym+<=20 RSE cycles, plus 3.
module turbo_decoder
  import acape_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_first,
  input  llr_t              in_llr [2],
  input  blk_len_e          blk_len,
  input  logic [NMAX-1:0]   info_mask,
  input  logic              punct,
  input  logic [2:0]        max_iter,
  output logic              busy,
  output logic              out_valid,
  output logic [2*NMAX-1:0] msg_bits,
  output blk_len_e          out_blk_len,
  output logic [NMAX-1:0]   out_mask,
  output logic              ok,
  output logic              err_detected,
  output logic [2:0]        n_err,
  output logic [2:0]        iters
);

  localparam llr_t LLR_STRONG = llr_t'((1 << (LLR_W - 1)) - 1);

  typedef enum logic [2:0] {S_LOAD, S_SISO, S_RSE_GO, S_RSE, S_OUT} state_e;
  state_e state;

  llr_t       ch     [LMAX][2];
  llr_t       apri   [LMAX];
  met_t       app    [LMAX];
  met_t       mag0   [LMAX];   // first-pass reliabilities
  logic       sign0  [LMAX];   // first-pass hard decisions
  logic [LMAX-1:0] tried;
  logic [5:0] wr, len;
  blk_len_e   f_len;
  logic [2:0] f_iter, iter;
  logic [3:0] n_sym;
  logic       siso_start, siso_done, rse_start, rse_done;
  sym_t       r    [RS_NMAX];
  sym_t       corr [RS_NMAX];
  logic       rse_fail, rse_det;
  logic [2:0] rse_nerr;
  logic [RS_NMAX-1:0] rse_mask;
  logic [NMAX-1:0]    f_mask;
  logic               f_punct;
  logic               drop;       // this pair's second LLR is punctured
  logic [2*NMAX-1:0]  cand;       // message bits of the RSE output
  logic               frz_ok;     // frozen bits of both polar blocks are 0
  logic               accept;

  assign n_sym = 4'(blk_n(f_len) / 2 + RS_NPAR);
  assign len   = 6'(int'(n_sym) * SYM_W + TAIL);
  assign busy  = (state != S_LOAD) || wr != '0;
  assign drop  = !in_first && f_punct && wr[0];

  siso_decoder u_siso (
    .clk, .rst_n, .start(siso_start), .len(len), .ch_llr(ch), .apriori(apri),
    .done(siso_done), .app_llr(app)
  );

  // hard decisions -> RS symbols
  always_comb begin
    for (int s = 0; s < RS_NMAX; s++)
      for (int b = 0; b < SYM_W; b++)
        r[s][b] = (s < int'(n_sym)) ? app[s*SYM_W + b][MET_W-1] : 1'b0;
  end

  rse_decoder u_rse (
    .clk, .rst_n, .start(rse_start), .r(r), .n_sym(n_sym), .done(rse_done),
    .corr(corr), .err_detected(rse_det), .fail(rse_fail), .n_err(rse_nerr),
    .err_mask(rse_mask)
  );

  // Second detector: undo the polarization of both blocks of the RSE output
  // and require every frozen position to be 0.
  always_comb begin
    logic [NMAX-1:0] xa, xb;
    int n;
    n  = blk_n(f_len);
    xa = '0;
    xb = '0;
    for (int b = 0; b < 2*NMAX; b++)
      cand[b] = (b < 2*n) ? corr[RS_NPAR + b/SYM_W][b%SYM_W] : 1'b0;
    for (int i = 0; i < NMAX; i++)
      if (i < n) begin
        xa[i] = cand[i];
        xb[i] = cand[i + n];
      end
    frz_ok = ((polar_transform(xa) & ~f_mask) == '0) &&
             ((polar_transform(xb) & ~f_mask) == '0);
    accept = !rse_fail && frz_ok;
  end

  // least reliable untried codeword bit of the first pass
  logic [5:0] pick;
  always_comb begin
    met_t best;
    best = met_t'((1 << (MET_W - 1)) - 1);
    pick = '0;
    for (int p = 0; p < LMAX - TAIL; p++)
      if (p < int'(len) - TAIL && !tried[p] && mag0[p] < best) begin
        best = mag0[p];
        pick = 6'(p);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      wr <= '0; f_len <= BLK_N4; f_mask <= '0; f_punct <= 1'b0; out_blk_len <= BLK_N4; out_mask <= '0; f_iter <= 3'd1; iter <= '0;
      siso_start <= 1'b0; rse_start <= 1'b0; tried <= '0;
      out_valid <= 1'b0; msg_bits <= '0; ok <= 1'b0; err_detected <= 1'b0;
      n_err <= '0; iters <= '0;
      for (int k = 0; k < LMAX; k++) begin
        apri[k] <= '0; mag0[k] <= '0; sign0[k] <= 1'b0;
        ch[k][0] <= '0; ch[k][1] <= '0;
      end
    end else begin
      siso_start <= 1'b0;
      rse_start  <= 1'b0;
      out_valid  <= 1'b0;
      case (state)
        S_LOAD: if (in_valid) begin
          if (in_first) begin
            f_len  <= blk_len;
            f_mask <= info_mask;
            f_punct <= punct;
            f_iter <= (max_iter == '0) ? 3'd1 : max_iter;
          end
          ch[in_first ? 6'd0 : wr][0] <= in_llr[0];
          ch[in_first ? 6'd0 : wr][1] <= drop ? llr_t'(0) : in_llr[1];
          if (!in_first && wr == len - 6'd1) begin
            wr    <= '0;
            iter  <= '0;
            tried <= '0;
            for (int k = 0; k < LMAX; k++) apri[k] <= '0;
            siso_start <= 1'b1;
            state <= S_SISO;
          end else begin
            wr <= in_first ? 6'd1 : wr + 6'd1;
          end
        end
        S_SISO: if (siso_done) begin
          if (iter == '0)
            for (int k = 0; k < LMAX; k++) begin
              sign0[k] <= app[k][MET_W-1];
              mag0[k]  <= app[k][MET_W-1] ? -app[k] : app[k];
            end
          state <= S_RSE_GO;
        end
        S_RSE_GO: begin
          rse_start <= 1'b1;
          state     <= S_RSE;
        end
        S_RSE: if (rse_done) begin
          if (accept || iter + 3'd1 >= f_iter) begin
            state <= S_OUT;
          end else begin
            // feed back: force the next least reliable bit the other way
            for (int k = 0; k < LMAX; k++) apri[k] <= '0;
            apri[pick]  <= sign0[pick] ? LLR_STRONG : -LLR_STRONG;
            tried[pick] <= 1'b1;
            iter        <= iter + 3'd1;
            siso_start  <= 1'b1;
            state       <= S_SISO;
          end
        end
        S_OUT: begin
          msg_bits     <= cand;
          out_blk_len  <= f_len;
          out_mask     <= f_mask;
          ok           <= accept;
          err_detected <= rse_det || iter != '0;
          n_err        <= rse_nerr;
          iters        <= iter + 3'd1;
          out_valid    <= 1'b1;
          state        <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
