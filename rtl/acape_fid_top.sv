// acape_fid_top: ACAPE-FID forward-error-correction transmitter and receiver.
//
// Transmit side: polarized_conv_encoder turns two K-bit information streams
// into one rate-1/2 convolutionally coded bit-pair stream (adaptive polar
// code, shortened RS code, convolutional code). Receive side: turbo_decoder
// iterates soft trellis decoding against Reed-Solomon Euclid decoding, and
// two polar_decoder instances undo the polarization of the two streams and
// extract the information bits. adaptive_controller closes the loop: from the
// receiver's per-frame results it sets the minimum frozen-bit count and the
// convolutional code rate used by the transmitter and the iteration budget of
// the receiver.
//
// The channel is outside this module. The transmitter publishes each frame's
// block length, K and code rate (tx_blk_len, tx_k, tx_punct) as side
// information; the receiver expects the same values on rx_blk_len / rx_k /
// rx_punct with the first LLR pair of the frame. tx_c_keep marks the coded
// bits a punctured frame actually sends; the receiver ignores the LLR in the
// place of a punctured bit. Channel LLRs are log(P(0)/P(1)) of each coded bit, LLR_W bits.
//
// The chain polar -> convolutional at the transmitter and RSE/iterative
// decoding -> reverse polarization at the receiver, with adaptive feedback of
// frozen bits and iterations, follows the document's block diagram. The
// Reed-Solomon encoder position, all sizes and the side-information ports are
// this design's choices.
//
// Timing: see the sub-blocks. A 16-bit-per-stream frame (N = 16) is 50
// coded pairs; the receiver needs about 140 cycles per iteration.
module acape_fid_top
  import acape_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // transmitter
  input  logic            tx_start,
  input  logic [4:0]      tx_k_in,
  input  logic [NMAX-1:0] tx_u1,
  input  logic [NMAX-1:0] tx_u2,
  output logic            tx_busy,
  output blk_len_e        tx_blk_len,
  output logic [4:0]      tx_k,
  output logic            tx_c_valid,
  output logic            tx_c_first,
  output logic            tx_c_last,
  output logic [1:0]      tx_c,
  output logic [1:0]      tx_c_keep,     // coded bits actually sent
  output logic            tx_punct,      // frame sent at rate 2/3
  // receiver
  input  logic            rx_valid,
  input  logic            rx_first,
  input  llr_t            rx_llr [2],
  input  blk_len_e        rx_blk_len,
  input  logic [4:0]      rx_k,
  input  logic            rx_punct,
  output logic            rx_busy,
  output logic            rx_out_valid,
  output logic [NMAX-1:0] rx_u1,
  output logic [NMAX-1:0] rx_u2,
  output logic            rx_ok,
  output logic            rx_frozen_ok,
  output logic            rx_err_detected,
  output logic [2:0]      rx_n_err,
  output logic [2:0]      rx_iters,
  // adaptive control state
  output logic [4:0]      ctl_min_frozen,
  output logic [2:0]      ctl_max_iter,
  output logic            ctl_punct,
  output logic            ctl_raised,
  output logic            ctl_lowered
);

  // ---------------- transmitter ----------------
  polarized_conv_encoder u_tx (
    .clk, .rst_n, .start(tx_start), .k(tx_k_in), .min_frozen(ctl_min_frozen),
    .punct(ctl_punct), .u1(tx_u1), .u2(tx_u2), .busy(tx_busy),
    .frame_blk_len(tx_blk_len), .frame_k(tx_k), .frame_punct(tx_punct),
    .c_valid(tx_c_valid), .c_first(tx_c_first), .c_last(tx_c_last), .c(tx_c),
    .c_keep(tx_c_keep)
  );

  // ---------------- receiver ----------------
  blk_len_e          f_len;
  logic              dec_valid, dec_ok, dec_det;
  logic [2*NMAX-1:0] dec_bits;
  logic [2:0]        dec_nerr, dec_iters;
  logic [NMAX-1:0]   xa, xb, rx_mask, f_mask;
  logic              fz_a, fz_b, ua_valid, ub_valid;

  // The receiver rebuilds the frozen set from N and K: asking for N-K frozen
  // bits makes the selector land on exactly this N.
  frozen_selector u_rx_sel (
    .k(rx_k), .min_frozen(5'(blk_n(rx_blk_len)) - rx_k), .blk_len(),
    .info_mask(rx_mask)
  );

  turbo_decoder u_dec (
    .clk, .rst_n, .in_valid(rx_valid), .in_first(rx_first), .in_llr(rx_llr),
    .blk_len(rx_blk_len), .info_mask(rx_mask), .punct(rx_punct), .max_iter(ctl_max_iter), .busy(rx_busy),
    .out_valid(dec_valid), .msg_bits(dec_bits), .out_blk_len(f_len), .out_mask(f_mask),
    .ok(dec_ok), .err_detected(dec_det), .n_err(dec_nerr), .iters(dec_iters)
  );

  // split the message bits back into the two polar blocks
  always_comb begin
    int n;
    n  = blk_n(f_len);
    xa = '0;
    xb = '0;
    for (int i = 0; i < NMAX; i++)
      if (i < n) begin
        xa[i] = dec_bits[i];
        xb[i] = dec_bits[i + n];
      end
  end

  polar_decoder u_pdec_a (
    .clk, .rst_n, .in_valid(dec_valid), .x(xa), .info_mask(f_mask),
    .u_valid(ua_valid), .u_out(rx_u1), .frozen_ok(fz_a)
  );

  polar_decoder u_pdec_b (
    .clk, .rst_n, .in_valid(dec_valid), .x(xb), .info_mask(f_mask),
    .u_valid(ub_valid), .u_out(rx_u2), .frozen_ok(fz_b)
  );

  // status aligned with the polar decoders' registered outputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_ok <= 1'b0; rx_err_detected <= 1'b0; rx_n_err <= '0; rx_iters <= '0;
    end else if (dec_valid) begin
      rx_ok <= dec_ok; rx_err_detected <= dec_det; rx_n_err <= dec_nerr;
      rx_iters <= dec_iters;
    end
  end

  assign rx_out_valid = ua_valid & ub_valid;
  assign rx_frozen_ok = fz_a & fz_b;

  // ---------------- adaptive control ----------------
  adaptive_controller u_ctl (
    .clk, .rst_n, .frame_valid(dec_valid), .frame_ok(dec_ok),
    .frame_n_err(dec_nerr), .min_frozen(ctl_min_frozen), .max_iter(ctl_max_iter),
    .punct(ctl_punct),
    .raised(ctl_raised), .lowered(ctl_lowered)
  );

endmodule
