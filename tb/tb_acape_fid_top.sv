// tb_acape_fid_top: end-to-end run of the whole design at its default sizes.
// Frames with random K (1..16) and random data go through the transmitter;
// the coded pairs are checked against the reference chain, turned into
// channel LLRs and fed straight into the receiver together with the
// transmitter's side information. Three phases: clean channel, noisy channel
// (two noise levels), clean again, so the adaptive controller must first
// raise and then lower the frozen-bit minimum and the iteration budget.
// Checked: coded stream, block length chosen from K and the controller's
// min_frozen, recovered data of every accepted frame (the noisiest class may
// pass a small count of wrong words, at most 5 % of frames), clean-frame
// end-to-end latency, and that every mechanism happened at least once:
// each block length N = 4/8/16, RSE symbol corrections, more than one
// iteration, recovery after a failed first iteration, a reported decoding
// failure, frozen bits forced by the controller, controller raise and lower,
// punctured (rate 2/3) frames and unpunctured frames. The LLR in the place of
// a punctured bit is random garbage. The first frame is a directed case: the
// 7-bit word 0110110 on both streams, which must come back unchanged.
module tb_acape_fid_top;
  import acape_pkg::*;
  import acape_ref_pkg::*;
  import acape_chan_pkg::*;

  logic clk = 0, rst_n = 0;
  logic tx_start = 0;
  logic [4:0] tx_k_in = 5'd1;
  logic [NMAX-1:0] tx_u1 = '0, tx_u2 = '0;
  logic tx_busy, tx_c_valid, tx_c_first, tx_c_last;
  blk_len_e tx_blk_len;
  logic [4:0] tx_k;
  logic [1:0] tx_c, tx_c_keep;
  logic tx_punct, rx_punct = 0, ctl_punct;
  int n_punct = 0, n_full = 0;
  logic rx_valid = 0, rx_first = 0;
  llr_t rx_llr [2];
  blk_len_e rx_blk_len = BLK_N4;
  logic [4:0] rx_k = 5'd1;
  logic rx_busy, rx_out_valid, rx_ok, rx_frozen_ok, rx_err_detected;
  logic [NMAX-1:0] rx_u1, rx_u2;
  logic [2:0] rx_n_err, rx_iters;
  logic [4:0] ctl_min_frozen;
  logic [2:0] ctl_max_iter;
  logic ctl_raised, ctl_lowered;

  int checks = 0, failures = 0;
  int seen_len [3] = '{0, 0, 0};
  int n_corr = 0, n_multi = 0, n_recov = 0, n_fail = 0, n_forced = 0;
  int n_raised = 0, n_lowered = 0, n_wrong = 0, n_example = 0;

  always #5 clk = ~clk;

  acape_fid_top dut (.*);

  always @(posedge clk) begin
    if (ctl_raised) n_raised++;
    if (ctl_lowered) n_lowered++;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx_llr[0] = '0; rx_llr[1] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 160; t++) begin
      int kk, mf, code, np, spr, got, cyc;
      logic [NMAX-1:0] a, b;
      logic [1:0] cc [64];
      spr = (t < 40 || t >= 110) ? 0 : ((t % 2) ? 12 : 9);
      kk  = 1 + ($urandom % 16);
      a   = NMAX'($urandom) & NMAX'((1 << kk) - 1);
      b   = NMAX'($urandom) & NMAX'((1 << kk) - 1);
      if (t == 0) begin
        kk = 7;
        a  = NMAX'(7'b0110110);
        b  = a;
      end
      mf  = int'(ctl_min_frozen);
      np  = ref_tx(a, b, kk, mf, cc, code);
      seen_len[code]++;
      if (mf > 0 && ref_blk_code(kk, 0) != code) n_forced++;
      @(posedge clk);
      tx_start <= 1; tx_k_in <= 5'(kk); tx_u1 <= a; tx_u2 <= b;
      @(posedge clk);
      tx_start <= 0;
      cyc = 1;
      // channel: coded pair -> LLR pair, straight into the receiver
      got = 0;
      while (1) begin
        @(posedge clk); #1; cyc++;
        rx_valid <= 1'b0; rx_first <= 1'b0;
        if (tx_c_valid) begin
          checks++;
          if (got >= np || tx_c !== cc[got]) begin
            failures++;
            $display("t=%0d pair %0d: %b expected %b", t, got, tx_c, cc[got]);
          end
          rx_valid   <= 1'b1;
          rx_first   <= tx_c_first;
          rx_blk_len <= tx_blk_len;
          rx_k       <= tx_k;
          rx_punct   <= tx_punct;
          rx_llr[0]  <= llr_t'(chan_llr(tx_c[0], 8, spr));
          rx_llr[1]  <= tx_c_keep[1] ? llr_t'(chan_llr(tx_c[1], 8, spr)) : llr_t'($urandom);
          checks++;
          if (tx_c_keep !== ((tx_punct && got % 2 == 1) ? 2'b01 : 2'b11)) failures++;
          got++;
          if (tx_c_last) break;
        end
      end
      if (tx_punct) n_punct++; else n_full++;
      checks++;
      if (got != np || int'(tx_blk_len) != code || int'(tx_k) != kk) begin
        failures++;
        $display("t=%0d: %0d pairs (exp %0d), N code %0d (exp %0d)", t, got, np, tx_blk_len, code);
      end
      @(posedge clk); #1; cyc++;
      rx_valid <= 1'b0; rx_first <= 1'b0;
      while (!rx_out_valid) begin @(posedge clk); #1; cyc++; end
      if (rx_ok) begin
        checks++;
        if (rx_u1 !== a || rx_u2 !== b || !rx_frozen_ok) begin
          n_wrong++;
          if (spr < 12) begin
            failures++;
            $display("t=%0d spread %0d: got %h/%h expected %h/%h", t, spr, rx_u1, rx_u2, a, b);
          end
        end
        if (t == 0 && rx_u1 === NMAX'(7'b0110110) && rx_u2 === NMAX'(7'b0110110)) n_example++;
        if (rx_n_err != 0) n_corr++;
        if (rx_iters > 1) n_recov++;
      end else begin
        n_fail++;
      end
      if (rx_iters > 1) n_multi++;
      if (spr == 0) begin
        checks++;
        if (!rx_ok || rx_err_detected || rx_iters != 1) begin
          failures++;
          $display("t=%0d clean frame: ok=%b det=%b iters=%0d", t, rx_ok, rx_err_detected, rx_iters);
        end
        if (code == 2) begin
          // start -> TX (N/2+4) -> 50 pairs -> SISO 2L+1 -> RSE -> polar
          checks++;
          if (cyc > 12 + 50 + 101 + 44 + 8) begin
            failures++;
            $display("clean N=16 frame took %0d cycles", cyc);
          end
        end
      end
      repeat (2) @(posedge clk);
    end
    for (int i = 0; i < 3; i++) $display("N=%0d frames: %0d", ref_n(i), seen_len[i]);
    $display("RSE corrections %0d, multi-iteration %0d, recovered after iteration 1 %0d, failures reported %0d",
             n_corr, n_multi, n_recov, n_fail);
    $display("frames lengthened by controller %0d, raised %0d, lowered %0d, wrong words accepted %0d",
             n_forced, n_raised, n_lowered, n_wrong);
    $display("punctured frames %0d, rate-1/2 frames %0d, example word recovered %0d",
             n_punct, n_full, n_example);
    checks += 13;
    if (n_example != 1) failures++;
    if (n_punct == 0 || n_full == 0) failures++;
    for (int i = 0; i < 3; i++) if (seen_len[i] == 0) failures++;
    if (n_corr == 0) failures++;
    if (n_multi == 0) failures++;
    if (n_recov == 0) failures++;
    if (n_fail == 0) failures++;
    if (n_forced == 0) failures++;
    if (n_raised == 0) failures++;
    if (n_lowered == 0) failures++;
    if (n_wrong * 20 > 160) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
