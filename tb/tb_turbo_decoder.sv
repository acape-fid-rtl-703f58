// tb_turbo_decoder: frames from the reference transmitter pass through the
// channel model at several noise levels (clean, mild, strong, very strong)
// into turbo_decoder. Every frame reported ok in the clean and mild classes
// must carry exactly the sent message bits; in the two noisiest classes a
// wrong word passing both detectors (RSE and frozen bits) is counted, and
// such words must stay under 2 % of all frames; a clean frame must decode in
// one iteration with no error detected. The run must see: symbol corrections
// by RSE, frames needing more than one iteration, frames recovered after the
// first iteration failed (at least a tenth of the multi-iteration frames),
// and frames reported failed. The single-iteration time of a clean N=16
// frame (2L+1 SISO + RSE) is checked against its bound. Every other frame is
// punctured to rate 2/3: the LLR in the place of each punctured bit is
// random garbage, which the decoder must ignore.
module tb_turbo_decoder;
  import acape_pkg::*;
  import acape_ref_pkg::*;
  import acape_chan_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0;
  llr_t in_llr [2];
  blk_len_e blk_len = BLK_N4, out_blk_len;
  logic [NMAX-1:0] info_mask = '0, out_mask;
  logic punct = 0;
  logic [2:0] max_iter = 3'd7;
  logic busy, out_valid, ok, err_detected;
  logic [2*NMAX-1:0] msg_bits;
  logic [2:0] n_err, iters;
  int checks = 0, failures = 0;
  int n_wrong = 0;
  int n_rs_corr = 0, n_multi = 0, n_recovered = 0, n_fail = 0, n_ok = 0;

  always #5 clk = ~clk;

  turbo_decoder dut (.clk, .rst_n, .in_valid, .in_first, .in_llr, .blk_len, .info_mask, .punct, .max_iter,
    .busy, .out_valid, .msg_bits, .out_blk_len, .out_mask, .ok, .err_detected, .n_err, .iters);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_llr[0] = '0; in_llr[1] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 400; t++) begin
      int kk, mf, code, np, amp, spr, cyc;
      logic [NMAX-1:0] a, b;
      logic [1:0] cc [64];
      logic [31:0] exp_bits;
      kk  = 1 + ($urandom % 16);
      mf  = $urandom % 9;
      a   = NMAX'($urandom) & NMAX'((1 << kk) - 1);
      b   = NMAX'($urandom) & NMAX'((1 << kk) - 1);
      np  = ref_tx(a, b, kk, mf, cc, code);
      exp_bits = ref_msg_bits(a, b, kk, code);
      amp = 8;
      case (t % 4)
        0: spr = 0;
        1: spr = 6;
        2: spr = 9;
        default: spr = 12;
      endcase
      for (int i = 0; i < np; i++) begin
        @(posedge clk);
        in_valid  <= 1;
        in_first  <= (i == 0);
        blk_len   <= blk_len_e'(code);
        info_mask <= ref_mask(kk, ref_n(code));
        in_llr[0] <= llr_t'(chan_llr(cc[i][0], amp, spr));
        punct     <= ((t / 4) % 2 == 1);
        in_llr[1] <= ((t / 4) % 2 == 1 && i % 2 == 1) ? llr_t'($urandom) :
                     llr_t'(chan_llr(cc[i][1], amp, spr));
      end
      @(posedge clk);
      in_valid <= 0; in_first <= 0;
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!out_valid);
      if (ok) n_ok++; else n_fail++;
      if (ok && n_err != 0) n_rs_corr++;
      if (iters > 1) n_multi++;
      if (ok && iters > 1) n_recovered++;
      checks++;
      if (out_blk_len != blk_len_e'(code) || out_mask != ref_mask(kk, ref_n(code))) failures++;
      if (ok) begin
        checks++;
        if (msg_bits !== exp_bits) begin
          n_wrong++;
          // a wrong word accepted by both detectors is a property of the
          // short code; it may happen only in the two noisiest classes
          if (spr < 9) failures++;
          $display("t=%0d spread %0d: wrong message %h, expected %h (iters %0d)", t, spr, msg_bits, exp_bits, iters);
        end
      end
      if (spr == 0) begin
        checks++;
        if (!ok || err_detected || iters != 1) begin
          failures++;
          $display("t=%0d clean frame: ok=%b det=%b iters=%0d", t, ok, err_detected, iters);
        end
        if (code == 2) begin
          checks++;
          if (cyc > 2 * 50 + 1 + 2 * 12 + 20 + 4) begin
            failures++;
            $display("clean N=16 frame took %0d cycles", cyc);
          end
        end
      end
    end
    $display("ok %0d, failed %0d, RS corrections %0d, multi-iteration %0d, recovered after iteration 1 %0d",
             n_ok, n_fail, n_rs_corr, n_multi, n_recovered);
    $display("wrong words accepted: %0d", n_wrong);
    checks += 5;
    // undetected errors must stay below 2 %% of all frames
    if (n_wrong * 50 > 400) failures++;
    if (n_rs_corr == 0) failures++;
    if (n_multi == 0) failures++;
    // the feedback must rescue a real share of the frames that needed it
    if (n_recovered == 0 || n_recovered * 10 < n_multi) failures++;
    if (n_fail == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
