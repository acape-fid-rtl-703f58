// tb_acape_awgn: frame and bit error rates of the whole link over an additive
// white Gaussian noise (AWGN) channel at Eb/N0 = 2, 3 and 4 dB.
// Two data lengths are run: K = 16 and K = 8 random bits per stream. Both
// keep the block length at N = 16 whatever frozen-bit minimum the adaptive
// controller asks for; K = 16 fills the block (no frozen bits), K = 8 leaves
// half of it frozen. The controller stays in the loop, so the code rate
// (1/2 or punctured 2/3) and the iteration budget follow the channel as in
// operation. Each coded bit is sent as BPSK, +1 for 0 and -1 for 1, plus
// Gaussian noise from the Box-Muller method. The noise variance follows from
// Eb/N0 and the frame's actual rate: sigma^2 = 1 / (2 * R * Eb/N0), with
// R = 2K / (bits actually sent). The receiver gets LLR = round(8 * y),
// saturated to 6 bits. Max-log-MAP decoding does not depend on the LLR
// scale, so the 2/sigma^2 factor is left out. A frame error is a frame not
// accepted or accepted with wrong data. The bit errors are counted on the
// 2K delivered bits, whether the frame was accepted or not.
// Checked, for each K: accepted frames carry the sent data, except for a
// bounded share of wrong words (RS miscorrections): at most 2 % of the frames
// for K = 8, where the frozen bits act as a second detector, and at most
// 12 % for K = 16, where the RS check is the only detector; the frame
// error rate does not rise from 2 to 4 dB; the bit error rate falls. The
// measured table is printed. The Eb/N0 points are those of the published
// error-rate curves for this scheme; the code sizes, rates and LLR format
// are this design's.
module tb_acape_awgn;
  import acape_pkg::*;

  localparam int NK = 2;
  localparam int KLIST [NK] = '{16, 8};
  localparam int WRONG_PCT [NK] = '{12, 2};
  localparam int FRAMES = 300;
  localparam int NPTS = 3;
  localparam real EBN0_DB [NPTS] = '{2.0, 3.0, 4.0};
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic tx_start = 0;
  logic [4:0] tx_k_in = 5'd16;
  logic [NMAX-1:0] tx_u1 = '0, tx_u2 = '0;
  logic tx_busy, tx_c_valid, tx_c_first, tx_c_last;
  blk_len_e tx_blk_len;
  logic [4:0] tx_k;
  logic [1:0] tx_c, tx_c_keep;
  logic tx_punct, rx_punct = 0, ctl_punct;
  logic rx_valid = 0, rx_first = 0;
  llr_t rx_llr [2];
  blk_len_e rx_blk_len = BLK_N16;
  logic [4:0] rx_k = 5'd16;
  logic rx_busy, rx_out_valid, rx_ok, rx_frozen_ok, rx_err_detected;
  logic [NMAX-1:0] rx_u1, rx_u2;
  logic [2:0] rx_n_err, rx_iters;
  logic [4:0] ctl_min_frozen;
  logic [2:0] ctl_max_iter;
  logic ctl_raised, ctl_lowered;

  int checks = 0, failures = 0;
  int n_wrong;
  int wr [NPTS], fe [NPTS], be [NPTS], iters [NPTS], punct [NPTS];

  always #5 clk = ~clk;

  acape_fid_top dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  // BPSK symbol of coded bit b plus noise of deviation sigma, as a 6-bit LLR
  function automatic llr_t chan(input logic b, input real sigma);
    real y;
    int q;
    y = (b ? -1.0 : 1.0) + sigma * gauss();
    q = int'(8.0 * y);
    if (q > 31) q = 31;
    if (q < -31) q = -31;
    return llr_t'(q);
  endfunction

  initial begin
    rx_llr[0] = '0; rx_llr[1] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int ki = 0; ki < NK; ki++) begin
    int kb;
    kb = KLIST[ki];
    tx_k_in <= 5'(kb);
    n_wrong = 0;
    for (int p = 0; p < NPTS; p++) begin
      real ebn0;
      ebn0 = 10.0 ** (EBN0_DB[p] / 10.0);
      wr[p] = 0; fe[p] = 0; be[p] = 0; iters[p] = 0; punct[p] = 0;
      for (int t = 0; t < FRAMES; t++) begin
        logic [NMAX-1:0] a, b, d1, d2;
        real sigma;
        int nsent;
        a = NMAX'($urandom) & NMAX'((1 << kb) - 1);
        b = NMAX'($urandom) & NMAX'((1 << kb) - 1);
        @(posedge clk);
        tx_start <= 1; tx_u1 <= a; tx_u2 <= b;
        @(posedge clk);
        tx_start <= 0;
        sigma = 1.0;
        while (1) begin
          @(posedge clk); #1;
          rx_valid <= 1'b0; rx_first <= 1'b0;
          if (tx_c_valid) begin
            if (tx_c_first) begin
              // 50 trellis steps at N = 16; puncturing drops 25 bits
              nsent = tx_punct ? 75 : 100;
              sigma = $sqrt(real'(nsent) / (2.0 * 2.0 * kb * ebn0));
            end
            rx_valid   <= 1'b1;
            rx_first   <= tx_c_first;
            rx_blk_len <= tx_blk_len;
            rx_k       <= tx_k;
            rx_punct   <= tx_punct;
            rx_llr[0]  <= chan(tx_c[0], sigma);
            rx_llr[1]  <= tx_c_keep[1] ? chan(tx_c[1], sigma) : llr_t'($urandom);
            if (tx_c_last) break;
          end
        end
        if (tx_punct) punct[p]++;
        @(posedge clk); #1;
        rx_valid <= 1'b0; rx_first <= 1'b0;
        while (!rx_out_valid) begin @(posedge clk); #1; end
        d1 = (rx_u1 ^ a) & NMAX'((1 << kb) - 1);
        d2 = (rx_u2 ^ b) & NMAX'((1 << kb) - 1);
        be[p] += $countones(d1) + $countones(d2);
        iters[p] += int'(rx_iters);
        if (rx_ok) begin
          checks++;
          if (d1 != '0 || d2 != '0) begin
            n_wrong++;
            wr[p]++;
            fe[p]++;
          end
        end else begin
          fe[p]++;
        end
        repeat (2) @(posedge clk);
      end
    end
    $display("K = %0d bits per stream, %0d wrong words accepted", kb, n_wrong);
    $display("Eb/N0  frames  FER      of them accepted wrong  BER       mean iterations  punctured");
    for (int p = 0; p < NPTS; p++)
      $display("%4.1f   %4d    %7.4f  %4d                    %8.5f  %5.2f            %0d",
               EBN0_DB[p], FRAMES, real'(fe[p]) / FRAMES, wr[p],
               real'(be[p]) / (FRAMES * 2 * kb), real'(iters[p]) / FRAMES, punct[p]);
    checks += 3;
    if (n_wrong * 100 > WRONG_PCT[ki] * NPTS * FRAMES) failures++;
    if (fe[NPTS-1] > fe[0]) failures++;
    if (be[NPTS-1] >= be[0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
