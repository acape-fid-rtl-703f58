// tb_polarized_conv_encoder: random frames with K = 1..16 and min_frozen
// 0..8 through the whole transmitter; the coded stream is compared pair by
// pair with the reference chain (polar -> RS -> convolutional), the frame
// length and side information are checked, and the delay from start to the
// first coded pair must be N/2 + 4 cycles. Frames alternate between rate
// 1/2 and punctured rate 2/3; frame_punct and c_keep are checked. Each block length is counted and
// must occur.
module tb_polarized_conv_encoder;
  import acape_pkg::*;
  import acape_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] k = 5'd1, min_frozen = '0;
  logic punct = 0, frame_punct;
  logic [1:0] c_keep;
  logic [NMAX-1:0] u1 = '0, u2 = '0;
  logic busy, c_valid, c_first, c_last;
  blk_len_e frame_blk_len;
  logic [4:0] frame_k;
  logic [1:0] c;
  int checks = 0, failures = 0;
  int seen_len [3] = '{0, 0, 0};

  always #5 clk = ~clk;

  polarized_conv_encoder dut (.clk, .rst_n, .start, .k, .min_frozen, .punct, .u1, .u2, .busy,
    .frame_blk_len, .frame_k, .frame_punct, .c_valid, .c_first, .c_last, .c, .c_keep);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 150; t++) begin
      int kk, mf, code, npairs, got, cyc;
      logic [NMAX-1:0] a, b;
      logic [1:0] exp_c [64];
      kk = 1 + ($urandom % 16);
      mf = $urandom % 9;
      a  = NMAX'($urandom) & NMAX'((1 << kk) - 1);
      b  = NMAX'($urandom) & NMAX'((1 << kk) - 1);
      npairs = ref_tx(a, b, kk, mf, exp_c, code);
      seen_len[code]++;
      @(posedge clk);
      start <= 1; k <= 5'(kk); min_frozen <= 5'(mf); u1 <= a; u2 <= b; punct <= t[0];
      @(posedge clk);
      start <= 0;
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!c_valid);
      checks++;
      if (cyc != ref_n(code) / 2 + 4) begin
        failures++;
        $display("first pair after %0d cycles, expected %0d", cyc, ref_n(code) / 2 + 4);
      end
      checks++;
      if (int'(frame_blk_len) != code || int'(frame_k) != kk || !c_first || frame_punct != t[0]) failures++;
      got = 0;
      while (c_valid) begin
        checks++;
        if (got >= npairs || c !== exp_c[got] ||
            c_keep !== ((t[0] && got % 2 == 1) ? 2'b01 : 2'b11)) begin
          failures++;
          $display("t=%0d pair %0d: %b expected %b", t, got, c, exp_c[got]);
        end
        got++;
        if (c_last) break;
        @(posedge clk); #1;
      end
      checks++;
      if (got != npairs) begin
        failures++;
        $display("t=%0d: %0d pairs, expected %0d", t, got, npairs);
      end
      @(posedge clk); #1;
      while (busy) begin @(posedge clk); #1; end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      $display("block length N=%0d used %0d times", ref_n(i), seen_len[i]);
      if (seen_len[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
