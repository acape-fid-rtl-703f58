// tb_polar_encoder: random information words for N = 4, 8, 16 and random K;
// compares the codeword with the generator-matrix reference and checks the
// one-cycle latency.
module tb_polar_encoder;
  import acape_pkg::*;
  import acape_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [NMAX-1:0] u_in = '0, info_mask = '0;
  logic x_valid;
  logic [NMAX-1:0] x;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  polar_encoder dut (.clk, .rst_n, .in_valid, .u_in, .info_mask, .x_valid, .x);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      int n, kk;
      logic [NMAX-1:0] u, m, exp_x;
      n  = ref_n(t % 3);
      kk = 1 + ($urandom % n);
      u  = NMAX'($urandom) & NMAX'((1 << kk) - 1);
      m  = ref_mask(kk, n);
      exp_x = ref_polar(ref_scatter(u, m));
      @(posedge clk);
      in_valid <= 1; u_in <= u; info_mask <= m;
      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      if (!x_valid || x !== exp_x) begin
        failures++;
        $display("N=%0d K=%0d u=%h: x=%h valid=%b expected %h", n, kk, u, x, x_valid, exp_x);
      end
      // positions >= N must be zero
      checks++;
      if (n < NMAX && (x >> n) != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
