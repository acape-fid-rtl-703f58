// tb_polar_decoder: random information words are polar coded with the
// reference; polar_decoder must return them (one cycle later) with
// frozen_ok = 1. With one codeword bit inverted, frozen_ok must drop
// whenever a frozen position is hit by the error (checked with the reference
// transform of the corrupted word).
module tb_polar_decoder;
  import acape_pkg::*;
  import acape_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [NMAX-1:0] x = '0, info_mask = '0, u_out;
  logic u_valid, frozen_ok;
  int checks = 0, failures = 0, n_detect = 0;

  always #5 clk = ~clk;

  polar_decoder dut (.clk, .rst_n, .in_valid, .x, .info_mask, .u_valid, .u_out, .frozen_ok);

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
    for (int t = 0; t < 600; t++) begin
      int n, kk, flip;
      logic [NMAX-1:0] u, m, cw, ufull;
      logic exp_ok;
      n  = ref_n(t % 3);
      kk = 1 + ($urandom % n);
      u  = NMAX'($urandom) & NMAX'((1 << kk) - 1);
      m  = ref_mask(kk, n);
      cw = ref_polar(ref_scatter(u, m));
      flip = (t % 2 == 1) ? int'($urandom % n) : -1;
      if (flip >= 0) cw[flip] = ~cw[flip];
      ufull  = ref_polar(cw);
      exp_ok = (ufull & ~m) == '0;
      @(posedge clk);
      in_valid <= 1; x <= cw; info_mask <= m;
      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      if (!u_valid || frozen_ok !== exp_ok) begin
        failures++;
        $display("t=%0d N=%0d K=%0d flip=%0d: frozen_ok=%b expected %b", t, n, kk, flip, frozen_ok, exp_ok);
      end
      if (!exp_ok) n_detect++;
      if (flip < 0) begin
        checks++;
        if (u_out !== u) begin
          failures++;
          $display("t=%0d N=%0d K=%0d: u=%h expected %h", t, n, kk, u_out, u);
        end
      end
    end
    checks++;
    if (n_detect == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
