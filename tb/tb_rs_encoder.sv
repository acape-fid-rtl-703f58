// tb_rs_encoder: random messages of 2, 4 and 8 symbols; the codeword must
// equal the long-division reference, vanish at a^1..a^4, and done must come
// k_sym cycles after the clock edge that samples start.
module tb_rs_encoder;
  import acape_pkg::*;
  import acape_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  sym_t msg [RS_KMAX];
  logic [3:0] k_sym = 4'd2;
  logic done;
  sym_t cw [RS_NMAX];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rs_encoder dut (.clk, .rst_n, .start, .msg, .k_sym, .done, .cw);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < RS_KMAX; i++) msg[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 200; t++) begin
      int ks, m [8], ecw [12], cyc, got [12];
      ks = 2 << (t % 3);
      for (int i = 0; i < 8; i++) m[i] = (i < ks) ? int'($urandom % 16) : 0;
      ref_rs_encode(m, ks, ecw);
      @(posedge clk);
      for (int i = 0; i < RS_KMAX; i++) msg[i] <= sym_t'(m[i]);
      k_sym <= 4'(ks);
      start <= 1;
      @(posedge clk);
      start <= 0;
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!done);
      checks++;
      if (cyc != ks) begin
        failures++;
        $display("latency %0d, expected %0d", cyc, ks);
      end
      for (int i = 0; i < 12; i++) got[i] = int'(cw[i]);
      for (int i = 0; i < 12; i++) begin
        checks++;
        if (got[i] != ecw[i]) begin
          failures++;
          $display("t=%0d ks=%0d cw[%0d]=%0d expected %0d", t, ks, i, got[i], ecw[i]);
        end
      end
      for (int j = 1; j <= 4; j++) begin
        checks++;
        if (ref_eval(got, ks + 4, j) != 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
