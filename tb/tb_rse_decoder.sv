// tb_rse_decoder: random codewords of the shortened RS code (n_sym = 6, 8,
// 12) from the reference encoder, with 0, 1, 2 or 3 symbol errors at random
// positions and values. Up to 2 errors: the word must come back exactly, with
// err_detected, n_err and err_mask right. 3 errors: either fail, or a valid
// codeword (every syndrome zero) is returned; failures must be seen.
// Latency must stay within 2*n_sym + 20 cycles.
module tb_rse_decoder;
  import acape_pkg::*;
  import acape_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  sym_t r [RS_NMAX];
  logic [3:0] n_sym = 4'd6;
  logic done, err_detected, fail;
  sym_t corr [RS_NMAX];
  logic [2:0] n_err;
  logic [RS_NMAX-1:0] err_mask;
  int checks = 0, failures = 0;
  int n_fail3 = 0, n_corr [3] = '{0, 0, 0};

  always #5 clk = ~clk;

  rse_decoder dut (.clk, .rst_n, .start, .r, .n_sym, .done, .corr, .err_detected, .fail, .n_err, .err_mask);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < RS_NMAX; i++) r[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 800; t++) begin
      int ks, n, ne, m [8], cw [12], rx [12], got [12], cyc;
      logic [RS_NMAX-1:0] emask;
      ks = 2 << (t % 3);
      n  = ks + 4;
      ne = (t / 3) % 4;
      for (int i = 0; i < 8; i++) m[i] = (i < ks) ? int'($urandom % 16) : 0;
      ref_rs_encode(m, ks, cw);
      rx = cw;
      emask = '0;
      for (int e = 0; e < ne; e++) begin
        int p;
        do p = $urandom % n; while (emask[p]);
        emask[p] = 1'b1;
        rx[p] = cw[p] ^ (1 + int'($urandom % 15));
      end
      @(posedge clk);
      for (int i = 0; i < RS_NMAX; i++) r[i] <= sym_t'(rx[i]);
      n_sym <= 4'(n);
      start <= 1;
      @(posedge clk);
      start <= 0;
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!done);
      checks++;
      if (cyc > 2 * n + 20) begin
        failures++;
        $display("latency %0d", cyc);
      end
      for (int i = 0; i < 12; i++) got[i] = int'(corr[i]);
      checks++;
      if (err_detected != (ne != 0)) begin
        failures++;
        $display("t=%0d ne=%0d err_detected=%b", t, ne, err_detected);
      end
      if (ne <= 2) begin
        checks++;
        if (fail || got != cw || int'(n_err) != ne || err_mask != emask) begin
          failures++;
          $display("t=%0d n=%0d ne=%0d: fail=%b n_err=%0d mask=%h/%h", t, n, ne, fail, n_err, err_mask, emask);
        end
        if (ne > 0) n_corr[ne]++;
      end else begin
        checks++;
        if (fail) n_fail3++;
        else if (ref_eval(got, n, 1) != 0 || ref_eval(got, n, 2) != 0 ||
                 ref_eval(got, n, 3) != 0 || ref_eval(got, n, 4) != 0) begin
          failures++;
          $display("t=%0d: 3 errors returned a non-codeword without fail", t);
        end
      end
    end
    checks++;
    $display("1-error words %0d, 2-error words %0d, 3-error failures flagged %0d",
             n_corr[1], n_corr[2], n_fail3);
    if (n_fail3 == 0 || n_corr[1] == 0 || n_corr[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
