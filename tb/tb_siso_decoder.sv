// tb_siso_decoder: (1) random terminated frames, BPSK-like LLRs +-10 with
// bounded noise and two coded-bit errors at least 12 steps apart: the signs
// of the output LLRs must give back every input bit; (2) neutral channel
// (all LLRs 0) with random a-priori LLRs: the max-log output must equal the
// a-priori LLR exactly outside the two tail steps; (3) done must come 2*len cycles after the edge that
// samples start.
module tb_siso_decoder;
  import acape_pkg::*;
  import acape_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [5:0] len = 6'd10;
  llr_t ch_llr [LMAX][2];
  llr_t apriori [LMAX];
  logic done;
  met_t app_llr [LMAX];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  siso_decoder dut (.clk, .rst_n, .start, .len, .ch_llr, .apriori, .done, .app_llr);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int l);
    int cyc;
    @(posedge clk);
    len <= 6'(l); start <= 1;
    @(posedge clk);
    start <= 0;
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!done);
    checks++;
    if (cyc != 2 * l) begin
      failures++;
      $display("latency %0d, expected %0d", cyc, 2 * l);
    end
  endtask

  initial begin
    for (int i = 0; i < LMAX; i++) begin ch_llr[i][0] = '0; ch_llr[i][1] = '0; apriori[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // (1) error correction
    for (int t = 0; t < 60; t++) begin
      logic bits [64];
      logic [1:0] cc [64];
      int l, e1, e2;
      l = 14 + ($urandom % (LMAX - 13));
      for (int i = 0; i < 64; i++) bits[i] = (i < l - 2) ? 1'($urandom) : 1'b0;
      ref_conv(bits, l, cc);
      e1 = $urandom % (l / 2 - 6);
      e2 = e1 + 12 + ($urandom % 4);
      for (int i = 0; i < LMAX; i++)
        for (int j = 0; j < 2; j++) begin
          int v;
          v = (i < l) ? ((cc[i][j] ? -10 : 10) + int'($urandom % 7) - 3) : 0;
          if ((i == e1 && j == 0) || (i == e2 && j == 1)) v = -v;
          ch_llr[i][j] = llr_t'(v);
        end
      for (int i = 0; i < LMAX; i++) apriori[i] = '0;
      run(l);
      for (int i = 0; i < l; i++) begin
        checks++;
        if (app_llr[i][MET_W-1] !== bits[i]) begin
          failures++;
          $display("t=%0d bit %0d: llr %0d, sent %b", t, i, app_llr[i], bits[i]);
        end
      end
    end
    // (2) neutral channel: output equals a-priori
    for (int t = 0; t < 10; t++) begin
      for (int i = 0; i < LMAX; i++) begin
        ch_llr[i][0] = '0; ch_llr[i][1] = '0;
        apriori[i] = llr_t'(int'($urandom % 21) - 10);
      end
      run(LMAX);
      // the two tail steps are forced to 0 by termination; skip them
      for (int i = 0; i < LMAX - TAIL; i++) begin
        checks++;
        if (app_llr[i] != met_t'(apriori[i])) begin
          failures++;
          $display("a-priori pass: bit %0d llr %0d expected %0d", i, app_llr[i], apriori[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
