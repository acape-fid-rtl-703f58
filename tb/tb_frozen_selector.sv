// tb_frozen_selector: checks block length and information set of
// frozen_selector for every K in 1..16 and min_frozen in 0..10 against the
// reference reliability order (least reliable positions frozen).
module tb_frozen_selector;
  import acape_pkg::*;
  import acape_ref_pkg::*;

  logic [4:0]      k, min_frozen;
  blk_len_e        blk_len;
  logic [NMAX-1:0] info_mask;
  int checks = 0, failures = 0;

  frozen_selector dut (.k, .min_frozen, .blk_len, .info_mask);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int kk = 1; kk <= 16; kk++)
      for (int mf = 0; mf <= 10; mf++) begin
        int code, n;
        logic [NMAX-1:0] em;
        k = 5'(kk); min_frozen = 5'(mf);
        #1;
        code = ref_blk_code(kk, mf);
        n    = ref_n(code);
        em   = ref_mask(kk, n);
        checks++;
        if (int'(blk_len) != code) begin
          failures++;
          $display("K=%0d mf=%0d: blk_len %0d, expected %0d", kk, mf, blk_len, code);
        end
        checks++;
        if (info_mask !== em) begin
          failures++;
          $display("K=%0d mf=%0d: mask %h, expected %h", kk, mf, info_mask, em);
        end
        checks++;
        if ($countones(info_mask) != kk) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
