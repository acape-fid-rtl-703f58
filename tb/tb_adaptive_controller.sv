// tb_adaptive_controller: drives windows of frame results into
// adaptive_controller (WINDOW = 4) and follows the knobs with a reference
// model: a failed frame or more than 2 corrected symbols per window raises
// min_frozen by 2 (up to 8) and max_iter by 1 (up to 7); an error-free window
// lowers them; anything else holds them. A raise also returns punct to 0;
// a lowering window that finds min_frozen already at 0 sets punct to 1. The raised / lowered pulses must
// match, and both saturation limits must be reached.
module tb_adaptive_controller;
  logic clk = 0, rst_n = 0;
  logic frame_valid = 0, frame_ok = 1;
  logic [2:0] frame_n_err = '0;
  logic [4:0] min_frozen;
  logic [2:0] max_iter;
  logic punct;
  logic raised, lowered;
  int checks = 0, failures = 0;
  int n_raise = 0, n_lower = 0, hit_fmax = 0, hit_imax = 0, hit_min = 0;

  always #5 clk = ~clk;

  adaptive_controller dut (.clk, .rst_n, .frame_valid, .frame_ok, .frame_n_err,
    .min_frozen, .max_iter, .punct, .raised, .lowered);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mf, mi, pu, n_pu = 0;
    mf = 0; mi = 1; pu = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int w = 0; w < 200; w++) begin
      int esum, anyfail, mode;
      logic exp_r, exp_l;
      esum = 0; anyfail = 0;
      mode = (w < 10) ? 0 : (w < 20) ? 1 : ($urandom % 3);
      for (int f = 0; f < 4; f++) begin
        int e;
        logic o;
        case (mode)
          0: begin e = ($urandom % 2) + 1; o = ($urandom % 3) != 0; end  // bad channel
          1: begin e = 0; o = 1; end                                     // clean
          default: begin e = $urandom % 2; o = 1; end                    // mixed
        endcase
        esum += e;
        if (!o) anyfail = 1;
        @(posedge clk);
        frame_valid <= 1; frame_ok <= o; frame_n_err <= 3'(e);
        @(posedge clk);
        frame_valid <= 0;
        if (f < 3) repeat ($urandom % 3) @(posedge clk);
      end
      exp_r = anyfail || esum > 2;
      exp_l = !exp_r && esum == 0;
      #1;
      checks++;
      if (raised !== exp_r || lowered !== exp_l) begin
        failures++;
        $display("window %0d: pulses raised=%b lowered=%b, expected %b %b", w, raised, lowered, exp_r, exp_l);
      end
      if (exp_r) begin mf = (mf + 2 > 8) ? 8 : mf + 2; mi = (mi < 7) ? mi + 1 : 7; pu = 0; end
      if (exp_l) begin if (mf == 0) pu = 1; mf = (mf < 2) ? 0 : mf - 2; mi = (mi > 1) ? mi - 1 : 1; end
      if (pu == 1) n_pu++;
      #1;
      checks++;
      if (int'(min_frozen) != mf || int'(max_iter) != mi || int'(punct) != pu) begin
        failures++;
        $display("window %0d: punct %b expected %0d", w, punct, pu);
        $display("window %0d: min_frozen %0d max_iter %0d, expected %0d %0d", w, min_frozen, max_iter, mf, mi);
      end
      if (exp_r) n_raise++;
      if (exp_l) n_lower++;
      if (mf == 8) hit_fmax++;
      if (mi == 7) hit_imax++;
      if (mf == 0 && mi == 1 && w > 0) hit_min++;
    end
    checks++;
    if (n_pu == 0 || n_raise == 0 || n_lower == 0 || hit_fmax == 0 || hit_imax == 0 || hit_min == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
