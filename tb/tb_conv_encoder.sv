// tb_conv_encoder: random frames of 10..50 bits (with frames back to back)
// through conv_encoder; every coded pair is compared with the shift-register
// reference (generators 7, 5), one pair per cycle, one cycle of latency.
// Half of the frames are punctured: c_keep must drop the second bit of every
// odd step of those frames and keep both bits otherwise.
module tb_conv_encoder;
  import acape_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0, in_bit = 0, punct = 0;
  logic [1:0] c_keep;
  logic c_valid, c_last;
  logic [1:0] c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  conv_encoder dut (.clk, .rst_n, .in_valid, .in_first, .in_last, .in_bit, .punct, .c_valid, .c_last, .c, .c_keep);

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
    for (int f = 0; f < 40; f++) begin
      logic bits [64];
      logic [1:0] exp_c [64];
      int len;
      logic pu;
      len = 10 + ($urandom % 41);
      pu  = f[0];
      for (int i = 0; i < 64; i++) bits[i] = 1'($urandom);
      ref_conv(bits, len, exp_c);
      for (int i = 0; i < len; i++) begin
        @(posedge clk);
        in_valid <= 1; in_first <= (i == 0); in_last <= (i == len - 1); in_bit <= bits[i];
        punct <= pu;
        #1;
        if (i > 0) begin
          checks++;
          if (c_keep !== ((pu && (i - 1) % 2 == 1) ? 2'b01 : 2'b11)) begin
            failures++;
            $display("frame %0d step %0d punct %b: keep %b", f, i - 1, pu, c_keep);
          end
          checks++;
          if (!c_valid || c !== exp_c[i-1]) begin
            failures++;
            $display("frame %0d bit %0d: c=%b expected %b", f, i - 1, c, exp_c[i-1]);
          end
        end
      end
      @(posedge clk);
      in_valid <= 0; in_first <= 0; in_last <= 0;
      #1;
      checks++;
      if (!c_valid || !c_last || c !== exp_c[len-1]) begin
        failures++;
        $display("frame %0d last pair wrong: c=%b last=%b", f, c, c_last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
