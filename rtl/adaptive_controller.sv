// adaptive_controller: adaptive control and feedback of coding parameters.
//
// Watches the outcome of every decoded frame and sets three run-time knobs
// for the following frames: the minimum number of frozen bits per polar block
// (min_frozen, which makes the polar code lower-rate), the iteration budget of
// the iterative decoder (max_iter) and the convolutional code rate (punct:
// 0 = rate 1/2, 1 = punctured rate 2/3). Frames are judged in windows
// of WINDOW frames. A window with a failed frame, or with more than
// ERR_HIGH corrected symbols in total, steps min_frozen and max_iter up and
// returns to rate 1/2; a window with no error at all steps them down, and if
// min_frozen was already 0 it also switches to rate 2/3. Other windows leave
// the knobs unchanged. All knobs start at their lowest-redundancy-but-safe
// values: min_frozen 0, max_iter 1, rate 1/2. min_frozen moves in steps of FROZEN_STEP
// between 0 and FROZEN_MAX, max_iter between 1 and ITER_MAX.
//
// The document names this unit (monitor channel conditions, adjust coding
// rate, frozen bits and iterations at run time) but not how it decides; the
// window rule, thresholds and step sizes here are this design's choices.
// Corrected symbols and failures stand in for the measured SNR/BER.
//
// Timing: new knob values are registered one cycle after the frame_valid
// that closes a window.
module adaptive_controller #(
  parameter int unsigned WINDOW      = 4,
  parameter int unsigned ERR_HIGH    = 2,
  parameter int unsigned FROZEN_STEP = 2,
  parameter int unsigned FROZEN_MAX  = 8,
  parameter int unsigned ITER_MAX    = 7
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       frame_valid,
  input  logic       frame_ok,
  input  logic [2:0] frame_n_err,
  output logic [4:0] min_frozen,
  output logic [2:0] max_iter,
  output logic       punct,
  output logic       raised,     // one-cycle pulse when the knobs went up
  output logic       lowered     // one-cycle pulse when they went down
);

  logic [7:0] cnt, err_sum;
  logic       any_fail;
  logic [7:0] err_tot;
  logic       fail_tot;

  assign err_tot  = err_sum + 8'(frame_n_err);
  assign fail_tot = any_fail | ~frame_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; err_sum <= '0; any_fail <= 1'b0;
      min_frozen <= '0; max_iter <= 3'd1; punct <= 1'b0;
      raised <= 1'b0; lowered <= 1'b0;
    end else begin
      raised  <= 1'b0;
      lowered <= 1'b0;
      if (frame_valid) begin
        if (cnt == 8'(WINDOW - 1)) begin
          cnt <= '0; err_sum <= '0; any_fail <= 1'b0;
          if (fail_tot || err_tot > 8'(ERR_HIGH)) begin
            if (min_frozen + 5'(FROZEN_STEP) <= 5'(FROZEN_MAX)) min_frozen <= min_frozen + 5'(FROZEN_STEP);
            else                                                min_frozen <= 5'(FROZEN_MAX);
            if (max_iter < 3'(ITER_MAX)) max_iter <= max_iter + 3'd1;
            punct  <= 1'b0;
            raised <= 1'b1;
          end else if (err_tot == '0) begin
            if (min_frozen >= 5'(FROZEN_STEP)) min_frozen <= min_frozen - 5'(FROZEN_STEP);
            else                               min_frozen <= '0;
            if (max_iter > 3'd1) max_iter <= max_iter - 3'd1;
            if (min_frozen == '0) punct <= 1'b1;
            lowered <= 1'b1;
          end
        end else begin
          cnt      <= cnt + 8'd1;
          err_sum  <= err_tot;
          any_fail <= fail_tot;
        end
      end
    end
  end

endmodule
