// siso_decoder: soft-in soft-out decoder of the rate-1/2 convolutional code.
//
// Max-log-MAP (BCJR) over the 4-state trellis of conv_encoder (state =
// {FF1, FF2}, generators 111 and 101), started and terminated in state 0.
// LLRs are log(P(bit=0)/P(bit=1)): positive means 0. The branch metric is the
// correlation sum of +-L over the two coded bits and the a-priori LLR of the
// input bit; it is twice the usual max-log metric, so the output difference is
// halved before it leaves the module. No metric normalisation is needed:
// MET_W = 16 bits cover LMAX steps of the largest metrics.
//
// The forward recursion stores alpha for every step in a memory (LMAX+1 x 4
// metrics); the backward recursion then runs from the last step down and
// writes the a-posteriori LLR of each input bit.
//
// The document names two soft-in soft-out decoders exchanging soft
// information; the algorithm, word widths and memory organisation here are
// this design's choices.
//
// Interface: pulse start with len (trellis steps, tail included), ch_llr and
// apriori valid and stable until done. done pulses 2*len cycles after the clock edge that
// samples start;
// app_llr then holds one LLR per step (tail steps included) until the next
// start.
module siso_decoder
  import acape_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [5:0] len,
  input  llr_t       ch_llr  [LMAX][2],  // channel LLRs of c[0], c[1]
  input  llr_t       apriori [LMAX],     // a-priori LLR of each input bit
  output logic       done,
  output met_t       app_llr [LMAX]      // a-posteriori LLR of each input bit
);

  localparam met_t NEG_INF = met_t'(-(1 << (MET_W - 2)));

  typedef enum logic [1:0] {S_IDLE, S_FWD, S_BWD} state_e;
  state_e     state;
  logic [5:0] step;

  met_t alpha_mem [LMAX+1][4];
  met_t alpha_cur [4];
  met_t beta      [4];

  // branch metric of input u leaving state s at trellis step st
  function automatic met_t gamma(input logic [5:0] st, input logic [1:0] s, input logic u);
    logic c0, c1;
    met_t g;
    c0 = u ^ s[1] ^ s[0];
    c1 = u ^ s[0];
    g  = c0 ? -met_t'(ch_llr[st][0]) : met_t'(ch_llr[st][0]);
    g += c1 ? -met_t'(ch_llr[st][1]) : met_t'(ch_llr[st][1]);
    g += u  ? -met_t'(apriori[st])   : met_t'(apriori[st]);
    return g;
  endfunction

  function automatic met_t mmax(input met_t a, input met_t b);
    return (a > b) ? a : b;
  endfunction

  // next forward metrics from alpha_cur at step `step`
  met_t alpha_nxt [4];
  always_comb begin
    for (int ns = 0; ns < 4; ns++) begin
      // predecessors: FF1 of old = FF2 of new, input u = FF1 of new
      logic [1:0] p0, p1;
      p0 = {ns[0], 1'b0};
      p1 = {ns[0], 1'b1};
      alpha_nxt[ns] = mmax(alpha_cur[p0] + gamma(step, p0, ns[1]),
                           alpha_cur[p1] + gamma(step, p1, ns[1]));
    end
  end

  // backward step: beta update and output LLR at `step`
  met_t beta_nxt [4];
  met_t llr_now;
  always_comb begin
    met_t m0, m1, t;
    m0 = NEG_INF;
    m1 = NEG_INF;
    for (int s = 0; s < 4; s++) begin
      logic [1:0] n0, n1;
      n0 = {1'b0, s[1]};
      n1 = {1'b1, s[1]};
      beta_nxt[s] = mmax(gamma(step, 2'(s), 1'b0) + beta[n0],
                         gamma(step, 2'(s), 1'b1) + beta[n1]);
      t  = alpha_mem[step][s] + gamma(step, 2'(s), 1'b0) + beta[n0];
      m0 = mmax(m0, t);
      t  = alpha_mem[step][s] + gamma(step, 2'(s), 1'b1) + beta[n1];
      m1 = mmax(m1, t);
    end
    llr_now = (m0 - m1) >>> 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step  <= '0;
      done  <= 1'b0;
      for (int s = 0; s < 4; s++) begin
        alpha_cur[s] <= '0;
        beta[s]      <= '0;
      end
      for (int k = 0; k < LMAX; k++) app_llr[k] <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          for (int s = 0; s < 4; s++) alpha_cur[s] <= (s == 0) ? met_t'(0) : NEG_INF;
          step  <= '0;
          state <= S_FWD;
        end
        S_FWD: begin
          alpha_mem[step] <= alpha_cur;
          alpha_cur       <= alpha_nxt;
          if (step == len - 6'd1) begin
            for (int s = 0; s < 4; s++) beta[s] <= (s == 0) ? met_t'(0) : NEG_INF;
            state <= S_BWD;
          end else begin
            step <= step + 6'd1;
          end
        end
        S_BWD: begin
          app_llr[step] <= llr_now;
          beta          <= beta_nxt;
          if (step == '0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            step <= step - 6'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
