// polarized_conv_encoder: the ACAPE-FID transmitter.
//
// Two information bit streams (u1, u2) of K bits each are polar coded by two
// polar_encoder instances that share one frozen_selector (the "freeze bit
// optimization and rate control" unit), so both use the same adaptive block
// length N and frozen set. The two polar blocks, 2N bits, become N/2 GF(16)
// symbols (bit b of the frame is bit b%4 of symbol b/4; stream 1 fills bits
// 0..N-1, stream 2 bits N..2N-1), rs_encoder appends 4 parity symbols, and the
// codeword bits (symbol 0 first, bit 0 first) followed by two zero tail bits
// are fed one per cycle to conv_encoder. The tail returns the encoder to
// state 0, which the receiver's trellis relies on. The punct input, sampled
// with start, selects the encoder's rate-2/3 puncturing for the frame.
//
// The polar stage followed by the convolutional stage, the two polar encoders
// and the shared frozen-bit control follow the document's encoder drawing.
// The Reed-Solomon stage between them is this design's placement: the
// document decodes a Reed-Solomon code at the receiver (its Eq. 4) but does
// not say where the transmitter adds it.
//
// Interface: pulse start (when busy is low) with k, min_frozen, punct, u1 and
// u2 valid. frame_blk_len / frame_k / frame_punct hold the frame's
// configuration from the next cycle on, for the receiver. The coded stream
// appears on c/c_valid, one pair per cycle, c_first on the first and c_last
// on the last pair; c_keep marks the bits that are transmitted.
// Timing: first coded pair k_sym+4 cycles after start, then 4*(N/2+4)+2
// consecutive pairs.
module polarized_conv_encoder
  import acape_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [4:0]      k,
  input  logic [4:0]      min_frozen,
  input  logic            punct,
  input  logic [NMAX-1:0] u1,
  input  logic [NMAX-1:0] u2,
  output logic            busy,
  output blk_len_e        frame_blk_len,
  output logic [4:0]      frame_k,
  output logic            frame_punct,
  output logic            c_valid,
  output logic            c_first,
  output logic            c_last,
  output logic [1:0]      c,
  output logic [1:0]      c_keep
);

  typedef enum logic [1:0] {S_IDLE, S_POLAR, S_RS, S_STREAM} state_e;
  state_e state;

  blk_len_e        sel_len;
  logic [NMAX-1:0] sel_mask;
  logic            xa_valid, xb_valid;
  logic [NMAX-1:0] xa, xb;
  sym_t            msg [RS_KMAX];
  sym_t            cw  [RS_NMAX];
  logic            rs_start, rs_done;
  logic [3:0]      k_sym;
  logic [6:0]      bit_idx, n_steps;
  logic            enc_valid, enc_first, enc_last, enc_bit;
  logic [5:0]      cw_bit;

  frozen_selector u_sel (
    .k(k), .min_frozen(min_frozen), .blk_len(sel_len), .info_mask(sel_mask)
  );

  polar_encoder u_pol_a (
    .clk, .rst_n, .in_valid(start && state == S_IDLE), .u_in(u1), .info_mask(sel_mask),
    .x_valid(xa_valid), .x(xa)
  );

  polar_encoder u_pol_b (
    .clk, .rst_n, .in_valid(start && state == S_IDLE), .u_in(u2), .info_mask(sel_mask),
    .x_valid(xb_valid), .x(xb)
  );

  // pack the two polar blocks into RS message symbols
  always_comb begin
    logic [2*NMAX-1:0] bits;
    int n;
    n = blk_n(frame_blk_len);
    bits = '0;
    for (int b = 0; b < 2*NMAX; b++)
      if (b < n)            bits[b] = xa[b];
      else if (b < 2*n)     bits[b] = xb[b-n];
    for (int s = 0; s < RS_KMAX; s++) msg[s] = bits[4*s +: 4];
  end

  assign k_sym = 4'(blk_n(frame_blk_len) / 2);

  rs_encoder u_rs (
    .clk, .rst_n, .start(rs_start), .msg(msg), .k_sym(k_sym), .done(rs_done), .cw(cw)
  );

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      frame_blk_len <= BLK_N4;
      frame_k       <= '0;
      frame_punct   <= 1'b0;
      rs_start      <= 1'b0;
      bit_idx       <= '0;
      n_steps       <= '0;
    end else begin
      rs_start <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          frame_blk_len <= sel_len;
          frame_k       <= k;
          frame_punct   <= punct;
          state         <= S_POLAR;
        end
        S_POLAR: if (xa_valid && xb_valid) begin
          rs_start <= 1'b1;
          state    <= S_RS;
        end
        S_RS: if (rs_done) begin
          bit_idx <= '0;
          n_steps <= 7'((int'(k_sym) + RS_NPAR) * SYM_W + TAIL);
          state   <= S_STREAM;
        end
        S_STREAM: begin
          bit_idx <= bit_idx + 7'd1;
          if (bit_idx == n_steps - 7'd1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign cw_bit    = bit_idx[5:0];
  assign enc_valid = (state == S_STREAM);
  assign enc_first = enc_valid && bit_idx == '0;
  assign enc_last  = enc_valid && bit_idx == n_steps - 7'd1;
  // codeword bits, then TAIL zeros
  assign enc_bit   = (bit_idx < n_steps - 7'(TAIL)) ? cw[cw_bit[5:2]][cw_bit[1:0]] : 1'b0;

  conv_encoder u_conv (
    .clk, .rst_n, .in_valid(enc_valid), .in_first(enc_first), .in_last(enc_last),
    .in_bit(enc_bit), .punct(frame_punct), .c_valid(c_valid), .c_last(c_last),
    .c(c), .c_keep(c_keep)
  );

  // first-pair flag, aligned with the encoder's registered output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c_first <= 1'b0;
    else        c_first <= enc_first;
  end

endmodule
