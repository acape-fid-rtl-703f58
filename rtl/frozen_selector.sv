// frozen_selector: adaptive frozen-bit positioning and rate control.
//
// For a frame carrying K information bits per stream, the selector picks the
// smallest polar block length N in {4, 8, 16} that holds K bits plus at least
// MIN_FROZEN frozen bits (N = 16 when nothing smaller fits), so the number of
// frozen bits N-K follows the data length instead of being fixed. The K most
// reliable positions below N carry information, the rest are frozen (zero).
// Reliability is the polarization weight from acape_pkg.
//
// That the frozen count follows the data length is the document's idea; the
// set of block lengths, the min_frozen rate-control input and the reliability
// rule are this design's choices.
//
// Purely combinational: blk_len and info_mask follow k and min_frozen in the
// same cycle. info_mask bit i is 1 when position i carries information; bits
// at or above N are 0.
module frozen_selector
  import acape_pkg::*;
(
  input  logic [4:0]      k,           // information bits per stream, 1..16
  input  logic [4:0]      min_frozen,  // requested minimum frozen bits
  output blk_len_e        blk_len,
  output logic [NMAX-1:0] info_mask
);

  logic [5:0] need;
  logic [4:0] n_frozen;   // N - K, number of frozen positions

  always_comb begin
    need = 6'(k) + 6'(min_frozen);
    if (need <= 6'd4)      blk_len = BLK_N4;
    else if (need <= 6'd8) blk_len = BLK_N8;
    else                   blk_len = BLK_N16;
    n_frozen = 5'(blk_n(blk_len)) - k;
  end

  // Reliability ranks are constants per block length; only the comparison
  // with the run-time frozen count is hardware.
  for (genvar i = 0; i < NMAX; i++) begin : g_pos
    localparam int R4  = (i < 4) ? polar_rank(i, 4) : 0;
    localparam int R8  = (i < 8) ? polar_rank(i, 8) : 0;
    localparam int R16 = polar_rank(i, 16);
    always_comb begin
      case (blk_len)
        BLK_N4:  info_mask[i] = (i < 4) && (5'(R4) >= n_frozen);
        BLK_N8:  info_mask[i] = (i < 8) && (5'(R8) >= n_frozen);
        default: info_mask[i] = 5'(R16) >= n_frozen;
      endcase
    end
  end

endmodule
