// polar_decoder: reverse polarization and information-bit extraction.
//
// Takes a corrected polar codeword x (one stream, NMAX bits, bits at or above
// N zero) and applies the inverse transform u = x * F^-1. The Arikan matrix
// F = [1 0; 1 1]^(x)4 is its own inverse over GF(2), so the same butterfly as
// the encoder is used. The bits at the information positions (info_mask)
// are gathered in ascending position order into u_out (bit 0 first); the
// frozen positions must come out 0, and frozen_ok reports whether they did,
// a last consistency check on the frame.
//
// Reverse polarization and information-bit extraction follow the document's
// Eq. 6; the frozen-bit check is this design's addition from the same
// algebra. The document's adaptive list decoding of the polar code is not
// built: the polar word reaching this block has already been corrected by
// the Reed-Solomon stage, so it is inverted directly.
//
// Timing: u_out, frozen_ok and u_valid are registered, one cycle after
// in_valid.
module polar_decoder
  import acape_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [NMAX-1:0] x,
  input  logic [NMAX-1:0] info_mask,
  output logic            u_valid,
  output logic [NMAX-1:0] u_out,
  output logic            frozen_ok
);

  logic [NMAX-1:0] u_full, u_pack;
  logic            fz_ok;

  always_comb begin
    int m;
    u_full = polar_transform(x);
    u_pack = '0;
    fz_ok  = 1'b1;
    m      = 0;
    for (int i = 0; i < NMAX; i++) begin
      if (info_mask[i]) begin
        u_pack[m] = u_full[i];
        m++;
      end else if (u_full[i]) begin
        fz_ok = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_valid   <= 1'b0;
      u_out     <= '0;
      frozen_ok <= 1'b0;
    end else begin
      u_valid <= in_valid;
      if (in_valid) begin
        u_out     <= u_pack;
        frozen_ok <= fz_ok;
      end
    end
  end

endmodule
