// polar_encoder: one adaptive polar encoder (x = u*F + f).
//
// The K information bits of u_in (bit 0 first) are placed, in ascending
// order, at the positions where info_mask is 1; every other position is a
// frozen bit with value 0. The NMAX-point Arikan transform F = [1 0; 1 1]^(x)4
// is then applied. Because all positions at or above the block length N are
// frozen, the NMAX-point transform leaves them 0 and its lower N bits equal
// the N-point transform, so one circuit serves every block length.
//
// The transform itself follows the document's equation x = u*F + f; frozen
// value 0 and the in-order placement of information bits are this design's
// choices.
//
// Timing: x and x_valid are registered, one cycle after in_valid.
module polar_encoder
  import acape_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [NMAX-1:0] u_in,       // information bits, bit 0 first
  input  logic [NMAX-1:0] info_mask,  // 1 = information position
  output logic            x_valid,
  output logic [NMAX-1:0] x           // polar codeword (positions >= N are 0)
);

  logic [NMAX-1:0] u_full;

  // Scatter the information bits into the information positions.
  always_comb begin
    int m;
    m = 0;
    u_full = '0;
    for (int i = 0; i < NMAX; i++) begin
      if (info_mask[i]) begin
        u_full[i] = u_in[m];
        m++;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_valid <= 1'b0;
      x       <= '0;
    end else begin
      x_valid <= in_valid;
      if (in_valid) x <= polar_transform(u_full);
    end
  end

endmodule
