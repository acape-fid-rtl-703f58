// conv_encoder: rate-1/2 convolutional encoder with two delay flip-flops.
//
// The encoder holds the last two input bits in FF1 (most recent) and FF2.
// For each input bit u it emits two coded bits
//   c[0] = u ^ FF1 ^ FF2   (generator 111, octal 7)
//   c[1] = u ^ FF2         (generator 101, octal 5)
// then shifts u into FF1 and FF1 into FF2.
//
// Rate adaptation by puncturing: with punct = 0 both coded bits of every step
// are sent (rate 1/2); with punct = 1 the second coded bit of every odd step of
// the frame is dropped (pattern [1 1; 1 0], rate 2/3). The pair is still
// presented every step, with c_keep telling which bits go on the channel.
//
// The two flip-flops and two
// combining nodes with these taps follow the encoder drawing of the document;
// that the nodes are modulo-2 sums, the output order, the clearing of the
// registers at the first bit of a frame (in_first) and the puncturing pattern
// used for the document's "rate adaptive" encoder are this design's choices.
//
// Timing: one bit in per cycle when in_valid; c and c_valid are registered,
// one cycle later. c_last marks the coded pair of the bit flagged in_last.
module conv_encoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_first,  // first bit of a frame: encoder state starts at 0
  input  logic       in_last,
  input  logic       in_bit,
  input  logic       punct,     // 1: rate 2/3 puncturing
  output logic       c_valid,
  output logic       c_last,
  output logic [1:0] c,
  output logic [1:0] c_keep     // bits of c that are transmitted
);

  logic ff1, ff2;
  logic s1, s2;
  logic odd;      // previous step of the frame had an odd index

  // state seen by this bit
  assign s1 = in_first ? 1'b0 : ff1;
  assign s2 = in_first ? 1'b0 : ff2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff1 <= 1'b0; ff2 <= 1'b0;
      c_valid <= 1'b0; c_last <= 1'b0; c <= '0; c_keep <= '0; odd <= 1'b0;
    end else begin
      c_valid <= in_valid;
      c_last  <= in_valid & in_last;
      if (in_valid) begin
        c[0] <= in_bit ^ s1 ^ s2;
        c[1] <= in_bit ^ s2;
        ff1  <= in_bit;
        ff2  <= s1;
        // this step is odd when the previous one was even (first step is even)
        c_keep <= {~(punct & ~in_first & ~odd), 1'b1};
        odd    <= in_first ? 1'b0 : ~odd;
      end
    end
  end

endmodule
