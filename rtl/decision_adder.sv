// decision_adder: W-bit adder that produces only its two top sum bits.
//
// Only the two most significant sum bits of score + threshold are needed by
// the decision maker, so the low W-2 stages are carry cells (carry out =
// majority of the two inputs and the carry in; the lowest one has no carry
// in) and only the top two stages are full adders with sum outputs.
// s_hi2 is sum bit W-2 (S8 for W = 9), s_hi1 is sum bit W-1 (S9).
// The carry-cell structure is the chip's.
module decision_adder #(
  parameter int unsigned W = 9
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         s_hi2,   // sum bit W-2
  output logic         s_hi1    // sum bit W-1
);
  always_comb begin
    logic c;  // carry out of the stages below the current one
    c = a[0] & b[0];
    for (int i = 1; i < W - 2; i++)
      c = (a[i] & b[i]) | (c & (a[i] | b[i]));
    s_hi2 = a[W-2] ^ b[W-2] ^ c;
    c     = (a[W-2] & b[W-2]) | (c & (a[W-2] | b[W-2]));
    s_hi1 = a[W-1] ^ b[W-1] ^ c;
  end
endmodule
