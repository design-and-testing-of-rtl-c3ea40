// ripple_adder: n-bit ripple-carry adder built from one half adder and
// n-1 full adders.
//
// sum = a + b, with the carry out of the last stage as bit W of the result.
// The lowest stage has no carry input and is a half adder. Used for every
// stage of the 1's counter tree and for the cascade adder of the integrator.
// The half-adder-then-full-adders chain is the chip's adder structure.
module ripple_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   sum
);
  always_comb begin
    logic c;  // carry into the current stage
    c = 1'b0;
    for (int i = 0; i < W; i++) begin
      sum[i] = a[i] ^ b[i] ^ c;
      c      = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
    end
    sum[W] = c;
  end
endmodule
