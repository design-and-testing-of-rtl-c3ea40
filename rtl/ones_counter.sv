// ones_counter: counts the ones among N comparator outputs.
//
// An inverse binary tree of adders. Level 0 is the N input bits. Level s
// (s = 1 .. log2(N)) holds N/2^s partial counts of s+1 bits, each the sum of
// two neighbouring counts of level s-1 formed in an s-bit ripple adder; the
// 1-bit adders of level 1 are half adders. For N = 128 there are seven
// adder stages (half adders, then 2-bit up to 7-bit adders), 127 half adders
// and 120 full adders in all, and the 8-bit result runs from 0 to 128.
// N must be a power of two, at least 2. Purely combinational.
//
// The tree shape and the adder counts are the chip's. Its least significant
// bit is the parity of the inputs, which the chip uses as the PRBS feedback.
module ones_counter #(
  parameter int unsigned N = bac_pkg::N_TAPS
) (
  input  logic [N-1:0]         in,
  output logic [$clog2(N):0]   count
);
  localparam int unsigned S = $clog2(N);

  for (genvar s = 0; s <= S; s++) begin : g_lvl
    logic [s:0] v [N >> s];   // partial counts of this level
    if (s == 0) begin : g_in
      for (genvar i = 0; i < N; i++) begin : g_bit
        assign v[i] = in[i];
      end
    end else begin : g_add
      for (genvar i = 0; i < (N >> s); i++) begin : g_a
        ripple_adder #(.W(s)) u_add (
          .a  (g_lvl[s-1].v[2*i]),
          .b  (g_lvl[s-1].v[2*i+1]),
          .sum(v[i])
        );
      end
    end
  end

  assign count = g_lvl[S].v[0];
endmodule
