// comparator: the 128 compare cells of the correlator.
//
// Cell i outputs 1 when data bit s[i] equals reference bit r[i], or when
// mask bit m[i] is 1 (the bit is a don't-care):
//   cp[i] = (s[i] XNOR r[i]) OR m[i]
// Purely combinational; the cells are independent of each other. The cell
// function is the chip's.
module comparator #(
  parameter int unsigned N = bac_pkg::N_TAPS
) (
  input  logic [N-1:0] s,   // shift register (data)
  input  logic [N-1:0] r,   // reference register
  input  logic [N-1:0] m,   // mask register
  output logic [N-1:0] cp
);
  always_comb
    for (int i = 0; i < N; i++)
      cp[i] = (s[i] ~^ r[i]) | m[i];
endmodule
