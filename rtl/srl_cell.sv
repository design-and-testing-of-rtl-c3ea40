// srl_cell: shift register latch, the scan element of the register blocks.
//
// A master-slave D flip-flop preceded by a 2-to-1 multiplexer. In normal mode
// (test = 0) the flip-flop takes its data input d; in scan mode (test = 1) it
// takes the scan input si, so that chained cells form one serial scan path.
// Both modes use the same clock; the flip-flop captures on the rising edge
// of clk, which in the chip is a write strobe from the controller.
//
// The multiplexer-plus-flip-flop structure follows the chip's LSSD element;
// the single-clock variant (instead of two non-overlapping scan clocks) is
// also the chip's. The register blocks use this cell only at the first stage
// of each shift chain; the later stages are plain flip-flops.
module srl_cell (
  input  logic clk,   // register clock (rising edge)
  input  logic test,  // 1: take the scan input
  input  logic d,     // normal data input
  input  logic si,    // scan input
  output logic q
);
  always_ff @(posedge clk)
    q <= test ? si : d;
endmodule
