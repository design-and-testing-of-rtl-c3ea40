// threshold_register: the two 8-bit error-tolerance registers THRE1, THRE2.
//
// Each data bit D_k feeds a two-stage shift chain THRE2[k] -> THRE1[k], so
// two write strobes load the pair: the byte written first moves on into
// THRE1, the byte written second stays in THRE2. THRE1 holds the number of
// tolerated errors for a sync word; THRE2 holds 255 minus (tolerated errors
// plus masked bits) for an inverted sync word.
//
// For scan testing the THRE2 stage of every chain is a shift register latch:
// with test = 1 chain 0 takes sci and chain k takes THRE1[k-1], forming one
// 16-stage serial path ending at sco = THRE1[7]. The clock is the
// controller's write strobe WT. The chain layout and scan order are the
// chip's; D_k driving bit k of both registers is this design's reading.
module threshold_register #(
  parameter int unsigned W = bac_pkg::BUS_W
) (
  input  logic         clk,    // write strobe WT
  input  logic         test,
  input  logic         sci,
  input  logic [W-1:0] d_in,
  output logic [W-1:0] thre1,
  output logic [W-1:0] thre2,
  output logic         sco
);
  for (genvar k = 0; k < W; k++) begin : g_bit
    srl_cell u_srl (
      .clk (clk),
      .test(test),
      .d   (d_in[k]),
      .si  (k == 0 ? sci : thre1[(k == 0) ? 0 : k-1]),
      .q   (thre2[k])
    );
  end

  always_ff @(posedge clk)
    thre1 <= thre2;

  assign sco = thre1[W-1];
endmodule
