// decision_maker: decides sync / inverted sync from the correlation score.
//
// Two adders add the 9-bit score to the thresholds:
//   score + THRE1: with ms = 0 (128-bit) a sync is found when sum bit 7
//     (weight 128, "S8") is 1, i.e. matched+masked+tolerance >= 128;
//     with ms = 1 (256-bit master) when sum bit 8 ("S9", weight 256) is 1.
//   score + THRE2: an inverted sync is found when sum bit 8 is 0. With
//     THRE2 = 255 - (tolerance + masked) this means that at most `tolerance`
//     unmasked bits match the reference.
// SYN is forced high whenever INV is high. Both are captured in flip-flops
// on the rising edge of CLK, the same edge that shifts new data in, so the
// outputs show the decision on the previous register contents for one CLK
// period. clr_n (status bit CLEAR, active low) clears both asynchronously.
// CLEAR is itself a register output (written over the bus), so one net is
// both a flop output and an asynchronous clear here; this is intended.
//
// Adders, multiplexer, OR and flip-flops follow the chip. A consequence kept
// from it: in 128-bit mode a sum of exactly 256 (count 128 with THRE1 = 128)
// has bit 7 clear and gives no sync.
module decision_maker #(
  parameter int unsigned CW = $clog2(bac_pkg::N_TAPS) + 1  // count width
) (
  input  logic          clk,
  input  logic          clr_n,
  input  logic          ms,
  input  logic [CW:0]   score,
  input  logic [CW-1:0] thre1,
  input  logic [CW-1:0] thre2,
  output logic          syn,
  output logic          inv
);
  logic s8_1, s9_1, s9_2;
  logic syn_d, inv_d;

  decision_adder #(.W(CW+1)) u_add1 (
    .a(score), .b({1'b0, thre1}), .s_hi2(s8_1), .s_hi1(s9_1));
  decision_adder #(.W(CW+1)) u_add2 (
    .a(score), .b({1'b0, thre2}), .s_hi2(), .s_hi1(s9_2));

  always_comb begin
    inv_d = !s9_2;
    syn_d = (ms ? s9_1 : s8_1) | inv_d;
  end

  always_ff @(posedge clk or negedge clr_n)
    if (!clr_n) begin
      syn <= 1'b0;
      inv <= 1'b0;
    end else begin
      syn <= syn_d;
      inv <= inv_d;
    end
endmodule
