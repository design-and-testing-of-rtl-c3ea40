// pattern_register: 128-bit write-only register, used for the reference
// word and for the mask.
//
// Eight 16-bit shift chains are loaded side by side from the data bus, one
// stage per write strobe, so 16 write cycles fill the register. Chain k takes
// data bit D_k and holds the register bits 8j + (7-k), j = 0..15, with the
// input stage at j = 0. The byte written first therefore ends in bits
// 127..120 (D0 -> bit 127, D7 -> bit 120) and the byte written last in bits
// 7..0 (D0 -> bit 7, D7 -> bit 0).
//
// For scan testing the first stage of every chain is a shift register latch:
// with test = 1 chain 0 takes sci and chain k takes the last stage of chain
// k-1, so the 128 flip-flops form one serial path whose end (bit 120) is sco.
// The clock is the controller's write strobe (WREF or WM), which rises on
// the falling edge of WR.
//
// The chain layout, bit numbering and scan connection follow the chip. The
// contents have no reset: the chip has no reset pin and the register is
// defined once it has been written.
module pattern_register #(
  parameter int unsigned N = bac_pkg::N_TAPS,
  parameter int unsigned W = bac_pkg::BUS_W
) (
  input  logic         clk,   // write strobe (WREF or WM)
  input  logic         test,  // scan mode
  input  logic         sci,   // scan input
  input  logic [W-1:0] d_in,  // data bus
  output logic [N-1:0] q,     // register contents
  output logic         sco    // scan output
);
  localparam int unsigned L = N / W;

  logic [W-1:0][L-1:0] chain;  // chain[k][j] is stage j of chain k
  logic [W-1:0]        first;  // SRL outputs (stage 0 of each chain)

  for (genvar k = 0; k < W; k++) begin : g_chain
    srl_cell u_srl (
      .clk (clk),
      .test(test),
      .d   (d_in[k]),
      .si  (k == 0 ? sci : chain[(k == 0) ? 0 : k-1][L-1]),
      .q   (first[k])
    );
    always_ff @(posedge clk)
      chain[k][L-1:1] <= chain[k][L-2:0];
    assign chain[k][0] = first[k];
    for (genvar j = 0; j < L; j++) begin : g_bit
      assign q[W*j + (W-1-k)] = chain[k][j];
    end
  end

  assign sco = chain[W-1][L-1];
endmodule
