// shift_register: the 128-bit data shift register of the BAC128.
//
// It holds the last 128 received bits for correlation. The register is built
// as eight 16-bit chains: chain k holds q[16k] .. q[16k+15]. In normal
// operation (wsh = 0) the chains are joined into one 128-bit serial register
// clocked by CLK: the serial input enters q[0], each bit moves one place up
// per rising CLK edge and q[127] leaves at the serial output. In PRBS mode
// (prbs = 1) the serial input is replaced by the feedback bit fb, the least
// significant bit of the 1's counter, so the register becomes a linear
// feedback shift register; the serial output then also carries fb, so that a
// newly generated bit is visible at once.
//
// With wsh = 1 the clock is taken from the bus-load strobe instead of CLK and
// each chain takes its first stage from data bit D_k, so 16 write cycles
// load the whole register: the byte written first ends up in q[16k+15], the
// byte written last in q[16k]. Bits q[7:0] (the eight nearest the serial
// input) are the read-back word.
//
// The chain layout, the multiplexers on serial input, clock and serial
// output, and the read-back of the first eight bits are the chip's. The clock
// multiplexer switches between two asynchronous clocks; wsh must be changed
// only while CLK is low and no bus-load strobe is active.
module shift_register #(
  parameter int unsigned N = bac_pkg::N_TAPS,
  parameter int unsigned W = bac_pkg::BUS_W
) (
  input  logic         clk,      // CLK pin, from the data PLL
  input  logic         wshr,     // bus-load strobe from the controller
  input  logic         wsh,      // status bit: load from the data bus
  input  logic         prbs,     // status bit: PRBS generator mode
  input  logic         sin,      // serial data input
  input  logic         fb,       // PRBS feedback (1's counter LSB)
  input  logic [W-1:0] d_in,     // data bus
  output logic [N-1:0] q,        // parallel contents, to the comparator
  output logic         sout,     // serial output (before the output enable)
  output logic [W-1:0] rd_data   // first W bits, for a bus read
);
  localparam int unsigned L = N / W;  // length of one chain

  logic sr_clk;
  logic ser_in;
  logic [W-1:0] chain_in;

  always_comb begin
    sr_clk = wsh ? wshr : clk;
    ser_in = prbs ? fb : sin;
    for (int k = 0; k < W; k++) begin
      if (wsh)         chain_in[k] = d_in[k];
      else if (k == 0) chain_in[k] = ser_in;
      else             chain_in[k] = q[k*L-1];
    end
  end

  always_ff @(posedge sr_clk)
    for (int k = 0; k < W; k++)
      q[k*L +: L] <= {q[k*L +: L-1], chain_in[k]};

  assign sout    = prbs ? fb : q[N-1];
  assign rd_data = q[W-1:0];
endmodule
