// status_register: mode bits of the BAC128 and read-back of its outputs.
//
// Five write-only bits are loaded from D0..D4 on the write strobe WS:
//   D0 CLEAR  active low, clears the SYN and INV flip-flops
//   D1 SOE    serial output enable, active low (0 = SOUT high impedance)
//   D2 PRBS   1 = PRBS generator, 0 = correlator
//   D3 M/S    1 = master (256-bit score), 0 = slave or 128-bit correlator
//   D4 WSH    1 = shift register clocked and loaded from the data bus
// Three read-only bits are returned on a status read: D0 SYNOUT, D1 INVOUT,
// D2 the level of CLK; the other bus bits read as 0.
//
// Every bit is a shift register latch. With test = 1 they form a scan chain
// sci -> CLEAR -> SOE -> PRBS -> M/S -> WSH -> sco.
//
// The bit assignment follows the chip's scan-design version of this register,
// which matches its functional simulation; an earlier drawing of the
// register orders the bits differently. Driving 0 on the unused read bits is
// this design's choice.
module status_register
  import bac_pkg::*;
#(
  parameter int unsigned W = bac_pkg::BUS_W
) (
  input  logic         clk,     // write strobe WS
  input  logic         test,
  input  logic         sci,
  input  logic [W-1:0] d_in,
  input  logic         synout,  // decision maker outputs
  input  logic         invout,
  input  logic         clk_pin, // CLK level for read-back
  output status_t      st,
  output logic [W-1:0] rd_data,
  output logic         sco
);
  logic [4:0] bits;   // bits[i] is loaded from D_i
  logic [4:0] scan_in;

  assign scan_in = {bits[3:0], sci};

  for (genvar i = 0; i < 5; i++) begin : g_bit
    srl_cell u_srl (
      .clk (clk),
      .test(test),
      .d   (d_in[i]),
      .si  (scan_in[i]),
      .q   (bits[i])
    );
  end

  assign st      = status_t'(bits);
  assign sco     = bits[4];
  assign rd_data = W'({clk_pin, invout, synout});
endmodule
