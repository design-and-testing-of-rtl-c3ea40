// bac128: microprocessor-programmable 128-bit correlator and PRBS generator.
//
// The chip finds a synchronisation word in a serial bit stream received over
// a noisy channel. Every rising CLK edge shifts SIN into a 128-bit shift
// register; 128 compare cells compare it with a programmed reference word,
// a mask register turns selected bits into don't-cares, a 1's counter sums
// the matches and a decision maker compares the score against programmed
// error tolerances. The result is a one-CLK-period pulse on SYN (and an
// INV flag, readable in the status register, when the word arrived
// inverted). Two chips cascade into a 256-bit correlator: the slave drives
// its count on C0..C7 and the master adds it to its own. With the PRBS mode
// bit set, the parity of the masked comparator outputs is fed back into the
// shift register, turning it into a 128-stage linear feedback shift register
// whose output appears on SOUT.
//
// Microprocessor interface (all strobes active low, registers capture on
// the falling edge of WR):
//   A=000 W  reference register, 16 bytes     A=100 R  shift reg bits 7..0
//   A=001 W  mask register, 16 bytes           A=100 W  shift reg load (WSH=1)
//   A=010 W  THRE1 then THRE2                  A=101 R  1's counter output
//   A=011 W  status (CLEAR SOE PRBS M/S WSH)   A=110    scan-test mode
//   A=011 R  SYNOUT INVOUT CLK
// In scan-test mode the reference, mask, threshold and status registers form
// one 277-stage scan chain clocked by WR, whose input is D0 and whose output
// replaces the SYN pin.
//
// The bidirectional pins (D0..D7, C0..C7) and the tristate SOUT are split
// into separate input, output and output-enable ports. The chip has no reset
// pin: the microprocessor programs every register before use. Timing: SYN
// and INV change on the rising CLK edge after the matching word has been
// fully shifted in (the 129th edge for a word starting at the first edge).
// The block structure, register map, modes and timing follow the chip; the
// port split and the address used for loading the shift register from the
// bus are this design's choices.
module bac128
  import bac_pkg::*;
#(
  parameter int unsigned N = bac_pkg::N_TAPS,
  localparam int unsigned W  = bac_pkg::BUS_W,
  localparam int unsigned CW = $clog2(N) + 1
) (
  // serial data
  input  logic          clk,       // CLK, from the data PLL
  input  logic          sin,       // SIN
  output logic          sout,      // SOUT
  output logic          sout_oe,   // SOUT driven (status SOE = 1)
  // microprocessor bus
  input  logic          cs_n,
  input  logic          wr_n,
  input  logic          rd_n,
  input  logic [2:0]    addr,      // A2..A0
  input  logic [W-1:0]  d_in,      // D0..D7 as driven by the processor
  output logic [W-1:0]  d_out,     // D0..D7 as driven by the chip
  output logic          d_oe,
  // cascade bus
  input  logic [CW-1:0] c_in,      // C0..C7 as driven by the other chip
  output logic [CW-1:0] c_out,
  output logic          c_oe,
  // interrupt
  output logic          syn        // SYN (scan output in test mode)
);
  // controller strobes
  logic wref, wm, wt, ws, rs, rsh, wshr, int_sel, test;
  // bus buffer
  logic [W-1:0] int_bus;
  logic         bus_write;  // processor driving D0..D7 (assertion only)
  // registers
  logic [N-1:0] s_q, r_q, m_q;
  logic [CW-1:0] thre1, thre2;
  status_t st;
  logic [W-1:0] sr_rd, st_rd;
  logic sco_ref, sco_mask, sco_thr, sco_st;
  logic sout_raw;
  // datapath
  logic [N-1:0] cp;
  logic [CW-1:0] count;
  logic [CW:0] score;
  logic syn_q, inv_q;

  controller u_ctrl (
    .cs_n, .rd_n, .wr_n, .addr,
    .wref, .wm, .wt, .ws, .rs, .rsh, .wshr, .int_sel, .test
  );

  bus_buffer #(.W(W)) u_buf (
    .cs_n, .wr_n, .rd_n, .int_bus, .write_en(bus_write), .d_out, .d_oe
  );

  shift_register #(.N(N), .W(W)) u_sr (
    .clk, .wshr, .wsh(st.wsh), .prbs(st.prbs), .sin, .fb(count[0]),
    .d_in(d_in), .q(s_q), .sout(sout_raw), .rd_data(sr_rd)
  );

  pattern_register #(.N(N), .W(W)) u_ref (
    .clk(wref), .test, .sci(d_in[0]), .d_in(d_in), .q(r_q), .sco(sco_ref)
  );

  pattern_register #(.N(N), .W(W)) u_mask (
    .clk(wm), .test, .sci(sco_ref), .d_in(d_in), .q(m_q), .sco(sco_mask)
  );

  threshold_register #(.W(CW)) u_thr (
    .clk(wt), .test, .sci(sco_mask), .d_in(d_in[CW-1:0]),
    .thre1, .thre2, .sco(sco_thr)
  );

  status_register #(.W(W)) u_st (
    .clk(ws), .test, .sci(sco_thr), .d_in(d_in),
    .synout(syn_q), .invout(inv_q), .clk_pin(clk),
    .st, .rd_data(st_rd), .sco(sco_st)
  );

  comparator #(.N(N)) u_cmp (.s(s_q), .r(r_q), .m(m_q), .cp);

  integrator #(.N(N)) u_int (
    .cp, .ms(st.ms), .c_in, .count, .c_out, .c_oe, .score
  );

  decision_maker #(.CW(CW)) u_dec (
    .clk, .clr_n(st.clr_n), .ms(st.ms), .score, .thre1, .thre2,
    .syn(syn_q), .inv(inv_q)
  );

  // internal read bus: one source per read address
  always_comb begin
    int_bus = '0;
    if (rs)      int_bus = st_rd;
    if (rsh)     int_bus = sr_rd;
    if (int_sel) int_bus = W'(count);
  end

  // The two drivers of D0..D7 never overlap.
  assert property (@(posedge clk) !(bus_write && d_oe));

  assign sout    = sout_raw;
  assign sout_oe = st.soe;
  assign syn     = test ? sco_st : syn_q;

endmodule
