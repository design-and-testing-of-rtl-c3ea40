// controller: address decoder and strobe generator of the BAC128.
//
// It decodes the 3-bit address with chip select and the microprocessor's
// active-low RD and WR into active-high strobes. The write strobes are used
// directly as the clocks of the write-only registers: a strobe rises when WR
// falls while the address is valid, so a register captures the data bus on
// the high-to-low transition of WR.
//
//   A2..A0  strobe   meaning
//   000     wref     write reference register        (WR low)
//   001     wm       write mask register             (WR low)
//   010     wt       write threshold register        (WR low)
//   011     ws / rs  write / read status register    (WR low / RD low)
//   100     rsh      read first 8 shift-register bits (RD low)
//           wshr     bus-load clock of the shift register (WR low)
//   101     int_sel  1's-counter output selected     (level, no RD/WR)
//   110     test     scan path formed                (level, no RD/WR)
//
// With CS high every output is low. While test is high the four scan-path
// register clocks (wref, wm, wt, ws) all follow WR, so the registers shift as
// one chain, one stage per write cycle.
//
// The decode table, the CS gating, the level-only TEST and INT outputs and
// the common scan clock are the chip's. This design's choices: a write wins
// over a simultaneous read (as in the bus buffer), and address 100 also
// provides the shift register's bus-load clock, which the chip takes from WR
// without an address.
module controller
  import bac_pkg::*;
(
  input  logic       cs_n,
  input  logic       rd_n,
  input  logic       wr_n,
  input  logic [2:0] addr,
  output logic       wref,
  output logic       wm,
  output logic       wt,
  output logic       ws,
  output logic       rs,
  output logic       rsh,
  output logic       wshr,
  output logic       int_sel,
  output logic       test
);
  logic [6:0] y;     // one-hot decoder outputs Y0..Y6 (111 unused)
  logic       wr, rd;

  always_comb begin
    y = '0;
    if (!cs_n && addr != ADDR_UNUSED) y[addr] = 1'b1;
    wr = !wr_n;
    rd = !rd_n && wr_n;

    test    = y[ADDR_TEST];
    int_sel = y[ADDR_INT];
    rsh     = y[ADDR_SHIFT]  && rd;
    rs      = y[ADDR_STATUS] && rd;
    wshr    = y[ADDR_SHIFT]  && wr;
    // In scan mode all four scan-path registers share the WR clock.
    wref    = (y[ADDR_REF]    || test) && wr;
    wm      = (y[ADDR_MASK]   || test) && wr;
    wt      = (y[ADDR_THRESH] || test) && wr;
    ws      = (y[ADDR_STATUS] || test) && wr;
  end
endmodule
