// bus_buffer: direction control of the 8-bit bidirectional data bus.
//
// The chip's data pins D0..D7 are driven by the chip only in a read cycle and
// carry data inwards in a write cycle (write_en). With all strobes active low:
//   CS=1            -> neither (high impedance)
//   CS=0, WR=0      -> WRITE (WR wins when RD is also low, so the two
//                      directions can never collide)
//   CS=0, WR=1,RD=0 -> READ
//   CS=0, WR=1,RD=1 -> neither
// Outbound, the tristate pins are split into d_out / d_oe so that the module
// stays plain two-state logic; a pad or a testbench resolves the bus. The
// inbound direction needs no gate here: the registers only capture on write
// strobes, so the pin data is passed to them directly (gating it with WR
// would make data and register clock change on the same WR edge). The
// function table is the chip's; both simplifications are this design's.
module bus_buffer #(
  parameter int unsigned W = bac_pkg::BUS_W
) (
  input  logic         cs_n,
  input  logic         wr_n,
  input  logic         rd_n,
  input  logic [W-1:0] int_bus,  // internal read data
  output logic         write_en, // WRITE: processor drives the data pins
  output logic [W-1:0] d_out,    // data pins as driven by the chip
  output logic         d_oe      // READ: the chip drives the data pins
);
  always_comb begin
    write_en = !cs_n && !wr_n;
    d_oe     = !cs_n &&  wr_n && !rd_n;
    d_out    = d_oe ? int_bus : '0;
  end
endmodule
