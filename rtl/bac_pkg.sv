// bac_pkg: constants and small helper types shared by the BAC128 correlator.
//
// The chip correlates a 128-bit window of a serial data stream against a
// programmed reference word. Its register map is decoded from a 3-bit address
// (A2..A0) and an 8-bit microprocessor data bus. The sizes here are the
// chip's: 128 correlation taps, an 8-bit data bus, an 8-bit 1's-counter
// result (0..128) and a 9-bit cascaded score (0..256).
package bac_pkg;

  // Correlation length of one chip and width of the microprocessor bus.
  localparam int unsigned N_TAPS = 128;
  localparam int unsigned BUS_W  = 8;

  // Address map of the controller (A2 A1 A0).
  typedef enum logic [2:0] {
    ADDR_REF    = 3'b000,  // write reference register
    ADDR_MASK   = 3'b001,  // write mask register
    ADDR_THRESH = 3'b010,  // write threshold register (THRE1, then THRE2)
    ADDR_STATUS = 3'b011,  // write / read status register
    ADDR_SHIFT  = 3'b100,  // read first 8 shift-register bits; bus-load when WSH=1
    ADDR_INT    = 3'b101,  // read 1's-counter output
    ADDR_TEST   = 3'b110,  // scan path formed
    ADDR_UNUSED = 3'b111
  } bac_addr_e;

  // Write-only bits of the status register, in data-bus bit order D0..D4.
  typedef struct packed {
    logic wsh;    // D4: shift register clocked and loaded from the bus
    logic ms;     // D3: 1 = master (256-bit score), 0 = slave / 128-bit
    logic prbs;   // D2: 1 = PRBS generator mode
    logic soe;    // D1: serial output enable, active low
    logic clr_n;  // D0: SYN/INV flip-flop clear, active low
  } status_t;

endpackage
