// integrator: correlation score of one chip or of a master/slave pair.
//
// The 1's counter turns the N comparator outputs into an 8-bit count of
// matched or masked bits (0..128). The count is offered
//   - on the internal data bus (read at the INT address), via count,
//   - on the cascade pins C0..C7, driven only when the chip is a slave
//     (ms = 0): c_out / c_oe,
//   - to an 8-bit adder that adds the count arriving on C0..C7 from the
//     slave chip, giving a 9-bit 256-bit score.
// A 9-bit 2-to-1 multiplexer selected by M/S passes the chip's own count
// (ms = 0) or the cascaded sum (ms = 1) to the decision maker.
//
// Block structure and multiplexer inputs follow the chip's integrator. The
// tristate cascade pins are split into c_out / c_oe / c_in.
module integrator #(
  parameter int unsigned N = bac_pkg::N_TAPS,
  localparam int unsigned CW = $clog2(N) + 1   // count width
) (
  input  logic [N-1:0]  cp,      // comparator outputs
  input  logic          ms,      // status M/S bit
  input  logic [CW-1:0] c_in,    // count from the slave chip (C0..C7)
  output logic [CW-1:0] count,   // this chip's 1's count
  output logic [CW-1:0] c_out,
  output logic          c_oe,
  output logic [CW:0]   score    // to the decision maker
);
  logic [CW:0] cascade_sum;

  ones_counter #(.N(N)) u_cnt (.in(cp), .count(count));
  ripple_adder #(.W(CW)) u_add (.a(count), .b(c_in), .sum(cascade_sum));

  always_comb begin
    c_out = count;
    c_oe  = !ms;
    score = ms ? cascade_sum : {1'b0, count};
  end
endmodule
