// addr_incr: the "+1" adder of the approximate matcher's control unit.
//
// It forms the PortB address j = i + 1 from the PortA address i, so that
// the two neighbouring pattern characters x[i] and x[i+1] are read in the
// same cycle. Combinational, AW bits in and out; the sum wraps modulo 2^AW
// (a correctly terminated pattern never lets i reach the last address).
//
//   a   : address i
//   y   : address i + 1
module addr_incr #(
  parameter int unsigned AW = $clog2(cm_pkg::DEPTH)
) (
  input  logic [AW-1:0] a,
  output logic [AW-1:0] y
);

  always_comb y = a + AW'(1);

endmodule
