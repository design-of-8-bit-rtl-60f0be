// char_comparator: equality comparator of two characters.
//
// Each bit pair goes through an XNOR gate, which gives 1 where the two bits
// agree; an AND over the W XNOR outputs gives 1 only when all bits agree.
// This is the comparator structure of the design (eight XNOR gates and one
// 8-input AND gate for 8-bit characters). It is purely combinational: `eq`
// follows `a` and `b` within the same cycle.
//
//   a, b : characters to compare (W bits)
//   eq   : 1 when a == b
module char_comparator #(
  parameter int unsigned W = cm_pkg::CHAR_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         eq
);

  logic [W-1:0] bit_eq;

  always_comb begin
    bit_eq = ~(a ^ b);   // one XNOR per bit
    eq     = &bit_eq;    // W-input AND
  end

endmodule
