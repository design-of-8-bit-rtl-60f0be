// end_detector: the "end" block of the matcher datapath.
//
// The character read on PortA is compared with the end-of-pattern code. When
// the address counter has walked past the last pattern character, PortA reads
// the end code: the whole pattern has been matched, and the detector raises
// `at_end` (a status signal for the control unit) and `match` (the
// Datapath_output). Combinational; since PortA is addressed from the control
// unit's registered counter, `match` is high for exactly the one clock cycle
// in which the counter points at the end code.
//
// Design choice: a register file whose first entry already holds the end
// code holds no pattern (an empty or cleared matching unit). Such a unit
// reports `at_end` so that its counter stays at address 0, but never `match`.
//
//   port_a   : character on PortA, x[i]
//   first    : character at address 0, x[0]
//   at_end   : x[i] is the end code
//   empty    : x[0] is the end code (no pattern loaded)
//   match    : pattern found (Datapath_output)
module end_detector
  import cm_pkg::*;
(
  input  char_t port_a,
  input  char_t first,
  output logic  at_end,
  output logic  empty,
  output logic  match
);

  char_comparator #(.W(CHAR_W)) u_cmp_end (
    .a  (port_a),
    .b  (END_CHAR),
    .eq (at_end)
  );

  char_comparator #(.W(CHAR_W)) u_cmp_empty (
    .a  (first),
    .b  (END_CHAR),
    .eq (empty)
  );

  always_comb match = at_end && !empty;

endmodule
