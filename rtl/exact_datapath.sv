// exact_datapath: datapath of the exact content-matching processor.
//
// Every rising clock edge the next stream character is loaded from
// Datapath_input into the 8-bit input register y. The pattern sits in the
// register file; PortA reads x[i] at the address i given by the control
// unit, and PortB, whose address lines are tied to 0, always reads x[0].
// Comparator A (y == x[i]) gives the status signal Next, comparator B
// (y == x[0]) gives Restart, and the end detector raises Datapath_output
// when PortA reads the end code. All status signals are combinational from
// the input register and the register file, so they are valid in the cycle
// after the character was presented.
//
// Follows the design: input register, one register file with two read
// ports, two XNOR/AND comparators, the end block. This implementation's own:
// asynchronous active-low reset of the input register to 8'h00, and the
// `at_end` / `empty` status signals passed on to the control unit.
//
//   din                      : Datapath_input, one character per clock
//   we, waddr, wdata         : pattern write port of the register file
//   addr_a                   : PortA address i from the control unit
//   next, restart, at_end, empty : status signals to the control unit
//   match                    : Datapath_output, high for one cycle per match
module exact_datapath
  import cm_pkg::*;
#(
  parameter int unsigned L  = DEPTH,
  parameter int unsigned AW = $clog2(L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  char_t         din,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  char_t         wdata,
  input  logic [AW-1:0] addr_a,
  output logic          next,
  output logic          restart,
  output logic          at_end,
  output logic          empty,
  output logic          match
);

  char_t y;            // input character register
  char_t x_a, x_b, x_first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= din;
  end

  pattern_regfile #(.L(L), .AW(AW)) u_rf (
    .clk      (clk),
    .rst_n    (rst_n),
    .we       (we),
    .waddr    (waddr),
    .wdata    (wdata),
    .raddr_a  (addr_a),
    .rdata_a  (x_a),
    .raddr_b  ('0),          // RB lines tied to 0: PortB reads x[0]
    .rdata_b  (x_b),
    .rd_first (x_first)
  );

  char_comparator #(.W(CHAR_W)) u_cmp_a (.a(x_a), .b(y), .eq(next));
  char_comparator #(.W(CHAR_W)) u_cmp_b (.a(x_b), .b(y), .eq(restart));

  end_detector u_end (
    .port_a (x_a),
    .first  (x_first),
    .at_end (at_end),
    .empty  (empty),
    .match  (match)
  );

endmodule
