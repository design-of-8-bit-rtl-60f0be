// approx_datapath: datapath of the approximate content-matching processor.
//
// Every rising clock edge the next stream character is loaded from
// Datapath_input into the input register y. PortA of the register file
// reads x[i] and PortB reads the neighbouring character x[j], j = i + 1,
// both addressed by the control unit. Three XNOR/AND comparators produce the
// status signals:
//   A: Next    = (y == x[i])   regular match
//   B: Jump    = (y == x[i+1]) one pattern character skipped
//   C: Restart = (y == x[0])   the character can start a new match
// and the end detector raises Datapath_output when PortA reads the end code.
// Status signals are combinational from the input register and the
// register file.
//
// Follows the design: input register, register file with PortA/PortB,
// comparators A and B, the third (restart) comparator of the full design,
// the end block. This implementation's own: comparator C takes x[0] from a
// dedicated read output of the register file; Jump is suppressed when PortB
// reads the end code, so the counter can never skip past the end of the
// pattern; asynchronous active-low reset of y to 8'h00.
//
//   din                      : Datapath_input, one character per clock
//   we, waddr, wdata         : pattern write port of the register file
//   addr_a, addr_b           : PortA / PortB addresses i and i + 1
//   next, jump, restart, at_end, empty : status signals to the control unit
//   match                    : Datapath_output, high for one cycle per match
module approx_datapath
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
  input  logic [AW-1:0] addr_b,
  output logic          next,
  output logic          jump,
  output logic          restart,
  output logic          at_end,
  output logic          empty,
  output logic          match
);

  char_t y;            // input character register
  char_t x_a, x_b, x_first;
  logic  eq_b, b_is_end;

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
    .raddr_b  (addr_b),
    .rdata_b  (x_b),
    .rd_first (x_first)
  );

  char_comparator #(.W(CHAR_W)) u_cmp_a (.a(x_a),     .b(y),        .eq(next));
  char_comparator #(.W(CHAR_W)) u_cmp_b (.a(x_b),     .b(y),        .eq(eq_b));
  char_comparator #(.W(CHAR_W)) u_cmp_c (.a(x_first), .b(y),        .eq(restart));
  char_comparator #(.W(CHAR_W)) u_b_end (.a(x_b),     .b(END_CHAR), .eq(b_is_end));

  always_comb jump = eq_b && !b_is_end;

  end_detector u_end (
    .port_a (x_a),
    .first  (x_first),
    .at_end (at_end),
    .empty  (empty),
    .match  (match)
  );

endmodule
