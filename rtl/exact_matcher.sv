// exact_matcher: dedicated processor for exact content matching.
//
// One matching unit for one pattern, built as control unit plus datapath
// (FSM + datapath). The datapath loads one stream character per clock and
// compares it with the pattern character x[i] (Next) and with x[0]
// (Restart); the control unit, a binary up counter, steps i through the
// pattern on Next, falls back to 1 on Restart and to 0 otherwise. When i
// reaches the end code that follows the pattern, `match` goes high for one
// clock cycle.
//
// Timing: a character presented on `din` before clock edge t is compared in
// the cycle after t. If it completes the pattern, i points at the end code
// after edge t+1 and `match` is high from edge t+1 to edge t+2. One
// character is accepted every cycle, with no stall.
//
// Pattern loading: write the characters at addresses 0..N-1 and the end code
// (8'hFF) at address N through we/waddr/wdata, N <= L-1. Matching continues
// during writes. After reset every entry holds the end code (empty unit,
// never matches).
//
//   clk, rst_n        : clock, asynchronous active-low reset
//   din               : stream character (Datapath_input)
//   we, waddr, wdata  : pattern write port
//   match             : Datapath_output
//   addr              : current address i (observation)
//   next, restart     : status signals (observation)
module exact_matcher
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
  output logic          match,
  output logic [AW-1:0] addr,
  output logic          next,
  output logic          restart
);

  logic  at_end, empty;

  exact_ctrl #(.AW(AW)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .next    (next),
    .restart (restart),
    .at_end  (at_end),
    .empty   (empty),
    .addr    (addr)
  );

  exact_datapath #(.L(L), .AW(AW)) u_dp (
    .clk     (clk),
    .rst_n   (rst_n),
    .din     (din),
    .we      (we),
    .waddr   (waddr),
    .wdata   (wdata),
    .addr_a  (addr),
    .next    (next),
    .restart (restart),
    .at_end  (at_end),
    .empty   (empty),
    .match   (match)
  );

endmodule
