// approx_matcher: dedicated processor for approximate content matching.
//
// One matching unit that finds its pattern in the stream also when one
// character of the occurrence was inserted, deleted or substituted (edit
// distance k <= 1), e.g. "abcd" also as "acd", "abxd" or "aybcd". The
// datapath compares each stream character y with two neighbouring pattern
// characters x[i] (Next) and x[i+1] (Jump), and with x[0] (Restart). The
// control unit advances i by one on Next, by two on Jump (a deleted
// character), repeats x[i] once when neither matches (an inserted
// character; a following Jump completes a substitution) and gives up on a
// second consecutive difference. When i reaches the end code, `match` is
// high for one clock cycle.
//
// Timing: as exact_matcher. A character presented on `din` before edge t is
// compared after t; if it completes an occurrence, `match` is high from edge
// t+1 to t+2. One character per clock, no stall.
//
// Pattern loading: characters at addresses 0..N-1, end code 8'hFF at N,
// N <= L-1 (PortB reads address i+1, which wraps to 0 only in the end
// cycle, when it is not used).
//
//   clk, rst_n        : clock, asynchronous active-low reset
//   din               : stream character (Datapath_input)
//   we, waddr, wdata  : pattern write port
//   match             : Datapath_output
//   addr_a, addr_b    : PortA / PortB addresses i, i+1 (observation)
//   next, jump        : status signals (observation)
//   k                 : error count of the current partial match
//   k_state           : state of the k FSM (observation)
module approx_matcher
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
  output logic [AW-1:0] addr_a,
  output logic [AW-1:0] addr_b,
  output logic          next,
  output logic          jump,
  output logic          k,
  output k_state_t      k_state
);

  logic     restart, at_end, empty;

  approx_ctrl #(.AW(AW)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .next    (next),
    .jump    (jump),
    .restart (restart),
    .at_end  (at_end),
    .empty   (empty),
    .addr_a  (addr_a),
    .addr_b  (addr_b),
    .k       (k),
    .k_state (k_state)
  );

  approx_datapath #(.L(L), .AW(AW)) u_dp (
    .clk     (clk),
    .rst_n   (rst_n),
    .din     (din),
    .we      (we),
    .waddr   (waddr),
    .wdata   (wdata),
    .addr_a  (addr_a),
    .addr_b  (addr_b),
    .next    (next),
    .jump    (jump),
    .restart (restart),
    .at_end  (at_end),
    .empty   (empty),
    .match   (match)
  );

endmodule
