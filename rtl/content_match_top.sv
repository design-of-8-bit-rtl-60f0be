// content_match_top: exact and approximate content-matching units on one
// character stream.
//
// An NIDPS content matcher built from dedicated 8-bit matching processors.
// Both processors see the same stream, one character per clock on `din`:
// the exact unit reports occurrences of its pattern, the approximate unit
// also occurrences that differ from its pattern by one inserted, deleted or
// substituted character. Each unit has its own pattern register file with
// its own write port, so one pattern can be loaded, replaced or cleared
// while the other unit keeps matching.
//
// Pairing one unit of each kind on a shared stream is this implementation's
// arrangement; each unit's behaviour is described in exact_matcher and
// approx_matcher. Timing: a match is reported two clock edges after the
// completing character is presented on `din`, for one cycle.
//
//   clk, rst_n                     : clock, asynchronous active-low reset
//   din                            : stream character
//   ex_we, ex_waddr, ex_wdata      : exact unit's pattern write port
//   ap_we, ap_waddr, ap_wdata      : approximate unit's pattern write port
//   ex_match, ap_match             : match outputs
//   ex_addr, ap_addr_a, ap_addr_b  : pattern addresses (observation)
//   ex_next, ex_restart            : exact unit's status signals
//   ap_next, ap_jump               : approximate unit's status signals
//   ap_k, ap_k_state               : approximate unit's error count, k FSM state
module content_match_top
  import cm_pkg::*;
#(
  parameter int unsigned L  = DEPTH,
  parameter int unsigned AW = $clog2(L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  char_t         din,
  input  logic          ex_we,
  input  logic [AW-1:0] ex_waddr,
  input  char_t         ex_wdata,
  input  logic          ap_we,
  input  logic [AW-1:0] ap_waddr,
  input  char_t         ap_wdata,
  output logic          ex_match,
  output logic          ap_match,
  output logic [AW-1:0] ex_addr,
  output logic [AW-1:0] ap_addr_a,
  output logic [AW-1:0] ap_addr_b,
  output logic          ex_next,
  output logic          ex_restart,
  output logic          ap_next,
  output logic          ap_jump,
  output logic          ap_k,
  output k_state_t      ap_k_state
);

  exact_matcher #(.L(L), .AW(AW)) u_exact (
    .clk     (clk),
    .rst_n   (rst_n),
    .din     (din),
    .we      (ex_we),
    .waddr   (ex_waddr),
    .wdata   (ex_wdata),
    .match   (ex_match),
    .addr    (ex_addr),
    .next    (ex_next),
    .restart (ex_restart)
  );

  approx_matcher #(.L(L), .AW(AW)) u_approx (
    .clk    (clk),
    .rst_n  (rst_n),
    .din    (din),
    .we     (ap_we),
    .waddr  (ap_waddr),
    .wdata  (ap_wdata),
    .match  (ap_match),
    .addr_a (ap_addr_a),
    .addr_b (ap_addr_b),
    .next   (ap_next),
    .jump   (ap_jump),
    .k      (ap_k),
    .k_state(ap_k_state)
  );

endmodule
