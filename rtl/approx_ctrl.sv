// approx_ctrl: control unit of the approximate content-matching processor.
//
// It holds the PortA address i in a binary up counter, forms the PortB
// address j = i + 1 with the "+1" adder (addr_incr), and keeps the error
// count k in the k FSM (k_fsm). Each clock edge, in priority order:
//
//   at_end                 -> i := 1 if y == x[0] (Restart), else 0
//   Next    (x[i] == y)    -> i := i + 1               k := 0
//   Jump    (x[i+1] == y)  -> i := i + 2               k := 1
//   k == 0                 -> i := i  (repeat x[i])    k := 1
//   k == 1                 -> i := 1 if Restart, else 0; k := 0
//
// The Next / Jump / repeat / give-up rows are the approximate algorithm,
// which finds the pattern with at most one inserted, deleted or substituted
// character (k <= 1). The Restart comparator is the third comparator that
// the full design adds; this implementation uses it where the exact matcher
// does, when the partial match is abandoned and in the end cycle. With an
// empty register file (`empty`) Restart is ignored.
//
// Interface: clk, asynchronous active-low rst_n (i := 0, k := 0); status
// inputs next, jump, restart, at_end, empty; outputs addr_a = i
// (registered), addr_b = i + 1 (combinational from i), k and k_state.
module approx_ctrl
  import cm_pkg::*;
#(
  parameter int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          next,
  input  logic          jump,
  input  logic          restart,
  input  logic          at_end,
  input  logic          empty,
  output logic [AW-1:0] addr_a,
  output logic [AW-1:0] addr_b,
  output logic          k,
  output k_state_t      k_state
);

  logic [AW-1:0] addr_d;
  logic          restart_ok;

  addr_incr #(.AW(AW)) u_adder (
    .a (addr_a),
    .y (addr_b)
  );

  k_fsm u_kfsm (
    .clk    (clk),
    .rst_n  (rst_n),
    .next   (next),
    .jump   (jump),
    .at_end (at_end),
    .state  (k_state),
    .k      (k)
  );

  always_comb begin
    restart_ok = restart && !empty;
    if (at_end)          addr_d = restart_ok ? AW'(1) : '0;
    else if (next)       addr_d = addr_b;             // i + 1
    else if (jump)       addr_d = addr_b + AW'(1);    // i + 2
    else if (!k)         addr_d = addr_a;             // repeat x[i]
    else if (restart_ok) addr_d = AW'(1);
    else                 addr_d = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) addr_a <= '0;
    else        addr_a <= addr_d;
  end

endmodule
