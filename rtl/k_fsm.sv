// k_fsm: error-count FSM ("FSM k") of the approximate matching processor.
//
// It remembers whether the current partial match already used its one
// allowed difference (k = 1). Its three states are s_0 (k = 0), s_{0-1}
// (a pattern character was repeated: insertion, or the first half of a
// substitution) and s_2 (a pattern character was skipped: deletion, or the
// second half of a substitution). Transitions, in priority order, taken at
// each clock edge:
//
//   at_end               -> s_0      (match reported, start over)
//   Next    (x[i] == y)  -> s_0
//   Jump    (x[i+1]== y) -> s_2
//   in s_0               -> s_{0-1}  (repeat x[i] for the next character)
//   otherwise            -> s_0      (second difference: give up)
//
// These follow the step rules of the approximate algorithm, which sets k to
// 0 after every regular match; the at_end row is this implementation's.
//
// Interface: clk, asynchronous active-low rst_n (state := s_0); status
// inputs next, jump, at_end; outputs `state` and `k` (state != s_0), both
// registered.
module k_fsm
  import cm_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     next,
  input  logic     jump,
  input  logic     at_end,
  output k_state_t state,
  output logic     k
);

  k_state_t state_d;

  always_comb begin
    if (at_end || next)    state_d = K_S0;
    else if (jump)         state_d = K_S2;
    else if (state == K_S0) state_d = K_S0_1;
    else                   state_d = K_S0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= K_S0;
    else        state <= state_d;
  end

  always_comb k = (state != K_S0);

endmodule
