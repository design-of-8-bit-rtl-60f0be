// tb_k_fsm: tests the error-count FSM. A directed part walks the
// insertion path (s_0 -> s_{0-1} -> s_0 on a regular match), the deletion
// path (s_0 -> s_2), the substitution path (s_0 -> s_{0-1} -> s_2) and the
// give-up path (s_{0-1} -> s_0 on a second difference); a random part
// compares against the transition table.
module tb_k_fsm;
  import cm_pkg::*;
  logic     clk = 0, rst_n = 0, next = 0, jump = 0, at_end = 0;
  k_state_t state;
  logic     k;
  int checks = 0, failures = 0;

  k_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one cycle: apply status, clock, compare the new state
  task automatic cyc(logic n, logic j, logic e, k_state_t exp);
    next = n; jump = j; at_end = e;
    @(posedge clk);
    #1;
    checks++;
    if (state !== exp || k !== (exp != K_S0)) begin
      failures++;
      $display("FAIL n=%b j=%b e=%b state=%0d k=%b exp=%0d", n, j, e, state, k, exp);
    end
    @(negedge clk);
  endtask

  initial begin
    k_state_t model;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (state !== K_S0) begin failures++; $display("FAIL reset state"); end
    // insertion: mismatch, then a regular match
    cyc(0, 0, 0, K_S0_1);
    cyc(1, 0, 0, K_S0);
    // deletion
    cyc(0, 1, 0, K_S2);
    cyc(1, 0, 0, K_S0);
    // substitution: repeat then jump
    cyc(0, 0, 0, K_S0_1);
    cyc(0, 1, 0, K_S2);
    // second difference after a jump: give up
    cyc(0, 0, 0, K_S0);
    // second difference after a repeat: give up
    cyc(0, 0, 0, K_S0_1);
    cyc(0, 0, 0, K_S0);
    // end cycle clears any state
    cyc(0, 0, 0, K_S0_1);
    cyc(0, 1, 1, K_S0);
    model = K_S0;
    for (int t = 0; t < 2000; t++) begin
      logic n, j, e;
      n = 1'($urandom); j = 1'($urandom); e = ($urandom_range(0, 7) == 0);
      if (e || n)             model = K_S0;
      else if (j)             model = K_S2;
      else if (model == K_S0) model = K_S0_1;
      else                    model = K_S0;
      cyc(n, j, e, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
