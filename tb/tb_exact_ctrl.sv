// tb_exact_ctrl: tests the exact matcher's control unit (binary up
// counter). Directed: with the status Next held at 1 the address counts
// 0, 1, 2, 3 (control signals 00, 01, 10, 11); a mismatch with Restart goes
// to 1, without it to 0; the end cycle returns to 0 or 1; an empty pattern
// holds 0. Random: status signals are drawn at random and the address is
// compared with the step rules every cycle.
module tb_exact_ctrl;
  logic       clk = 0, rst_n = 0;
  logic       next = 0, restart = 0, at_end = 0, empty = 0;
  logic [3:0] addr;
  int checks = 0, failures = 0;

  exact_ctrl #(.AW(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cyc(logic n, logic r, logic e, logic em, int exp);
    next = n; restart = r; at_end = e; empty = em;
    @(posedge clk);
    #1;
    checks++;
    if (int'(addr) != exp) begin
      failures++;
      $display("FAIL n=%b r=%b e=%b em=%b addr=%0d exp=%0d", n, r, e, em, addr, exp);
    end
    @(negedge clk);
  endtask

  initial begin
    int model;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (addr !== 4'd0) begin failures++; $display("FAIL reset"); end
    cyc(1, 0, 0, 0, 1);
    cyc(1, 0, 0, 0, 2);
    cyc(1, 0, 0, 0, 3);
    cyc(0, 1, 0, 0, 1);   // mismatch, but the character equals x[0]
    cyc(1, 0, 0, 0, 2);
    cyc(0, 0, 0, 0, 0);   // plain mismatch
    cyc(1, 0, 0, 0, 1);
    cyc(1, 0, 0, 0, 2);
    cyc(1, 1, 1, 0, 1);   // end cycle, new start seen
    cyc(1, 0, 0, 0, 2);
    cyc(1, 0, 1, 0, 0);   // end cycle, no new start
    cyc(0, 1, 1, 1, 0);   // empty pattern stays at 0
    model = 0;
    for (int t = 0; t < 2000; t++) begin
      logic n, r, e, em;
      n  = 1'($urandom); r = 1'($urandom);
      e  = ($urandom_range(0, 5) == 0);
      em = ($urandom_range(0, 15) == 0);
      if (e)              model = (r && !em) ? 1 : 0;
      else if (n)         model = (model + 1) % 16;
      else if (r && !em)  model = 1;
      else                model = 0;
      cyc(n, r, e, em, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
