// tb_approx_ctrl: tests the approximate matcher's control unit: address
// counter i, adder j = i + 1 and k FSM together. Directed sequences step
// through a regular advance, a jump over one character, a repetition and a
// give-up with and without Restart; a random part compares i, j and k with
// the step rules every cycle.
module tb_approx_ctrl;
  import cm_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic       next = 0, jump = 0, restart = 0, at_end = 0, empty = 0;
  logic [3:0] addr_a, addr_b;
  logic       k;
  k_state_t   k_state;
  int checks = 0, failures = 0;

  approx_ctrl #(.AW(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cyc(logic n, logic j, logic r, logic e, logic em, int exp_i, bit exp_k);
    next = n; jump = j; restart = r; at_end = e; empty = em;
    @(posedge clk);
    #1;
    checks++;
    if (int'(addr_a) != exp_i || int'(addr_b) != ((exp_i + 1) % 16) || k !== exp_k) begin
      failures++;
      $display("FAIL n=%b j=%b r=%b e=%b em=%b i=%0d j=%0d k=%b exp i=%0d k=%b",
               n, j, r, e, em, addr_a, addr_b, k, exp_i, exp_k);
    end
    @(negedge clk);
  endtask

  initial begin
    int mi; bit mk;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (addr_a !== 4'd0 || addr_b !== 4'd1 || k !== 1'b0) begin
      failures++; $display("FAIL reset");
    end
    cyc(1, 0, 0, 0, 0, 1, 0);   // Next
    cyc(0, 0, 0, 0, 0, 1, 1);   // repeat x[1]
    cyc(0, 1, 0, 0, 0, 3, 1);   // Jump after repeat: substitution
    cyc(1, 0, 0, 0, 0, 4, 0);   // Next
    cyc(0, 0, 1, 1, 0, 1, 0);   // end cycle, Restart
    cyc(0, 1, 0, 0, 0, 3, 1);   // Jump: deletion
    cyc(0, 0, 1, 0, 0, 1, 0);   // second difference, Restart
    cyc(0, 0, 0, 0, 0, 1, 1);   // repeat
    cyc(0, 0, 0, 0, 0, 0, 0);   // second difference, no Restart
    cyc(1, 1, 1, 0, 0, 1, 0);   // Next has priority over Jump
    cyc(0, 0, 1, 1, 1, 0, 0);   // empty pattern: end cycle to 0
    mi = 0; mk = 0;
    for (int t = 0; t < 2000; t++) begin
      logic n, j, r, e, em, rok;
      n  = 1'($urandom); j = 1'($urandom); r = 1'($urandom);
      e  = ($urandom_range(0, 5) == 0);
      em = ($urandom_range(0, 15) == 0);
      rok = r && !em;
      if (e)       begin mi = rok ? 1 : 0;    mk = 0; end
      else if (n)  begin mi = (mi + 1) % 16;  mk = 0; end
      else if (j)  begin mi = (mi + 2) % 16;  mk = 1; end
      else if (!mk) begin                     mk = 1; end
      else         begin mi = rok ? 1 : 0;    mk = 0; end
      cyc(n, j, r, e, em, mi, mk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
