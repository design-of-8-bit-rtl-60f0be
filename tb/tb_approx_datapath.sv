// tb_approx_datapath: tests the approximate matcher's datapath on its own.
// A random pattern with its end code is written into the register file;
// then every cycle a random character is presented on din and a random
// PortA address i (PortB address i + 1) is applied. After the edge that
// loads the character the status signals must be Next = (y == x[i]),
// Jump = (y == x[i+1]) unless x[i+1] is the end code, Restart = (y == x[0]),
// at_end = (x[i] == end code), match = at_end of a non-empty pattern.
module tb_approx_datapath;
  import cm_pkg::*;
  localparam int L = 16;
  logic       clk = 0, rst_n = 0, we = 0;
  logic [3:0] waddr = '0, addr_a = '0, addr_b = 4'd1;
  char_t      din = '0, wdata = '0;
  logic       next, jump, restart, at_end, empty, match;
  logic [7:0] shadow [L];
  int checks = 0, failures = 0;
  int n_jump = 0;

  approx_datapath #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%b exp=%b (i=%0d j=%0d y=%02h xb=%02h sh=%02h)", what, got, exp, addr_a, addr_b, din, dut.x_b, shadow[addr_b]);
    end
  endtask

  // entries past the new end code keep what an earlier pattern left there
  task automatic load(int n);
    for (int a = 0; a <= n; a++) begin
      @(negedge clk);
      we = 1; waddr = 4'(a);
      wdata = (a == n) ? 8'hFF : 8'("a" + $urandom_range(0, 3));
      shadow[a] = wdata;
    end
    @(negedge clk);
    we = 0;
  endtask

  initial begin
    logic [7:0] y;
    foreach (shadow[a]) shadow[a] = 8'hFF;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    #1;
    chk("empty", empty, 1'b1);
    chk("empty match", match, 1'b0);
    for (int p = 0; p < 40; p++) begin
      load(1 + (p % 13));
      for (int t = 0; t < 200; t++) begin
        @(negedge clk);
        y = ($urandom_range(0, 9) == 0) ? 8'hFF : 8'("a" + $urandom_range(0, 4));
        din = y;
        @(posedge clk);
        #1;
        addr_a = 4'($urandom_range(0, 1 + (p % 13)));
        addr_b = addr_a + 4'd1;
        #1;
        chk("Next", next, y == shadow[addr_a]);
        chk("Jump", jump, (y == shadow[addr_b]) && (shadow[addr_b] != 8'hFF));
        chk("Restart", restart, y == shadow[0]);
        chk("at_end", at_end, shadow[addr_a] == 8'hFF);
        chk("match", match, shadow[addr_a] == 8'hFF);
        if (jump) n_jump++;
      end
    end
    checks++;
    if (n_jump == 0) begin failures++; $display("FAIL no Jump exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
