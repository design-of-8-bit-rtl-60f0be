// tb_exact_matcher: end-to-end test of the exact content-matching
// processor at the reference size (16 x 8 register file).
//
// 1. The pattern "abcd" plus end code is loaded at addresses 0..4 and a
//    directed stream is applied: "abcd" alone, twice back to back, after a
//    repeated 'a' ("aabcd") and after a broken try ("abcabcd"). The match
//    output must be high exactly two clock edges after each completing
//    character is presented, for one cycle, and nowhere else.
// 2. Random patterns over a small alphabet and random streams are compared
//    cycle by cycle (match output and pattern address) with a software
//    model of the brute-force algorithm.
// One character is presented every cycle; the match latency is checked.
module tb_exact_matcher;
  import cm_pkg::*;
  import cm_ref_pkg::*;
  localparam int L = 16;
  logic       clk = 0, rst_n = 0, we = 0;
  logic [3:0] waddr = '0, addr;
  char_t      din = "z", wdata = '0;
  logic       match, next, restart;
  int checks = 0, failures = 0;
  int n_match = 0, n_restart = 0;

  exact_matcher #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0d exp=%0d at %0t", what, got, exp, $time);
    end
  endtask

  // write pattern + end code while the stream idles on 'z'
  task automatic load(string p);
    din = "z";
    for (int a = 0; a <= p.len(); a++) begin
      @(negedge clk);
      we = 1; waddr = 4'(a);
      wdata = (a == p.len()) ? 8'hFF : p[a];
    end
    @(negedge clk);
    we = 0;
    // one non-pattern character brings the counter back to 0
    repeat (2) @(negedge clk);
  endtask

  initial begin
    string s;
    int    exp_hit [$];
    exact_ref m;
    logic [7:0] cur;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // ---- directed: reference pattern "abcd" ----
    load("abcd");
    s = "zabcdabcdaabcdabcabcdzzz";
    // completing characters at 4, 8, 13, 20 -> match seen at index + 2
    exp_hit = '{6, 10, 15, 22};
    for (int t = 0; t < s.len(); t++) begin
      // we are just after a negedge: sample, then present the next character
      chk($sformatf("directed match t=%0d", t), match, (t inside {exp_hit}) ? 1 : 0);
      if (restart && !next) n_restart++;
      din = s[t];
      @(negedge clk);
    end

    // ---- random patterns against the software model ----
    m = new();
    for (int p = 0; p < 60; p++) begin
      string pat;
      int n;
      n = $urandom_range(1, L - 1);
      pat = "";
      for (int a = 0; a < n; a++) pat = {pat, string'(8'("a" + $urandom_range(0, (p % 3) + 1)))};
      load(pat);
      m.pat.delete();
      for (int a = 0; a < n; a++) m.pat.push_back(pat[a]);
      m.i = 0;
      cur = "z";   // character now held in the input register
      for (int t = 0; t < 300; t++) begin
        logic [7:0] c;
        chk("addr", int'(addr), m.i);
        chk("match", match, m.match_now());
        if (match) n_match++;
        m.step(cur);
        c = 8'("a" + $urandom_range(0, (p % 3) + 2));
        din = c;
        cur = c;
        @(negedge clk);
      end
    end
    checks++;
    if (n_match == 0 || n_restart == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: match=%0d restart=%0d", n_match, n_restart);
    end
    $display("random matches=%0d directed restarts=%0d", n_match, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
