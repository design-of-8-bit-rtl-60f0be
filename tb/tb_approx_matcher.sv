// tb_approx_matcher: end-to-end test of the approximate content-matching
// processor (k <= 1) at the reference size (16 x 8 register file).
//
// 1. Pattern "abcd" with end code at addresses 0..4, then the stream
//    "r r a x c d r r" (the pattern with 'b' substituted by 'x'). Every
//    cycle the status pair (Next, Jump), the PortA/PortB addresses and the
//    match output are compared with a hand-worked table: 'a' gives Next,
//    'x' neither (x[1] is repeated), 'c' gives Jump, 'd' gives Next, and the
//    match output is high for one cycle while PortA addresses 0100.
// 2. Variants of "abcd" with one deleted, substituted or inserted character
//    ("acd", "abd", "axcd", "abxd", "aybcd", "abycd", "abcd", "bcd"), and
//    "axbcyd", whose two insertions are separated by a regular match, must
//    each produce exactly one match; streams with two differences in a row
//    ("axyd", "abxyd"), an incomplete occurrence ("ad") or a deleted last
//    character ("abc") none.
// 3. Random patterns and streams are compared cycle by cycle with a
//    software model of the approximate algorithm; the numbers of
//    repetitions, jumps, give-ups and matches must all be non-zero.
module tb_approx_matcher;
  import cm_pkg::*;
  import cm_ref_pkg::*;
  localparam int L = 16;
  logic       clk = 0, rst_n = 0, we = 0;
  logic [3:0] waddr = '0, addr_a, addr_b;
  char_t      din = "z", wdata = '0;
  logic       match, next, jump, k;
  k_state_t   k_state;
  int checks = 0, failures = 0;

  approx_matcher #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
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

  task automatic load(string p);
    din = "z";
    for (int a = 0; a <= p.len(); a++) begin
      @(negedge clk);
      we = 1; waddr = 4'(a);
      wdata = (a == p.len()) ? 8'hFF : p[a];
    end
    @(negedge clk);
    we = 0;
    repeat (3) @(negedge clk);
  endtask

  // Expected values while the input register holds subst_s[t-1]:
  //                        t:  1  2  3  4  5  6  7  8
  string subst_s = "rraxcdrr";
  int    subst_next  [8] = '{0, 0, 1, 0, 0, 1, 0, 0};
  int    subst_jump  [8] = '{0, 0, 0, 0, 1, 0, 0, 0};
  int    subst_addra [8] = '{0, 0, 0, 1, 1, 3, 4, 0};
  int    subst_match [8] = '{0, 0, 0, 0, 0, 0, 1, 0};

  initial begin
    approx_ref m;
    logic [7:0] cur;
    string pos [$] = '{"acd", "abd", "axcd", "abxd", "aybcd", "abycd", "abcd", "bcd", "axbcyd"};
    string neg [$] = '{"axyd", "abxyd", "ad", "abc"};
    int n_match = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // ---- 1: substitution "axcd", cycle by cycle ----
    load("abcd");
    din = subst_s[0];
    @(negedge clk);
    for (int t = 1; t <= 8; t++) begin
      chk($sformatf("subst next t=%0d", t),  next,        subst_next[t-1]);
      chk($sformatf("subst jump t=%0d", t),  jump,        subst_jump[t-1]);
      chk($sformatf("subst addr_a t=%0d", t), int'(addr_a), subst_addra[t-1]);
      chk($sformatf("subst addr_b t=%0d", t), int'(addr_b), subst_addra[t-1] + 1);
      chk($sformatf("subst match t=%0d", t), match,       subst_match[t-1]);
      din = (t < 8) ? subst_s[t] : "z";
      @(negedge clk);
    end

    // ---- 2: variants with one and two differences ----
    foreach (pos[w]) begin
      int hits;
      string s;
      hits = 0;
      s = {"zz", pos[w], "zzz"};
      for (int t = 0; t < s.len(); t++) begin
        din = s[t];
        @(negedge clk);
        if (match) hits++;
      end
      chk({"one match for ", pos[w]}, hits, 1);
    end
    foreach (neg[w]) begin
      int hits;
      string s;
      hits = 0;
      s = {"zz", neg[w], "zzz"};
      for (int t = 0; t < s.len(); t++) begin
        din = s[t];
        @(negedge clk);
        if (match) hits++;
      end
      chk({"no match for ", neg[w]}, hits, 0);
    end

    // ---- 3: random patterns against the software model ----
    m = new();
    for (int p = 0; p < 60; p++) begin
      string pat;
      int n;
      n = $urandom_range(2, L - 1);
      pat = "";
      for (int a = 0; a < n; a++) pat = {pat, string'(8'("a" + $urandom_range(0, (p % 3) + 1)))};
      load(pat);
      m.pat.delete();
      for (int a = 0; a < n; a++) m.pat.push_back(pat[a]);
      // after idle characters the position is 0; k may be either value,
      // so take it from the unit before comparing
      m.i = 0;
      m.k = k;
      cur = "z";
      for (int t = 0; t < 400; t++) begin
        logic [7:0] c;
        chk("addr_a", int'(addr_a), m.i);
        chk("k", k, m.k);
        chk("match", match, m.match_now());
        if (match) n_match++;
        m.step(cur);
        c = 8'("a" + $urandom_range(0, (p % 3) + 2));
        din = c;
        cur = c;
        @(negedge clk);
      end
    end
    $display("random: matches=%0d repeats=%0d jumps=%0d giveups=%0d",
             n_match, m.n_repeat, m.n_jump, m.n_giveup);
    checks++;
    if (n_match == 0 || m.n_repeat == 0 || m.n_jump == 0 || m.n_giveup == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
