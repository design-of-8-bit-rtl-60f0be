// tb_content_match_top: end-to-end test of the two-unit content matcher at
// its default size (16-entry register files), with no parameter overrides.
//
// The exact and the approximate unit watch one random character stream,
// with occurrences of their patterns (exact copies and one-difference
// variants) inserted now and then. Every cycle both match outputs and
// pattern addresses are compared with software models of the two
// algorithms. The test goes through:
//   - both units empty after reset (no match may be reported),
//   - loading "abcd" into both units (the reference pattern),
//   - a long stream checked cycle by cycle,
//   - reloading each unit with a new random pattern while the other unit
//     keeps running and stays checked,
//   - a second stream with the new patterns.
// It counts each mechanism: exact Next, exact Restart, back-to-back
// restart in the end cycle, approximate Jump, repetition, give-up, and
// matches of both units, matches while the other unit is being reloaded;
// a mechanism that never occurred counts as a failure.
module tb_content_match_top;
  import cm_pkg::*;
  import cm_ref_pkg::*;
  logic       clk = 0, rst_n = 0;
  char_t      din = "z";
  logic       ex_we = 0, ap_we = 0;
  logic [3:0] ex_waddr = '0, ap_waddr = '0;
  char_t      ex_wdata = '0, ap_wdata = '0;
  logic       ex_match, ap_match;
  logic [3:0] ex_addr, ap_addr_a, ap_addr_b;
  logic       ex_next, ex_restart, ap_next, ap_jump, ap_k;
  k_state_t   ap_k_state;

  content_match_top dut (.*);

  int checks = 0, failures = 0;
  int c_ex_next = 0, c_ex_restart = 0, c_end_restart = 0;
  int c_ap_jump = 0, c_ap_repeat = 0, c_ap_giveup = 0;
  int c_ex_match = 0, c_ap_match = 0, c_match_during_reload = 0;

  exact_ref  mx;
  approx_ref ma;
  logic [7:0] cur;           // character held in the input registers
  bit ex_checked, ap_checked;
  bit reloading;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // One cycle: compare, count, advance the models, present character c.
  task automatic cycle(logic [7:0] c);
    if (ex_checked) begin
      chk("ex_addr", int'(ex_addr), mx.i);
      chk("ex_match", ex_match, mx.match_now());
    end
    if (ap_checked) begin
      chk("ap_addr_a", int'(ap_addr_a), ma.i);
      chk("ap_addr_b", int'(ap_addr_b), (ma.i + 1) % 16);
      chk("ap_k", ap_k, ma.k);
      chk("ap_match", ap_match, ma.match_now());
    end
    if (ex_next && !ex_match) c_ex_next++;
    if (ex_restart && !ex_next && !ex_match) c_ex_restart++;
    if (ex_match && ex_restart) c_end_restart++;
    if (ap_jump && !ap_next && !ap_match) c_ap_jump++;
    if (!ap_next && !ap_jump && !ap_match && ap_k_state == K_S0 && ap_checked) c_ap_repeat++;
    if (!ap_next && !ap_jump && !ap_match && ap_k_state != K_S0 && ap_checked) c_ap_giveup++;
    if (ex_match) c_ex_match++;
    if (ap_match) c_ap_match++;
    if (reloading && (ex_match || ap_match)) c_match_during_reload++;
    mx.step(cur);
    ma.step(cur);
    din = c;
    cur = c;
    @(negedge clk);
  endtask

  function automatic logic [7:0] rand_char();
    return 8'("a" + $urandom_range(0, 4));
  endfunction

  // stream of random characters with occurrences of pe (exact copies) and
  // of pa with one inserted, deleted or substituted character mixed in
  task automatic stream(int cycles, string pe, string pa);
    int t = 0;
    while (t < cycles) begin
      int r = $urandom_range(0, 9);
      if (r == 0 || r == 1) begin
        string w = (r == 0) ? pe : pa;
        if (r == 1 && w.len() > 2) begin
          int pos = $urandom_range(1, w.len() - 2);
          case ($urandom_range(0, 2))
            0: w = {w.substr(0, pos - 1), w.substr(pos + 1, w.len() - 1)};            // delete
            1: w = {w.substr(0, pos - 1), "x", w.substr(pos + 1, w.len() - 1)};       // substitute
            default: w = {w.substr(0, pos - 1), "y", w.substr(pos, w.len() - 1)};     // insert
          endcase
        end
        for (int a = 0; a < w.len(); a++) begin cycle(w[a]); t++; end
      end else begin
        cycle(rand_char());
        t++;
      end
    end
  endtask

  // write a pattern into one unit while the stream keeps running
  task automatic load_ex(string p);
    for (int a = 0; a <= p.len(); a++) begin
      ex_we = 1; ex_waddr = 4'(a); ex_wdata = (a == p.len()) ? 8'hFF : p[a];
      cycle(rand_char());
    end
    ex_we = 0;
    // characters outside the pattern alphabet return the counter to 0
    // (the last one is still in the input register when the model restarts)
    repeat (3) cycle("z");
    mx.pat.delete();
    for (int a = 0; a < p.len(); a++) mx.pat.push_back(p[a]);
    mx.i = 0;
  endtask

  task automatic load_ap(string p);
    for (int a = 0; a <= p.len(); a++) begin
      ap_we = 1; ap_waddr = 4'(a); ap_wdata = (a == p.len()) ? 8'hFF : p[a];
      cycle(rand_char());
    end
    ap_we = 0;
    repeat (3) cycle("z");
    ma.pat.delete();
    for (int a = 0; a < p.len(); a++) ma.pat.push_back(p[a]);
    ma.i = 0;
    ma.k = ap_k;
  endtask

  function automatic string rand_pat(int n);
    string s = "";
    for (int a = 0; a < n; a++) s = {s, string'(8'("a" + $urandom_range(0, 3)))};
    return s;
  endfunction

  initial begin
    string pe, pa;
    mx = new();
    ma = new();
    cur = "z";
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // empty units: models have empty patterns and must never match
    ex_checked = 1; ap_checked = 1;
    repeat (50) cycle(rand_char());

    // load the reference pattern into both units
    ex_checked = 0; ap_checked = 0;
    load_ex("abcd");
    load_ap("abcd");
    ex_checked = 1; ap_checked = 1;
    // back-to-back exact occurrences
    pe = "abcdabcd";
    for (int a = 0; a < pe.len(); a++) cycle(pe[a]);
    stream(3000, "abcd", "abcd");

    for (int round = 0; round < 6; round++) begin
      pe = rand_pat($urandom_range(3, 15));
      pa = rand_pat($urandom_range(3, 15));
      // reload the exact unit while the approximate unit keeps matching
      ex_checked = 0; reloading = 1;
      load_ex(pe);
      ex_checked = 1;
      // reload the approximate unit while the exact unit keeps matching
      ap_checked = 0;
      load_ap(pa);
      ap_checked = 1; reloading = 0;
      stream(1500, pe, pa);
    end

    $display("exact: next=%0d restart=%0d end_restart=%0d match=%0d",
             c_ex_next, c_ex_restart, c_end_restart, c_ex_match);
    $display("approx: jump=%0d repeat=%0d giveup=%0d match=%0d",
             c_ap_jump, c_ap_repeat, c_ap_giveup, c_ap_match);
    $display("matches during reload of the other unit=%0d", c_match_during_reload);
    chk("exact Next seen",      c_ex_next > 0, 1);
    chk("exact Restart seen",   c_ex_restart > 0, 1);
    chk("end-cycle restart",    c_end_restart > 0, 1);
    chk("exact match seen",     c_ex_match > 0, 1);
    chk("approx Jump seen",     c_ap_jump > 0, 1);
    chk("approx repeat seen",   c_ap_repeat > 0, 1);
    chk("approx give-up seen",  c_ap_giveup > 0, 1);
    chk("approx match seen",    c_ap_match > 0, 1);
    chk("match during reload",  c_match_during_reload > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
